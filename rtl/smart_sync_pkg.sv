// smart_sync_pkg: shared helpers for the smart synchronizer models and the
// FIFO that uses them.
//
//  * xorshift32   - one step of a 32-bit xorshift generator. Each synchronizer
//                   bit owns one such generator, seeded from a parameter, and
//                   steps it only when a randomized capture decision is
//                   actually needed, so a run is reproducible and the random
//                   stream is not consumed by captures that are certain.
//  * seed_mix     - derives a distinct nonzero seed per bit of a vector.
//
// The choice of xorshift32 as the random source is this design's own; the
// technique only requires a reproducible stream pulled on demand.
package smart_sync_pkg;

  function automatic logic [31:0] xorshift32(input logic [31:0] s);
    logic [31:0] x;
    x = s;
    x = x ^ (x << 13);
    x = x ^ (x >> 17);
    x = x ^ (x << 5);
    return x;
  endfunction

  function automatic logic [31:0] seed_mix(input logic [31:0] seed, input int unsigned idx);
    logic [31:0] s;
    s = seed ^ (32'h9E37_79B9 * (idx + 1));
    if (s == 32'd0) s = 32'h1234_5678;
    return s;
  endfunction

endpackage
