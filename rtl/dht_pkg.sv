// dht_pkg: sizes and the sqrt(2) constant shared by the 8-point Discrete
// Hartley Transform (DHT) datapath.
//
// The transform length (8), the 9-bit signed input samples and the 17-bit
// results are the figures of the reference design. The number of fraction
// bits used to represent c = sqrt(2) is this design's own choice: 8 bits keep
// the error of every odd output below one unit (see sqrt2_mult).
//
// sqrt2_fixed(f) returns round(sqrt(2) * 2^f), computed with integers at
// elaboration time so no table or real arithmetic is needed:
//   r = floor(sqrt(2^(2f+1)));  round up when (r + 1/2)^2 < 2^(2f+1).
package dht_pkg;

  localparam int unsigned N_POINTS = 8;   // transform length
  localparam int unsigned LOG2_N   = 3;   // radix-2 stages, log2(N_POINTS)
  localparam int unsigned IN_W     = 9;   // input sample width (signed)
  localparam int unsigned OUT_W    = 17;  // output word width (signed)
  localparam int unsigned C_FRAC   = 8;   // fraction bits of sqrt(2)

  // round(sqrt(2) * 2^frac), valid for frac <= 28
  function automatic longint unsigned sqrt2_fixed(input int unsigned frac);
    longint unsigned target;
    longint unsigned r;
    longint unsigned bitv;
    target = 64'd1 << (2 * frac + 1);
    // integer square root, one result bit per step from the top
    r    = 0;
    bitv = 64'd1 << (frac + 1);
    while (bitv != 0) begin
      if ((r + bitv) * (r + bitv) <= target) r = r + bitv;
      bitv = bitv >> 1;
    end
    // (r + 1/2)^2 < target  <=>  4r^2 + 4r + 1 < 4*target
    if (4 * r * r + 4 * r + 1 < 4 * target) r = r + 1;
    return r;
  endfunction

endpackage
