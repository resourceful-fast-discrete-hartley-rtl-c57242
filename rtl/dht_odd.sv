// dht_odd: odd-indexed outputs of the 8-point DHT.
//
// The odd outputs depend only on the folded differences d(n) = x(n) - x(n+4),
// n = 0..3. With cas(t) = cos(t) + sin(t) the kernel values are 0, +-1 and
// +-sqrt(2), which gives the reference design's equations with c = sqrt(2):
//   Y(1) = (d0 + d2) + c*d1          Y(5) = (d0 + d2) - c*d1
//   Y(3) = (d0 - d2) + c*d3          Y(7) = (d0 - d2) - c*d3
// Only two products, c*d1 and c*d3, are needed, so the block holds the two
// sqrt(2) multipliers of the design next to three butterflies (six
// adders/subtractors). The products are rounded to integers inside
// sqrt2_mult; everything else is exact.
//
// Interface: d[0..3] are the folded differences (signed W bits); yo[0..3]
// are Y(1), Y(3), Y(5), Y(7) in that order (signed W+2 bits, cannot
// overflow: |Y| <= 2^W + sqrt(2)*2^(W-1) + 1/2 < 2^(W+1)).
// Purely combinational.
module dht_odd #(
  parameter int unsigned W      = dht_pkg::IN_W + 1,  // width of the differences
  parameter int unsigned C_FRAC = dht_pkg::C_FRAC     // fraction bits of sqrt(2)
) (
  input  logic signed [W-1:0] d  [4],
  output logic signed [W+1:0] yo [4]
);

  logic signed [W:0] d02_sum, d02_dif;   // d0 + d2, d0 - d2
  logic signed [W:0] c_d1, c_d3;         // round(sqrt(2) * d1), round(sqrt(2) * d3)

  dht_butterfly #(.W(W)) u_bf02 (.a(d[0]), .b(d[2]), .sum(d02_sum), .diff(d02_dif));

  sqrt2_mult #(.IN_W(W), .C_FRAC(C_FRAC)) u_mul1 (.din(d[1]), .dout(c_d1));
  sqrt2_mult #(.IN_W(W), .C_FRAC(C_FRAC)) u_mul3 (.din(d[3]), .dout(c_d3));

  dht_butterfly #(.W(W+1)) u_bf_y15 (.a(d02_sum), .b(c_d1), .sum(yo[0]), .diff(yo[2]));
  dht_butterfly #(.W(W+1)) u_bf_y37 (.a(d02_dif), .b(c_d3), .sum(yo[1]), .diff(yo[3]));

endmodule
