// dht4_even: even-indexed outputs of the 8-point DHT.
//
// For an 8-point DHT the even outputs Y(0), Y(2), Y(4), Y(6) are the 4-point
// DHT of the folded sums s(n) = x(n) + x(n+4), n = 0..3. Since cas(pi/2) = 1
// and cas(3pi/2) = -1 that 4-point DHT needs no multiplication:
//   Y(0) = (s0 + s2) + (s1 + s3)      Y(4) = (s0 + s2) - (s1 + s3)
//   Y(2) = (s0 - s2) + (s1 - s3)      Y(6) = (s0 - s2) - (s1 - s3)
// These are the equations of the reference design; they are built from four
// butterflies in two ranks (eight adders/subtractors).
//
// Interface: s[0..3] are the folded sums (signed W bits); ye[0..3] are
// Y(0), Y(2), Y(4), Y(6) in that order (signed W+2 bits, cannot overflow).
// Purely combinational.
module dht4_even #(
  parameter int unsigned W = dht_pkg::IN_W + 1   // width of the folded sums
) (
  input  logic signed [W-1:0] s  [4],
  output logic signed [W+1:0] ye [4]
);

  logic signed [W:0] s02_sum, s02_dif, s13_sum, s13_dif;

  // first rank: pair s0 with s2 and s1 with s3
  dht_butterfly #(.W(W)) u_bf02 (.a(s[0]), .b(s[2]), .sum(s02_sum), .diff(s02_dif));
  dht_butterfly #(.W(W)) u_bf13 (.a(s[1]), .b(s[3]), .sum(s13_sum), .diff(s13_dif));

  // second rank: combine the two halves
  dht_butterfly #(.W(W+1)) u_bf_y04 (.a(s02_sum), .b(s13_sum), .sum(ye[0]), .diff(ye[2]));
  dht_butterfly #(.W(W+1)) u_bf_y26 (.a(s02_dif), .b(s13_dif), .sum(ye[1]), .diff(ye[3]));

endmodule
