// dht_butterfly: radix-2 add/subtract butterfly.
//
// Produces sum = a + b and diff = a - b for two signed W-bit operands. The
// results are one bit wider than the operands, so neither can overflow. Every
// addition and subtraction in the 8-point DHT datapath is one half of such a
// pair; the reference design builds the transform from adders and
// subtractors only, apart from the two sqrt(2) multipliers.
//
// Interface: a, b in; sum, diff out. Purely combinational, no clock.
module dht_butterfly #(
  parameter int unsigned W = dht_pkg::IN_W   // operand width
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W:0]   sum,
  output logic signed [W:0]   diff
);

  always_comb begin
    sum  = (W+1)'(a) + (W+1)'(b);
    diff = (W+1)'(a) - (W+1)'(b);
  end

endmodule
