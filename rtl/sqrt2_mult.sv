// sqrt2_mult: multiply a signed integer by the constant c = sqrt(2).
//
// The reference design needs exactly two multipliers, both by the same
// constant c = sqrt(2); this module is one of them. How the constant is
// represented is not fixed by the reference, so this design holds it as an
// unsigned fixed-point number with C_FRAC fraction bits (362/256 = 1.4140625
// for C_FRAC = 8), multiplies, and rounds the product to the nearest integer
// (halves round up, toward +infinity). With C_FRAC = 8 and |din| <= 512 the
// result differs from the exact din*sqrt(2) by less than 0.58.
//
// Interface: din (signed IN_W bits) in, dout (signed IN_W+1 bits) out; the
// extra bit holds |din|*sqrt(2) < 2^IN_W. Purely combinational.
module sqrt2_mult #(
  parameter int unsigned IN_W   = dht_pkg::IN_W + 1,  // operand width
  parameter int unsigned C_FRAC = dht_pkg::C_FRAC     // fraction bits of c
) (
  input  logic signed [IN_W-1:0] din,
  output logic signed [IN_W:0]   dout
);

  localparam int unsigned CW = C_FRAC + 2;          // sqrt(2)*2^f < 2^(f+1), plus sign
  localparam int unsigned PW = IN_W + CW;           // product width
  localparam logic signed [CW-1:0] C_FIX = CW'(dht_pkg::sqrt2_fixed(C_FRAC));
  localparam logic signed [PW-1:0] HALF  = PW'(64'd1 << (C_FRAC - 1));

  logic signed [PW-1:0] prod;

  always_comb begin
    prod = PW'(din) * PW'(C_FIX);
    dout = (IN_W+1)'((prod + HALF) >>> C_FRAC);
  end

  if (C_FRAC < 1 || C_FRAC > 28) begin : g_bad_frac
    $error("sqrt2_mult: C_FRAC must lie in 1..28");
  end

endmodule
