// dht8: fully parallel 8-point Discrete Hartley Transform (DHT).
//
// For a real sequence x(0..7) the DHT is Y(k) = sum_n x(n) cas(2*pi*n*k/8),
// with cas(t) = cos(t) + sin(t). It is real in, real out, and it is its own
// inverse apart from a factor 1/N: x(n) = (1/8) sum_k Y(k) cas(2*pi*n*k/8).
// The same datapath therefore serves both directions.
//
// Structure (one radix-2 even/odd decomposition, as in the reference design):
//   1. four input butterflies fold the sequence in half,
//        s(n) = x(n) + x(n+4),  d(n) = x(n) - x(n+4),  n = 0..3;
//   2. dht4_even turns s into Y(0), Y(2), Y(4), Y(6) with adders only;
//   3. dht_odd turns d into Y(1), Y(3), Y(5), Y(7) with adders and the
//      design's only two multipliers, both by c = sqrt(2);
//   4. in inverse mode every result is divided by 8 and rounded to nearest
//      (halves toward +infinity); in forward mode it passes unscaled.
// In total: 11 butterflies (22 adders/subtractors), 2 constant multipliers,
// no registers.
//
// Interface: x[0..7] signed IN_W-bit samples; inverse selects the 1/8 scale;
// y[k] = Y(k), signed OUT_W bits, sign-extended from the IN_W+3 bits the
// transform needs. The 8-point length, the 9-bit inputs, the 17-bit outputs
// and the equations follow the reference design; the sqrt(2) format and the
// rounding, the two's-complement encoding and the inverse-mode pin are this
// design's choices.
//
// Timing: purely combinational, results are valid one propagation delay
// after the inputs settle; the longest path runs through a multiplier and
// two butterflies (plus the rounding adder in inverse mode).
module dht8 #(
  parameter int unsigned IN_W   = dht_pkg::IN_W,    // sample width
  parameter int unsigned OUT_W  = dht_pkg::OUT_W,   // result width, >= IN_W+3
  parameter int unsigned C_FRAC = dht_pkg::C_FRAC   // fraction bits of sqrt(2)
) (
  input  logic signed [IN_W-1:0]  x [8],
  input  logic                    inverse,
  output logic signed [OUT_W-1:0] y [8]
);

  localparam int unsigned FW = IN_W + 1;   // folded sum/difference width
  localparam int unsigned YW = IN_W + 3;   // full-precision result width

  if (OUT_W < YW) begin : g_bad_width
    $error("dht8: OUT_W must be at least IN_W+3");
  end

  logic signed [FW-1:0] s [4];   // x(n) + x(n+4)
  logic signed [FW-1:0] d [4];   // x(n) - x(n+4)
  logic signed [YW-1:0] ye [4];  // Y(0), Y(2), Y(4), Y(6)
  logic signed [YW-1:0] yo [4];  // Y(1), Y(3), Y(5), Y(7)
  logic signed [YW-1:0] yk [8];  // Y(k) in natural order

  for (genvar n = 0; n < 4; n++) begin : g_fold
    dht_butterfly #(.W(IN_W)) u_bf (.a(x[n]), .b(x[n+4]), .sum(s[n]), .diff(d[n]));
  end

  dht4_even #(.W(FW)) u_even (.s(s), .ye(ye));
  dht_odd   #(.W(FW), .C_FRAC(C_FRAC)) u_odd (.d(d), .yo(yo));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      yk[2*k]   = ye[k];
      yk[2*k+1] = yo[k];
    end
  end

  // output stage: optional 1/N scale of the inverse transform
  for (genvar k = 0; k < dht_pkg::N_POINTS; k++) begin : g_out
    logic signed [YW:0] rnd;   // Y(k) + N/2, one bit wider so it cannot wrap
    always_comb begin
      rnd = (YW+1)'(yk[k]) + (YW+1)'(4);
      if (inverse) y[k] = OUT_W'(rnd >>> dht_pkg::LOG2_N);
      else         y[k] = OUT_W'(yk[k]);
    end
  end

endmodule
