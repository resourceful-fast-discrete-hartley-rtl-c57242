// tb_sqrt2_mult: self-checking test of the sqrt(2) constant multiplier.
//
// Sweeps every value of the 10-bit signed operand (the width the multiplier
// has inside the 8-point DHT) and compares the result with din*sqrt(2)
// computed in floating point. Two properties are checked per operand: the
// error is below 0.6 (rounding to nearest plus the error of the 8-bit
// constant), and the result is the nearest integer whenever the exact
// product is clearly away from a half. A watchdog ends a hung run.
module tb_sqrt2_mult;

  localparam int unsigned IN_W = 10;

  logic signed [IN_W-1:0] din;
  logic signed [IN_W:0]   dout;
  int checks = 0, failures = 0;

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  sqrt2_mult #(.IN_W(IN_W)) dut (.din(din), .dout(dout));

  initial begin
    real exact, err;
    for (int v = -(1 << (IN_W-1)); v < (1 << (IN_W-1)); v++) begin
      din = IN_W'(v);
      #1;
      exact = real'(v) * $sqrt(2.0);
      err   = real'(dout) - exact;
      checks++;
      if (err > 0.6 || err < -0.6) begin
        failures++;
        $display("FAIL din=%0d dout=%0d exact=%f", v, dout, exact);
      end
      // away from a .5 fraction the nearest integer is unambiguous
      if (rabs(exact - $floor(exact) - 0.5) > 0.1) begin
        checks++;
        if (real'(dout) != $floor(exact + 0.5)) begin
          failures++;
          $display("FAIL rounding din=%0d dout=%0d exact=%f", v, dout, exact);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
