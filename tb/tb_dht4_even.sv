// tb_dht4_even: self-checking test of the even-output (4-point DHT) block.
//
// Drives the folded sums s[0..3] with corner and random values and compares
// ye[k] with the 4-point Hartley sum  sum_n s(n) cas(2*pi*n*k/4)  evaluated
// in floating point, which is exact here because every kernel value is
// +-1 or 0. A watchdog ends a hung run.
module tb_dht4_even;

  localparam int unsigned W = 10;

  logic signed [W-1:0] s  [4];
  logic signed [W+1:0] ye [4];
  int checks = 0, failures = 0;

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  dht4_even #(.W(W)) dut (.s(s), .ye(ye));

  function automatic real cas(input real t);
    return $cos(t) + $sin(t);
  endfunction

  task automatic apply(input int v [4]);
    real ref_y;
    for (int n = 0; n < 4; n++) s[n] = W'(v[n]);
    #1;
    for (int k = 0; k < 4; k++) begin
      ref_y = 0.0;
      for (int n = 0; n < 4; n++)
        ref_y += real'(v[n]) * cas(2.0 * 3.14159265358979 * n * k / 4.0);
      checks++;
      if (rabs(real'(ye[k]) - ref_y) > 1.0e-6) begin
        failures++;
        $display("FAIL Y(%0d)=%0d expected %f", 2*k, ye[k], ref_y);
      end
    end
  endtask

  initial begin
    int v [4];
    int lo, hi;
    lo = -(1 << (W-1));
    hi = (1 << (W-1)) - 1;
    v = '{hi, hi, hi, hi};  apply(v);
    v = '{lo, lo, lo, lo};  apply(v);
    v = '{hi, lo, hi, lo};  apply(v);
    v = '{hi, hi, lo, lo};  apply(v);
    v = '{1, 0, 0, 0};      apply(v);
    v = '{0, 1, 0, 0};      apply(v);
    repeat (2000) begin
      for (int n = 0; n < 4; n++) v[n] = int'($urandom_range(0, (1 << W) - 1)) + lo;
      apply(v);
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
