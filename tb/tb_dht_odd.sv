// tb_dht_odd: self-checking test of the odd-output block.
//
// Drives the folded differences d[0..3] with corner and random values and
// compares yo[k] = Y(2k+1) with  sum_n d(n) cas(2*pi*n*(2k+1)/8)  evaluated
// in floating point. The block rounds sqrt(2)*d to an integer, so each
// result may differ from the exact value by less than 0.6 and no more.
// A watchdog ends a hung run.
module tb_dht_odd;

  localparam int unsigned W = 10;

  logic signed [W-1:0] d  [4];
  logic signed [W+1:0] yo [4];
  int checks = 0, failures = 0;

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  dht_odd #(.W(W)) dut (.d(d), .yo(yo));

  function automatic real cas(input real t);
    return $cos(t) + $sin(t);
  endfunction

  task automatic apply(input int v [4]);
    real ref_y;
    for (int n = 0; n < 4; n++) d[n] = W'(v[n]);
    #1;
    for (int k = 0; k < 4; k++) begin
      ref_y = 0.0;
      for (int n = 0; n < 4; n++)
        ref_y += real'(v[n]) * cas(2.0 * 3.14159265358979 * n * (2*k+1) / 8.0);
      checks++;
      if (rabs(real'(yo[k]) - ref_y) > 0.6) begin
        failures++;
        $display("FAIL Y(%0d)=%0d expected %f", 2*k+1, yo[k], ref_y);
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
    v = '{hi, hi, hi, lo};  apply(v);
    v = '{lo, lo, lo, hi};  apply(v);
    v = '{0, 1, 0, 0};      apply(v);
    v = '{0, 0, 0, 1};      apply(v);
    v = '{0, 5, 0, -7};     apply(v);
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
