// tb_dht8: end-to-end, self-checking test of the 8-point DHT at its default
// sizes (9-bit samples, 17-bit results, 8-bit sqrt(2) constant).
//
// Reference: Y(k) = sum_n x(n) cas(2*pi*n*k/8), cas = cos + sin, evaluated in
// floating point, independent of the butterfly structure. Tolerances:
//   forward, even k: exact (kernel values are 0 and +-1);
//   forward, odd k:  |error| < 0.6 (one rounded sqrt(2) product per output);
//   inverse:         |y - Y/8| < 0.58 (rounded division of the above).
// Directed vectors: the constant sequence 135 used in the reference design's
// waveform (Y(0) = 1080, all others 0), unit impulses at every position,
// all-max, all-min and alternating full-scale inputs. Then random vectors in
// both modes. The test also checks the self-inverse property on small
// inputs: the inverse of a flat spectrum returns the matching impulse.
//
// Mechanisms counted, each must occur at least once: forward mode, inverse
// mode, a non-zero product from each sqrt(2) multiplier, a rounded-up and a
// rounded-down product, the full output range (|Y(0)| = 8*256), and an
// inverse-mode result that needed rounding (Y not a multiple of 8).
// A watchdog ends a hung run with a failure.
module tb_dht8;

  logic signed [8:0]  x [8];
  logic               inverse;
  logic signed [16:0] y [8];
  int checks = 0, failures = 0;
  int n_fwd = 0, n_inv = 0, n_mul1 = 0, n_mul3 = 0;
  int n_round_up = 0, n_round_dn = 0, n_full_range = 0, n_inv_round = 0;

  dht8 dut (.x(x), .inverse(inverse), .y(y));

  localparam real PI = 3.14159265358979;

  function automatic real cas(input real t);
    return $cos(t) + $sin(t);
  endfunction

  function automatic real rabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction

  // note how often the sqrt(2) products are non-zero and which way they round
  task automatic count_products(input int v [8]);
    real p1, p3;
    p1 = real'(v[1] - v[5]) * $sqrt(2.0);
    p3 = real'(v[3] - v[7]) * $sqrt(2.0);
    if (v[1] != v[5]) n_mul1++;
    if (v[3] != v[7]) n_mul3++;
    if (v[1] != v[5]) begin
      if (p1 - $floor(p1) >= 0.5) n_round_up++; else n_round_dn++;
    end
    if (v[3] != v[7]) begin
      if (p3 - $floor(p3) >= 0.5) n_round_up++; else n_round_dn++;
    end
  endtask

  task automatic apply(input int v [8], input bit inv);
    real ref_y, err, tol;
    for (int n = 0; n < 8; n++) x[n] = 9'(v[n]);
    inverse = inv;
    #1;
    if (inv) n_inv++; else n_fwd++;
    count_products(v);
    for (int k = 0; k < 8; k++) begin
      ref_y = 0.0;
      for (int n = 0; n < 8; n++) ref_y += real'(v[n]) * cas(2.0 * PI * n * k / 8.0);
      if (inv) begin
        if ((k % 2 == 0) && (int'(ref_y) % 8 != 0)) n_inv_round++;
        ref_y = ref_y / 8.0;
        tol   = 0.58;
      end else begin
        tol   = (k % 2 == 0) ? 1.0e-6 : 0.6;
        if (k == 0 && rabs(ref_y) >= 2040.0) n_full_range++;
      end
      err = real'(y[k]) - ref_y;
      checks++;
      if (rabs(err) > tol) begin
        failures++;
        $display("FAIL inv=%0b Y(%0d)=%0d expected %f", inv, k, y[k], ref_y);
      end
    end
  endtask

  initial begin
    int v [8];
    // the reference design's waveform: all samples 135
    v = '{135, 135, 135, 135, 135, 135, 135, 135};
    apply(v, 1'b0);
    checks++;
    if (y[0] != 17'sd1080) begin
      failures++;
      $display("FAIL constant input: Y(0)=%0d, expected 1080", y[0]);
    end
    for (int k = 1; k < 8; k++) begin
      checks++;
      if (y[k] != 0) begin
        failures++;
        $display("FAIL constant input: Y(%0d)=%0d, expected 0", k, y[k]);
      end
    end
    // impulses: Y(k) = cas(2*pi*n*k/8)
    for (int n = 0; n < 8; n++) begin
      v = '{default: 0};
      v[n] = 100;
      apply(v, 1'b0);
      apply(v, 1'b1);
    end
    v = '{default: 255};  apply(v, 1'b0);  apply(v, 1'b1);
    v = '{default: -256}; apply(v, 1'b0);  apply(v, 1'b1);
    v = '{255, -256, 255, -256, 255, -256, 255, -256}; apply(v, 1'b0);
    v = '{255, 255, 255, -256, -256, -256, 255, 255};  apply(v, 1'b0);
    v = '{255, -256, 0, 255, -256, 255, 0, -256};      apply(v, 1'b0);
    // random, both directions
    repeat (3000) begin
      for (int n = 0; n < 8; n++) v[n] = int'($urandom_range(0, 511)) - 256;
      apply(v, 1'($urandom_range(0, 1)));
    end

    // self-inverse: a flat spectrum of 8 is the transform of the impulse
    // 8*delta(n), so the inverse must return exactly that impulse.
    v = '{default: 8};
    apply(v, 1'b1);
    checks++;
    if (y[0] != 17'sd8 || y[1] != 0 || y[4] != 0 || y[7] != 0) begin
      failures++;
      $display("FAIL self-inverse: y0=%0d y1=%0d y4=%0d y7=%0d", y[0], y[1], y[4], y[7]);
    end

    checks++;
    if (n_fwd == 0 || n_inv == 0 || n_mul1 == 0 || n_mul3 == 0 || n_round_up == 0 ||
        n_round_dn == 0 || n_full_range == 0 || n_inv_round == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("mechanisms: forward=%0d inverse=%0d mul1_nonzero=%0d mul3_nonzero=%0d",
             n_fwd, n_inv, n_mul1, n_mul3);
    $display("mechanisms: product_round_up=%0d product_round_down=%0d full_range=%0d inverse_rounded=%0d",
             n_round_up, n_round_dn, n_full_range, n_inv_round);
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
