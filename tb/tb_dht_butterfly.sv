// tb_dht_butterfly: self-checking test of the add/subtract butterfly.
//
// Drives the operand corners (most negative, -1, 0, 1, most positive in every
// combination) and then random operands, and compares sum and diff with
// integer arithmetic done at 32 bits, where nothing can overflow. A watchdog
// ends the run with a failure if it ever hangs.
module tb_dht_butterfly;

  localparam int unsigned W = 9;

  logic signed [W-1:0] a, b;
  logic signed [W:0]   sum, diff;
  int checks = 0, failures = 0;

  dht_butterfly #(.W(W)) dut (.a(a), .b(b), .sum(sum), .diff(diff));

  task automatic check(input int av, input int bv);
    a = W'(av);
    b = W'(bv);
    #1;
    checks++;
    if (int'(sum) != av + bv || int'(diff) != av - bv) begin
      failures++;
      $display("FAIL a=%0d b=%0d sum=%0d diff=%0d", av, bv, sum, diff);
    end
  endtask

  initial begin
    int corners [5];
    corners = '{-(1 << (W-1)), -1, 0, 1, (1 << (W-1)) - 1};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    repeat (2000) begin
      check(int'($urandom_range(0, (1 << W) - 1)) - (1 << (W-1)),
            int'($urandom_range(0, (1 << W) - 1)) - (1 << (W-1)));
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
