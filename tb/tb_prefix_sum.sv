// tb_prefix_sum: checks the one-cycle prefix-sum unit against a serial count.
//
// Uses the default width (one bit per TRS of the default accelerator, 50). Runs the
// 16-TRS Idle pattern of the dispatch example (Idle TRSs 1, 2, 5, 9, 13 and 14, which
// must get ranks 0..5) and 300 random patterns, comparing every exclusive sum,
// inclusive sum and the total with a loop that counts bits one by one.
module tb_prefix_sum;
  localparam int N = 50;
  localparam int W = $clog2(N + 1);

  logic [N-1:0]        bits;
  logic [N-1:0][W-1:0] excl, incl;
  logic [W-1:0]        total;
  int checks = 0, failures = 0;

  prefix_sum dut (.bits_i(bits), .excl_o(excl), .incl_o(incl), .total_o(total));

  task automatic check_all();
    int s;
    s = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (excl[i] != W'(s) || incl[i] != W'(s + int'(bits[i]))) begin
        failures++;
        $display("FAIL: bit %0d excl=%0d incl=%0d expected %0d", i, excl[i], incl[i], s);
      end
      s += int'(bits[i]);
    end
    checks++;
    if (total != W'(s)) begin
      failures++;
      $display("FAIL: total=%0d expected %0d", total, s);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos[6] = '{1, 2, 5, 9, 13, 14};
    bits = '0;
    foreach (pos[k]) bits[pos[k]] = 1'b1;
    #1;
    check_all();
    foreach (pos[k]) begin
      checks++;
      if (excl[pos[k]] != W'(k)) begin
        failures++;
        $display("FAIL: TRS %0d rank %0d, expected %0d", pos[k], excl[pos[k]], k);
      end
    end
    for (int t = 0; t < 300; t++) begin
      bits = {$urandom, $urandom};
      if (t == 0) bits = '1;
      if (t == 1) bits = '0;
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
