// tb_omega_net: checks the bufferless Omega network at its default size (64 ports).
//
// Every message carries its source number in its data so that deliveries can be
// traced. Checks:
//  - identity and cyclic-shift permutations, which an Omega network routes without
//    any blocking, deliver all 64 messages in one clock;
//  - a single message always gets through to the output it names;
//  - with random traffic and random receiver readiness, every valid output carries a
//    message that was sent to that output, an input is granted exactly when its
//    message appears at its output and that output is ready, no message is duplicated,
//    and the contention count is non-zero exactly when some message was blocked inside
//    the network;
//  - when all inputs send to one output, exactly one is delivered per clock.
module tb_omega_net;
  localparam int LOGN = 6, N = 1 << LOGN, W = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]           vin, gnt, vout, rdy;
  logic [N-1:0][LOGN-1:0] dst;
  logic [N-1:0][W-1:0]    din, dout;
  logic [LOGN:0]          conf;

  omega_net dut (
    .clk(clk), .rst_n(rst_n), .valid_i(vin), .dest_i(dst), .data_i(din), .grant_o(gnt),
    .out_valid_o(vout), .out_data_o(dout), .out_ready_i(rdy), .conflict_o(conf)
  );

  int checks = 0, failures = 0, n_blocked = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // check the current clock's outputs against the inputs
  task automatic check_clock(output int delivered);
    bit seen [N];
    int arrived = 0;
    delivered = 0;
    for (int i = 0; i < N; i++) seen[i] = 0;
    for (int o = 0; o < N; o++) if (vout[o]) begin
      int s = dout[o] % N;
      arrived++;
      chk(dout[o] / N == 32'hA5 && vin[s] && dst[s] == o && !seen[s],
          $sformatf("output %0d carries a message not sent to it", o));
      seen[s] = 1;
      chk(gnt[s] == rdy[o], $sformatf("grant of input %0d", s));
    end
    for (int i = 0; i < N; i++) begin
      if (gnt[i]) delivered++;
      chk(!gnt[i] || (vin[i] && seen[i]), $sformatf("input %0d granted but not delivered", i));
    end
    chk((conf != 0) == (arrived < $countones(vin)), "contention count");
    if (arrived < $countones(vin)) n_blocked++;
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int i = 0; i < N; i++) din[i] = 32'hA5 * N + i;
    vin = '0; dst = '0; rdy = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // conflict-free permutations
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      vin = '1;
      for (int i = 0; i < N; i++) dst[i] = (i + k) % N;
      #1;
      check_clock(d);
      chk(d == N && conf == 0, $sformatf("shift by %0d: %0d of %0d delivered", k, d, N));
    end
    // single messages
    for (int t = 0; t < 500; t++) begin
      int s = $urandom % N;
      @(negedge clk);
      vin = '0; vin[s] = 1'b1; dst[s] = $urandom;
      #1;
      check_clock(d);
      chk(d == 1, $sformatf("lone message from %0d not delivered", s));
    end
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        vin[i] = ($urandom % 3) == 0;
        dst[i] = $urandom;
        rdy[i] = ($urandom % 5) != 0;
      end
      #1;
      check_clock(d);
    end
    // hot spot
    rdy = '1;
    for (int t = 0; t < 50; t++) begin
      @(negedge clk);
      vin = '1;
      for (int i = 0; i < N; i++) dst[i] = 6'd17;
      #1;
      check_clock(d);
      chk(d == 1, "hot spot: exactly one delivery per clock");
    end
    chk(n_blocked > 0, "no blocking seen");
    $display("blocked clocks=%0d", n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
