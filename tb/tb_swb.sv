// tb_swb: checks the Spawn Waiting Buffer against a reference queue model.
//
// Default size (50 TRSs, 16 entries). Every clock the TRS Idle bits and an optional new
// spawn command (count 0..9) are random. The model keeps the pending commands in order
// and predicts, for the same clock, which idle TRSs are granted a thread (the lowest
// indexed idle TRSs, as many as there are idle TRSs or threads left in the two oldest
// commands) and which {seed, id, label} each one gets, and whether the buffer accepts
// the new command (not full). A phase with no idle TRS fills the buffer to check the
// full condition, and a flush is checked to empty it. Dispatch is checked to happen in
// the same clock the Idle bits are presented (the one-cycle prefix-sum dispatch).
module tb_swb;
  import npa_pkg::*;

  localparam int N = 50, DEPTH = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              flush = 1'b0, sv = 1'b0, sready, empty, dual;
  spawn_t            sp = '0;
  logic [N-1:0]      idle = '0, grant;
  thread_t [N-1:0]   thr;
  logic [$clog2(DEPTH+1)-1:0] used;

  swb dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush), .spawn_valid_i(sv), .spawn_i(sp),
    .spawn_ready_o(sready), .trs_idle_i(idle), .grant_o(grant), .thr_o(thr),
    .empty_o(empty), .used_o(used), .dual_o(dual)
  );

  int checks = 0, failures = 0, n_dual = 0, n_full = 0;
  spawn_t mq[$];        // pending commands
  int     mnext;        // next id of the head command

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // Evaluate this clock's expected behaviour and advance the model.
  task automatic step(bit allow_spawn, int idle_pct);
    int avail, n, r;
    for (int i = 0; i < N; i++) idle[i] = (($urandom % 100) < idle_pct);
    sv = allow_spawn && ($urandom % 2);
    sp.seed  = $urandom;
    sp.count = $urandom % 10;
    sp.label = {$urandom % 256, 2'b00};
    #1;
    avail = 0;
    if (mq.size() > 0) avail = mq[0].count - mnext;
    if (mq.size() > 1) avail += mq[1].count;
    n = $countones(idle);
    if (avail < n) n = avail;
    r = 0;
    for (int i = 0; i < N; i++) begin
      if (idle[i] && r < n) begin
        int e, id;
        if (r < mq[0].count - mnext) begin e = 0; id = mnext + r; end
        else begin e = 1; id = r - (mq[0].count - mnext); end
        chk(grant[i] && thr[i].seed == mq[e].seed && thr[i].tid == id &&
            thr[i].label == mq[e].label, $sformatf("TRS %0d thread (rank %0d)", i, r));
        r++;
      end else chk(!grant[i], $sformatf("TRS %0d granted unexpectedly", i));
    end
    chk(sready == (mq.size() < DEPTH), "spawn_ready");
    chk(empty == (mq.size() == 0), "empty");
    if (dual) n_dual++;
    if (!sready) n_full++;
    // advance the model
    mnext += n;
    while (mq.size() > 0 && mnext >= mq[0].count) begin
      mnext -= mq[0].count;
      void'(mq.pop_front());
    end
    if (sv && sready && sp.count != 0) mq.push_back(sp);
    @(posedge clk);
    #1;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mnext = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int t = 0; t < 400; t++) step(1, 10);
    for (int t = 0; t < 60; t++)  step(1, 0);      // no idle TRS: buffer fills
    for (int t = 0; t < 400; t++) step(1, 30);
    for (int t = 0; t < 40; t++)  step(1, 0);
    // flush empties the buffer
    sv = 1'b0;
    idle = '0;
    flush = 1'b1;
    @(posedge clk);
    #1 flush = 1'b0;
    mq.delete();
    mnext = 0;
    chk(empty, "flush empties the buffer");
    for (int t = 0; t < 200; t++) step(1, 20);
    chk(n_dual > 0, "no dispatch from two commands in one clock");
    chk(n_full > 0, "buffer never full");
    $display("dual=%0d full=%0d", n_dual, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
