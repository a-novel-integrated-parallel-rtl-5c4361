// tb_trs_cluster: checks one cluster (5 TRSs, one TEU, stencil memory) at its defaults.
//
// The test bench loads a two-part thread into the stencil memory: the TRS part loads a
// word chosen by the seed and builds a counter address, the TEU part adds the loaded
// word to the counter with amoadd.w, spawns {seed, id, label} and ends. It then plays
// the SWB and dispatch link (allocates idle TRSs at random, sends each thread 5 clocks
// later), the memory system for the six memory ports (random grant wait and response
// delay, shared memory array) and the Control Unit (accepts spawns after a random
// wait). Checks:
//  - every thread runs exactly once: the counter equals the sum of all loaded words,
//    one spawn per thread carries that thread's seed and id, one halt per thread;
//  - hand-over: in every clock in which some TRS is ready and the TEU is idle, a thread
//    moves to the TEU in that clock;
//  - a ready thread waiting for the busy TEU happens, and every TRS runs threads;
//  - busy_o is clear once all threads are done.
module tb_trs_cluster;
  import npa_pkg::*;
  import sat_prog_pkg::*;

  localparam int K = 5, NTHR = 300;
  localparam logic [31:0] CNT_ADDR = 32'h0000_8000, DATA_BASE = 32'h0000_4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0]          alloc = '0, idle, tv = '0;
  thread_t [K-1:0]       thr = '0;
  logic [K:0]            mqv, mqg = '0, msv = '0;
  mem_req_t [K:0]        mq;
  logic [K:0][31:0]      msd = '0;
  logic                  spv, spr = 1'b0, conf, iwe = 1'b0, busy, waitv, sched, halt, ill;
  spawn_t                sp;
  logic [7:0]            iwa = '0;
  logic [31:0]           iwd = '0;

  trs_cluster dut (
    .clk(clk), .rst_n(rst_n), .kill_i(1'b0), .alloc_i(alloc), .idle_o(idle),
    .thr_valid_i(tv), .thr_i(thr), .mreq_valid_o(mqv), .mreq_o(mq), .mreq_grant_i(mqg),
    .mrsp_valid_i(msv), .mrsp_data_i(msd), .spawn_valid_o(spv), .spawn_o(sp),
    .spawn_ready_i(spr), .conflict_o(conf), .imem_we_i(iwe), .imem_waddr_i(iwa),
    .imem_wdata_i(iwd), .busy_o(busy), .wait_o(waitv), .sched_o(sched), .halt_o(halt),
    .illegal_o(ill)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // ---------------------------------------------------------------- memory system
  logic [31:0] mem [int];
  function automatic logic [31:0] rd(logic [31:0] a);
    if (!mem.exists(a >> 2)) mem[a >> 2] = (a * 32'h0101_0101) ^ 32'h00C0_FFEE;
    return mem[a >> 2];
  endfunction

  for (genvar p = 0; p <= K; p++) begin : g_port
    initial begin
      mem_req_t r;
      logic [31:0] old;
      forever begin
        @(negedge clk);
        if (mqv[p] && ($urandom % 2) == 0) begin
          mqg[p] = 1'b1;
          r = mq[p];
          chk(r.src == ((p == K) ? 50 : p), "request carries its port number");
          @(negedge clk);
          mqg[p] = 1'b0;
          repeat ($urandom % 10) @(negedge clk);
          old = rd(r.addr);
          if (r.op == MEM_STORE)    mem[r.addr >> 2] = merge_bytes(old, r.wdata, r.wstrb);
          else if (r.op == MEM_AMO) mem[r.addr >> 2] = amo_apply(r.amo, old, r.wdata);
          msv[p] = 1'b1;
          msd[p] = old;
          @(negedge clk);
          msv[p] = 1'b0;
        end
      end
    end
  end

  // ---------------------------------------------------------------- Control Unit side
  int n_halt = 0, n_sched = 0, n_wait = 0, n_ill = 0;
  logic [63:0] spawn_sum = 0, exp_spawn_sum = 0;
  int n_spawn = 0, per_trs [K];
  always @(posedge clk) if (rst_n) begin
    if (halt) n_halt++;
    if (sched) begin
      n_sched++;
      per_trs[dut.pick]++;
    end
    if (waitv) n_wait++;
    if (ill) n_ill++;
    if (spv && spr) begin
      n_spawn++;
      spawn_sum += {sp.seed, sp.count} ^ {32'h0, sp.label};
    end
    if (dut.ready != '0 && dut.teu_idle) begin
      checks++;
      if (!sched) begin
        failures++;
        $display("FAIL: ready thread not handed to the idle TEU");
      end
    end
  end
  always @(negedge clk) spr = spv && ($urandom % 4 == 0);

  // ---------------------------------------------------------------- thread code
  asm_t a;
  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sent = 0;
    int cd [K];
    logic [63:0] exp_cnt = 0;
    for (int k = 0; k < K; k++) begin
      cd[k] = -1;
      per_trs[k] = 0;
    end
    a = new();
    // TRS part: x12 = mem[x10]; x13 = CNT_ADDR
    a.lw(12, 0, 10);
    a.lui(13, CNT_ADDR >> 12);
    a.trs_halt();
    // TEU part
    a.amo(0, 0, 12, 13);            // amoadd.w x0, x12, (x13)
    a.label("child");
    a.spawn(10, 11, "child");
    a.teu_halt();
    mem[CNT_ADDR >> 2] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (a.code[i]) begin
      @(negedge clk);
      iwe = 1'b1; iwa = 8'(i); iwd = a.code[i];
    end
    @(negedge clk);
    iwe = 1'b0;

    while (sent < NTHR || busy || cd.sum() with (int'(item >= 0)) != 0) begin
      @(negedge clk);
      alloc = '0;
      tv = '0;
      for (int k = 0; k < K; k++) begin
        if (cd[k] == 0) begin
          logic [31:0] seed = DATA_BASE + 4 * ($urandom % 1024);
          tv[k] = 1'b1;
          thr[k] = '{seed: seed, tid: sent, label: 32'h0};
          exp_cnt += rd(seed);
          exp_spawn_sum += {seed, 32'(sent)} ^ {32'h0, 32'(a.at("child"))};
          sent++;
        end
        if (cd[k] >= 0) cd[k]--;
        else if (idle[k] && sent + (cd.sum() with (int'(item >= 0))) < NTHR && ($urandom % 2)) begin
          alloc[k] = 1'b1;
          cd[k] = 5;
        end
      end
      if (sent >= NTHR && !busy) break;
    end
    @(negedge clk);
    chk(mem[CNT_ADDR >> 2] == exp_cnt[31:0], "counter equals the sum of the loaded words");
    chk(n_halt == NTHR && n_sched == NTHR && n_spawn == NTHR,
        $sformatf("halts %0d, hand-overs %0d, spawns %0d, expected %0d", n_halt, n_sched,
                  n_spawn, NTHR));
    chk(spawn_sum == exp_spawn_sum, "spawned commands");
    chk(n_wait > 0, "no ready thread ever waited for the TEU");
    for (int k = 0; k < K; k++) chk(per_trs[k] > 0, $sformatf("TRS %0d never used", k));
    chk(n_ill == 0 && !conf, "no illegal instruction or conflict");
    $display("threads=%0d waits=%0d per TRS %0d %0d %0d %0d %0d", NTHR, n_wait, per_trs[0],
             per_trs[1], per_trs[2], per_trs[3], per_trs[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
