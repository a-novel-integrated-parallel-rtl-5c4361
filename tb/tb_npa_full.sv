// tb_npa_full: the accelerator at its default size (10 TEUs x 5 TRSs, 16-entry SWB,
// 1 MB 8-way 8-bank cache, 100-clock main memory) running join-free parallel unit
// propagation on random CNF formulas, checked against a serial reference: the verdict,
// and without a conflict every variable's final value. It also checks the SWB-to-TRS
// transfer time (LINK_LAT clocks) and that no unit meets an unimplemented instruction,
// and reports the clocks each propagation took. A burst of empty threads first fills
// the SWB. Every mechanism of the top-level test is required to occur here too, except
// dirty write-backs: the formulas used fit many times over in the 1 MB cache, so no
// dirty line is ever evicted at this size (the scaled-down top-level test covers it).
module tb_npa_full;
  import npa_pkg::*;
  import sat_prog_pkg::*;

  localparam int LINK_LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic            cpu_spawn_valid = 1'b0, cpu_spawn_ready;
  spawn_t          cpu_spawn = '0;
  logic            busy, done, conflict, illegal;
  logic            mreq_valid = 1'b0, mreq_grant, mrsp_valid;
  mem_req_t        mreq = '0;
  logic [31:0]     mrsp_data;
  logic            code_we = 1'b0;
  logic [7:0]      code_addr = '0;
  logic [31:0]     code_data = '0;
  npa_events_t     ev;
  logic [4:0]      swb_used;
  logic            range_err;

  npa_top dut (
    .clk              (clk),
    .rst_n            (rst_n),
    .cpu_spawn_valid_i(cpu_spawn_valid),
    .cpu_spawn_i      (cpu_spawn),
    .cpu_spawn_ready_o(cpu_spawn_ready),
    .busy_o           (busy),
    .done_o           (done),
    .conflict_o       (conflict),
    .cpu_mreq_valid_i (mreq_valid),
    .cpu_mreq_i       (mreq),
    .cpu_mreq_grant_o (mreq_grant),
    .cpu_mrsp_valid_o (mrsp_valid),
    .cpu_mrsp_data_o  (mrsp_data),
    .code_we_i        (code_we),
    .code_addr_i      (code_addr),
    .code_data_i      (code_data),
    .illegal_o        (illegal),
    .events_o         (ev),
    .swb_used_o       (swb_used),
    .mem_range_err_o  (range_err)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- event counters
  int n_swb_full, n_multi, n_dual, n_wait, n_nested, n_kill, n_hit, n_miss, n_wb, n_queued;
  int n_omega, n_illegal, n_range, max_used;
  always @(posedge clk) if (rst_n) begin
    if (ev.swb_full) n_swb_full++;
    if (ev.multi) n_multi++;
    if (ev.dual) n_dual++;
    if (ev.teu_wait) n_wait++;
    if (ev.nested) n_nested++;
    if (ev.kill) n_kill++;
    if (ev.req_blocked || ev.rsp_blocked) n_omega++;
    if (ev.hit) n_hit++;
    if (ev.miss) n_miss++;
    if (ev.writeback) n_wb++;
    if (ev.queued) n_queued++;
    if (illegal) n_illegal++;
    if (range_err) n_range++;
    if (swb_used > max_used) max_used = swb_used;
  end

  // Dispatch latency: a thread granted in clock t arrives at its TRS in t+LINK_LAT.
  longint cyc = 0;
  longint grant_t [50];
  int lat_checked = 0, lat_bad = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int i = 0; i < 50; i++) begin
      if (dut.lnk_valid[i]) begin
        lat_checked++;
        if (cyc - grant_t[i] != LINK_LAT) lat_bad++;
      end
      if (dut.grant[i]) grant_t[i] = cyc;
    end
  end

  // ---------------------------------------------------------------- CPU port
  task automatic cpu_access(mem_op_e op, logic [31:0] addr, logic [31:0] wdata,
                            output logic [31:0] rdata);
    mreq.op    = op;
    mreq.amo   = AMO_ADD;
    mreq.addr  = addr;
    mreq.wdata = wdata;
    mreq.wstrb = 4'hF;
    mreq.src   = '0;
    mreq_valid = 1'b1;
    do @(posedge clk); while (!mreq_grant);
    #1 mreq_valid = 1'b0;
    while (!mrsp_valid) @(posedge clk);
    rdata = mrsp_data;
    #1;
  endtask

  task automatic cpu_write(logic [31:0] addr, logic [31:0] data);
    logic [31:0] d;
    cpu_access(MEM_STORE, addr, data, d);
  endtask

  task automatic cpu_spawn_cmd(logic [31:0] seed, logic [31:0] count, logic [31:0] label);
    cpu_spawn = '{seed: seed, count: count, label: label};
    cpu_spawn_valid = 1'b1;
    do @(posedge clk); while (!cpu_spawn_ready);
    #1 cpu_spawn_valid = 1'b0;
  endtask

  // ---------------------------------------------------------------- one SAT round
  asm_t prog;
  int   rounds_conflict = 0, rounds_sat = 0;

  task automatic run_round(int nv, int nc, int nu, int unsigned seed);
    cnf_t f;
    int   ref_val[];
    bit   ref_conf;
    logic [31:0] d;
    longint t0;
    int   mism;
    f = new();
    f.generate_cnf(nv, nc, nu, seed);
    f.build_image();
    ref_conf = f.reference(ref_val);
    foreach (f.image[a]) cpu_write(a, f.image[a]);
    t0 = cyc;
    foreach (f.units[k]) cpu_spawn_cmd(f.units[k], 1, prog.lbl["prop"]);
    repeat (3) @(posedge clk);
    while (busy) @(posedge clk);
    #1;
    check(conflict == ref_conf, $sformatf("round seed %0d: verdict %0d, expected %0d",
                                          seed, conflict, ref_conf));
    if (ref_conf) rounds_conflict++;
    else begin
      rounds_sat++;
      mism = 0;
      for (int v = 0; v < nv; v++) begin
        cpu_access(MEM_LOAD, VAL_BASE + 4*v, 0, d);
        if (d != ref_val[v]) mism++;
      end
      check(mism == 0, $sformatf("round seed %0d: %0d variable values differ", seed, mism));
    end
    $display("round seed=%0d vars=%0d clauses=%0d units=%0d conflict=%0d clocks=%0d",
             seed, nv, nc, nu, ref_conf, cyc - t0);
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50; i++) grant_t[i] = 0;
    prog = assemble();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    foreach (prog.code[i]) begin
      code_we = 1'b1;
      code_addr = 8'(i);
      code_data = prog.code[i];
      @(posedge clk);
    end
    #1 code_we = 1'b0;

    // dispatcher burst: 40 commands of 20 empty threads, faster than 10 TEUs retire them
    for (int k = 0; k < 40; k++) cpu_spawn_cmd(k, 20, prog.lbl["nop"]);
    repeat (3) @(posedge clk);
    while (busy) @(posedge clk);
    #1;

    // propagation rounds until both verdicts have been seen
    for (int r = 0; r < 8 && (r < 3 || rounds_conflict == 0 || rounds_sat == 0); r++)
      run_round(96 + 32 * (r % 3), 200 + 60 * (r % 4), 2 + 2 * (r % 3), 300 + r);

    check(lat_checked > 0 && lat_bad == 0,
          $sformatf("dispatch latency: %0d of %0d wrong", lat_bad, lat_checked));
    check(n_illegal == 0, "unimplemented instruction met");
    check(n_range == 0, "access beyond main memory");
    check(rounds_conflict > 0, "no round ended in a conflict");
    check(rounds_sat > 0, "no round ended without a conflict");
    check(n_swb_full > 0 && max_used == 16, "SWB never full");
    check(n_multi > 0,    "never more than one thread dispatched in a clock");
    check(n_dual > 0,     "never dispatched from two spawn entries in a clock");
    check(n_wait > 0,     "ready thread never waited for a busy TEU");
    check(n_nested > 0,   "no nested spawn from a TEU");
    check(n_kill > 0,     "no conflict halt");
    check(n_hit > 0,      "no cache hit");
    check(n_miss > 0,     "no cache miss");
    check(n_queued > 0,   "no bank queuing");
    check(n_omega > 0,    "no Omega switch contention");
    $display("events: swb_full=%0d multi=%0d dual=%0d wait=%0d nested=%0d kill=%0d hit=%0d miss=%0d wb=%0d queued=%0d omega=%0d",
             n_swb_full, n_multi, n_dual, n_wait, n_nested, n_kill, n_hit, n_miss, n_wb,
             n_queued, n_omega);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
