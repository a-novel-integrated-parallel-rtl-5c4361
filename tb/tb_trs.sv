// tb_trs: checks a Thread Reservation Station on random prologues.
//
// The test bench plays the SWB (alloc then thread a few clocks later), the stencil
// memory (a program array read combinationally at imem_addr_o), the memory system (a
// responder that grants after a random wait and answers after a random 1..8 clocks with
// a fixed function of the address) and the TEU (take after a random wait).
// Each thread runs a random mix of lui, add and lw ending in trs_halt; a reference
// interpreter computes the expected registers. Checks:
//  - registers at hand-over, a0 = seed, a1 = id, and the resume pc = halt pc + 4;
//  - rate: a prologue of n lui/add instructions reaches READY n+2 clocks after the
//    thread arrives (one clock to load the thread, then one per instruction including
//    trs_halt);
//  - an instruction outside the four raises illegal_o;
//  - a kill while a load is in flight keeps the TRS busy until the response has come
//    back and then returns it to IDLE; a kill in RUN returns it to IDLE at once.
module tb_trs;
  import npa_pkg::*;
  import sat_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  kill = 1'b0, alloc = 1'b0, idle, tv = 1'b0;
  thread_t               thr = '0;
  logic [31:0]           iaddr, idata;
  logic                  mqv, mqg = 1'b0, msv = 1'b0;
  mem_req_t              mq;
  logic [31:0]           msd = '0;
  logic                  rdy, take = 1'b0, busy, illegal;
  logic [31:0][31:0]     regs;
  logic [31:0]           pc;

  trs #(.PORT_ID(7)) dut (
    .clk(clk), .rst_n(rst_n), .kill_i(kill), .alloc_i(alloc), .idle_o(idle),
    .thr_valid_i(tv), .thr_i(thr), .imem_addr_o(iaddr), .imem_data_i(idata),
    .mreq_valid_o(mqv), .mreq_o(mq), .mreq_grant_i(mqg), .mrsp_valid_i(msv),
    .mrsp_data_i(msd), .ready_o(rdy), .regs_o(regs), .pc_o(pc), .take_i(take),
    .busy_o(busy), .illegal_o(illegal)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // program memory: 256 words at byte address 0
  logic [31:0] prog [256];
  assign idata = prog[iaddr[9:2]];

  function automatic logic [31:0] mem_val(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // memory responder
  bit rsp_pending = 0;
  logic [31:0] rsp_addr;
  initial begin
    forever begin
      @(negedge clk);
      if (mqv && !rsp_pending && ($urandom % 3) == 0) begin
        mqg = 1'b1;
        rsp_addr = mq.addr;
        chk(mq.op == MEM_LOAD && mq.src == 7, "request fields");
        @(negedge clk);
        mqg = 1'b0;
        rsp_pending = 1;
        repeat ($urandom % 8) @(negedge clk);
        msv = 1'b1;
        msd = mem_val(rsp_addr);
        @(negedge clk);
        msv = 1'b0;
        rsp_pending = 0;
      end
    end
  end

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // build a random prologue at word 'base'; returns expected registers via reference run
  int n_alu;
  task automatic make_prog(int base, int len, bit with_lw, logic [31:0] seed,
                           logic [31:0] tid, output logic [31:0] exp_r [32]);
    int p = base;
    for (int r = 0; r < 32; r++) exp_r[r] = 0;
    exp_r[10] = seed;
    exp_r[11] = tid;
    n_alu = 0;
    for (int k = 0; k < len; k++) begin
      int kind = with_lw ? $urandom % 3 : $urandom % 2;
      int rd = $urandom % 32, a = $urandom % 32, b = $urandom % 32;
      logic [31:0] imm20 = $urandom % (1 << 20);
      int off = int'($urandom % 64) * 4 - 128;
      case (kind)
        0: begin
          prog[p] = {imm20[19:0], 5'(rd), 7'b0110111};
          if (rd != 0) exp_r[rd] = {imm20[19:0], 12'b0};
          n_alu++;
        end
        1: begin
          prog[p] = enc_r(0, b, a, 0, rd, 7'b0110011);
          if (rd != 0) exp_r[rd] = exp_r[a] + exp_r[b];
          n_alu++;
        end
        default: begin
          prog[p] = enc_i(off, a, 2, rd, 7'b0000011);
          if (rd != 0) exp_r[rd] = mem_val(exp_r[a] + off);
        end
      endcase
      p++;
    end
    prog[p] = enc_i(0, 0, 1, 0, 7'b0001011);     // trs_halt
  endtask

  // dispatch one thread starting at word 'base'; returns clocks from arrival to READY
  task automatic dispatch(int base, logic [31:0] seed, logic [31:0] tid, output int clocks);
    @(negedge clk);
    chk(idle, "idle before dispatch");
    alloc = 1'b1;
    @(negedge clk);
    alloc = 1'b0;
    chk(!idle && busy, "allocated");
    repeat (3) @(negedge clk);
    tv = 1'b1;
    thr = '{seed: seed, tid: tid, label: 32'(4 * base)};
    @(negedge clk);
    tv = 1'b0;
    clocks = 1;
    while (!rdy && clocks < 5000) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  initial begin
    logic [31:0] er [32];
    int clocks, len;
    logic [31:0] sd, id;
    for (int i = 0; i < 256; i++) prog[i] = 32'h0000_0013;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // rate: straight-line lui/add
    for (int t = 0; t < 20; t++) begin
      len = 1 + $urandom % 30;
      sd = $urandom;
      make_prog(8, len, 1'b0, sd, t, er);
      dispatch(8, sd, t, clocks);
      chk(clocks == len + 2, $sformatf("%0d instructions took %0d clocks, expected %0d",
                                       len, clocks, len + 2));
      for (int r = 0; r < 32; r++) chk(regs[r] == er[r], $sformatf("x%0d", r));
      chk(pc == 4 * (8 + len) + 4, "resume pc");
      @(negedge clk);
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
    end

    // functional: with loads
    for (int t = 0; t < 200; t++) begin
      int base = $urandom % 100;
      len = 1 + $urandom % 40;
      sd = $urandom;
      id = $urandom;
      make_prog(base, len, 1'b1, sd, id, er);
      dispatch(base, sd, id, clocks);
      chk(rdy, "reached READY");
      for (int r = 0; r < 32; r++) chk(regs[r] == er[r], $sformatf("thread %0d x%0d", t, r));
      chk(pc == 4 * (base + len) + 4, "resume pc");
      repeat ($urandom % 4) @(negedge clk);
      chk(rdy && !idle, "holds READY until taken");
      take = 1'b1;
      @(negedge clk);
      take = 1'b0;
    end

    // unsupported instruction
    prog[40] = enc_i(5, 1, 0, 3, 7'b0010011);    // addi: not a TRS instruction
    prog[41] = enc_i(0, 0, 1, 0, 7'b0001011);
    @(negedge clk);
    alloc = 1'b1;
    @(negedge clk);
    alloc = 1'b0;
    tv = 1'b1;
    thr = '{seed: 1, tid: 2, label: 32'(4 * 40)};
    @(negedge clk);
    tv = 1'b0;
    chk(illegal, "illegal instruction flagged");
    repeat (2) @(negedge clk);
    chk(rdy, "skips the illegal instruction");
    take = 1'b1;
    @(negedge clk);
    take = 1'b0;

    // kill while a load is in flight
    prog[50] = enc_i(0, 0, 2, 5, 7'b0000011);    // lw x5, 0(x0)
    prog[51] = enc_i(0, 0, 1, 0, 7'b0001011);
    @(negedge clk);
    alloc = 1'b1;
    @(negedge clk);
    alloc = 1'b0;
    tv = 1'b1;
    thr = '{seed: 1, tid: 2, label: 32'(4 * 50)};
    @(negedge clk);
    tv = 1'b0;
    while (!rsp_pending) @(negedge clk);
    kill = 1'b1;
    @(negedge clk);
    kill = 1'b0;
    if (rsp_pending) begin
      chk(busy && !idle, "waits for the load in flight after kill");
      while (rsp_pending) @(negedge clk);
    end
    @(negedge clk);
    chk(idle && !rdy, "idle after the drained response");

    // kill in RUN
    prog[60] = enc_r(0, 0, 0, 0, 0, 7'b0110011);
    prog[61] = enc_r(0, 0, 0, 0, 0, 7'b0110011);
    prog[62] = enc_i(0, 0, 1, 0, 7'b0001011);
    @(negedge clk);
    alloc = 1'b1;
    @(negedge clk);
    alloc = 1'b0;
    tv = 1'b1;
    thr = '{seed: 1, tid: 2, label: 32'(4 * 60)};
    @(negedge clk);
    tv = 1'b0;
    kill = 1'b1;
    @(negedge clk);
    kill = 1'b0;
    chk(idle, "kill in RUN returns to IDLE");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
