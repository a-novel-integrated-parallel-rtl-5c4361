// tb_teu: checks the Thread Execution Unit against an instruction-level reference model.
//
// Each test is a random thread body: registers preset from a random start state
// (start_i hand-over) and a base register pointing at a data area, then a random mix
// of RV32I ALU (register and immediate forms, shifts, compares), lui/auipc, forward
// branches and jal, byte/half/word loads and stores, word AMOs and spawn instructions,
// ending with a conflict store and teu_halt. The test bench plays the stencil memory,
// the memory system (grants after a random wait, answers after a random delay, applies
// stores and atomics to its own memory array) and the Control Unit (accepts spawns
// after a random wait). A reference interpreter runs the same code on the same start
// state. Checks: final registers, final data memory, the sequence of spawn commands
// {seed, count, label}, one conflict pulse, the halt pulse, no unimplemented-instruction
// flag, and the rate: code of ALU/jump/branch instructions takes exactly one clock per
// executed instruction, teu_halt included. A kill during a memory access must leave the TEU busy until the
// response came back, then idle.
module tb_teu;
  import npa_pkg::*;
  import sat_prog_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              kill = 1'b0, start = 1'b0, idle;
  logic [31:0][31:0] sregs = '0;
  logic [31:0]       spc = '0, iaddr, idata;
  logic              mqv, mqg = 1'b0, msv = 1'b0;
  mem_req_t          mq;
  logic [31:0]       msd = '0;
  logic              spv, spr = 1'b0, conf, halt, illegal;
  spawn_t            sp;

  teu #(.PORT_ID(50)) dut (
    .clk(clk), .rst_n(rst_n), .kill_i(kill), .start_i(start), .start_regs_i(sregs),
    .start_pc_i(spc), .idle_o(idle), .imem_addr_o(iaddr), .imem_data_i(idata),
    .mreq_valid_o(mqv), .mreq_o(mq), .mreq_grant_i(mqg), .mrsp_valid_i(msv),
    .mrsp_data_i(msd), .spawn_valid_o(spv), .spawn_o(sp), .spawn_ready_i(spr),
    .conflict_o(conf), .halt_o(halt), .illegal_o(illegal)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [31:0] prog [256];
  assign idata = prog[iaddr[9:2]];

  localparam logic [31:0] DBASE = 32'h0000_2000;
  logic [31:0] dmem [64];      // data area DBASE .. DBASE+255 (memory system side)
  logic [31:0] rmem [64];      // reference copy

  // ---------------------------------------------------------------- memory system
  int n_conf = 0, n_halt = 0, n_ill = 0;
  spawn_t got_sp [$];
  bit rsp_pending = 0;
  always @(posedge clk) if (rst_n) begin
    if (conf) n_conf++;
    if (halt) n_halt++;
    if (illegal) n_ill++;
    if (spv && spr) got_sp.push_back(sp);
  end

  initial begin
    mem_req_t r;
    logic [31:0] old;
    forever begin
      @(negedge clk);
      spr = spv && ($urandom % 3 == 0);
      if (mqv && !rsp_pending && ($urandom % 2) == 0) begin
        mqg = 1'b1;
        r = mq;
        @(negedge clk);
        mqg = 1'b0;
        rsp_pending = 1;
        repeat ($urandom % 6) @(negedge clk);
        old = dmem[(r.addr - DBASE) >> 2];
        if (r.op == MEM_STORE)    dmem[(r.addr - DBASE) >> 2] = merge_bytes(old, r.wdata, r.wstrb);
        else if (r.op == MEM_AMO) dmem[(r.addr - DBASE) >> 2] = amo_apply(r.amo, old, r.wdata);
        msv = 1'b1;
        msd = old;
        @(negedge clk);
        msv = 1'b0;
        rsp_pending = 0;
      end
    end
  end

  // ---------------------------------------------------------------- reference
  function automatic logic [31:0] sext(logic [31:0] v, int bits);
    return 32'($signed(v << (32 - bits)) >>> (32 - bits));
  endfunction

  spawn_t exp_sp [$];
  int     exp_conf;

  int ref_steps;
  task automatic ref_run(logic [31:0] pc0, inout logic [31:0] x [32]);
    logic [31:0] pc = pc0;
    for (int steps = 0; steps < 1000; steps++) begin
      logic [31:0] i = prog[pc[9:2]];
      logic [6:0]  op = i[6:0];
      logic [2:0]  f3 = i[14:12];
      int          rd = i[11:7];
      logic [31:0] a = x[i[19:15]], b = x[i[24:20]];
      logic [31:0] ii = sext(i[31:20], 12);
      logic [31:0] is = sext({i[31:25], i[11:7]}, 12);
      logic [31:0] ib = sext({i[31], i[7], i[30:25], i[11:8], 1'b0}, 13);
      logic [31:0] ij = sext({i[31], i[19:12], i[20], i[30:21], 1'b0}, 21);
      logic [31:0] res = 0, npc = pc + 4, ea, w;
      bit          wr = 0;
      ref_steps = steps + 1;
      case (op)
        7'b0110111: begin res = {i[31:12], 12'b0}; wr = 1; end
        7'b0010111: begin res = pc + {i[31:12], 12'b0}; wr = 1; end
        7'b1101111: begin res = pc + 4; wr = 1; npc = pc + ij; end
        7'b1100011: begin
          bit t;
          case (f3)
            0: t = a == b;
            1: t = a != b;
            4: t = $signed(a) < $signed(b);
            5: t = $signed(a) >= $signed(b);
            6: t = a < b;
            default: t = a >= b;
          endcase
          if (t) npc = pc + ib;
        end
        7'b0010011, 7'b0110011: begin
          logic [31:0] o2 = (op == 7'b0010011) ? ii : b;
          bit alt = i[30] && (op == 7'b0110011 || f3 == 5);
          case (f3)
            0: res = alt ? a - o2 : a + o2;
            1: res = a << o2[4:0];
            2: res = 32'($signed(a) < $signed(o2));
            3: res = 32'(a < o2);
            4: res = a ^ o2;
            5: res = alt ? 32'($signed(a) >>> o2[4:0]) : a >> o2[4:0];
            6: res = a | o2;
            default: res = a & o2;
          endcase
          wr = 1;
        end
        7'b0000011: begin
          ea = a + ii;
          w = rmem[(ea - DBASE) >> 2] >> (8 * ea[1:0]);
          case (f3)
            0: res = sext(w, 8);
            1: res = sext(w, 16);
            4: res = w & 32'hFF;
            5: res = w & 32'hFFFF;
            default: res = w;
          endcase
          wr = 1;
        end
        7'b0100011: begin
          ea = a + is;
          if (ea == CONFLICT_ADDR) exp_conf++;
          else begin
            logic [3:0] m = (f3 == 0) ? 4'b0001 << ea[1:0] : (f3 == 1) ? 4'b0011 << ea[1:0] : 4'hF;
            rmem[(ea - DBASE) >> 2] = merge_bytes(rmem[(ea - DBASE) >> 2], b << (8 * ea[1:0]), m);
          end
        end
        7'b0101111: begin
          res = rmem[(a - DBASE) >> 2];
          rmem[(a - DBASE) >> 2] = amo_apply(amo_fn_e'(i[31:27]), res, b);
          wr = 1;
        end
        7'b0001011: begin
          if (f3 == 0) exp_sp.push_back('{seed: a, count: b, label: is});
          if (f3 == 2) return;
        end
        default: ;
      endcase
      if (wr && rd != 0) x[rd] = res;
      pc = npc;
    end
  endtask

  // ---------------------------------------------------------------- generator
  // x5 holds DBASE and is never written by the random code.
  function automatic int rreg();
    int r;
    do r = $urandom % 32; while (r == 5);
    return r;
  endfunction

  task automatic gen(int base, int len, bit simple_only);
    int p = base;
    while (p < base + len) begin
      int k = simple_only ? $urandom % 4 : $urandom % 9;
      int rd = rreg(), a = $urandom % 32, b = $urandom % 32;
      case (k)
        0: begin   // register ALU
          int f3 = $urandom % 8;
          int f7 = ((f3 == 0 || f3 == 5) && $urandom % 2) ? 32 : 0;
          prog[p++] = enc_r(f7, b, a, f3, rd, 7'b0110011);
        end
        1: begin   // immediate ALU
          int f3 = $urandom % 8;
          int imm = int'($urandom % 4096) - 2048;
          if (f3 == 1) imm = $urandom % 32;
          if (f3 == 5) imm = ($urandom % 32) | (($urandom % 2) ? 32'h400 : 0);
          prog[p++] = enc_i(imm, a, f3, rd, 7'b0010011);
        end
        2: begin   // forward branch over one instruction
          int f3s [6] = '{0, 1, 4, 5, 6, 7};
          prog[p++] = enc_b(8, b, a, f3s[$urandom % 6]);
          prog[p++] = enc_i(1, rd, 0, rd, 7'b0010011);
        end
        3: begin
          case ($urandom % 3)
            0: prog[p++] = {20'($urandom), 5'(rd), 7'b0110111};
            1: prog[p++] = {20'($urandom), 5'(rd), 7'b0010111};
            default: begin
              prog[p++] = enc_j(8, rd);
              prog[p++] = enc_i(3, rd, 0, rd, 7'b0010011);
            end
          endcase
        end
        4, 5: begin   // load
          int f3s [5] = '{0, 1, 2, 4, 5};
          int f3 = f3s[$urandom % 5];
          int off = (f3 == 2) ? 4 * ($urandom % 64) : (f3 % 4 == 1) ? 2 * ($urandom % 128)
                                                                    : $urandom % 256;
          prog[p++] = enc_i(off, 5, f3, rd, 7'b0000011);
        end
        6, 7: begin   // store
          int f3 = $urandom % 3;
          int off = (f3 == 2) ? 4 * ($urandom % 64) : (f3 == 1) ? 2 * ($urandom % 128)
                                                               : $urandom % 256;
          prog[p++] = enc_s(off, b, 5, f3, 7'b0100011);
        end
        default: begin
          if ($urandom % 2) begin   // amo on a word of the data area: address in x5 + 4*k
            int f5s [9] = '{0, 1, 4, 8, 12, 16, 20, 24, 28};
            prog[p++] = enc_i(4 * ($urandom % 64), 5, 0, 4, 7'b0010011);   // addi x4, x5, k
            prog[p++] = enc_r(f5s[$urandom % 9] << 2, b, 4, 2, rd, 7'b0101111);
          end else
            prog[p++] = enc_s(4 * ($urandom % 200), b, a, 0, OPC_NPA);        // spawn
        end
      endcase
    end
    if (!simple_only) prog[p++] = enc_s(-4, 0, 0, 2, 7'b0100011);              // conflict
    prog[p] = enc_i(0, 0, 2, 0, OPC_NPA);                                        // teu_halt
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_thread(int base, output int clocks);
    @(negedge clk);
    chk(idle, "idle before start");
    start = 1'b1;
    spc = 4 * base;
    @(negedge clk);
    start = 1'b0;
    clocks = 0;
    while (!idle && clocks < 20000) begin
      @(negedge clk);
      clocks++;
    end
  endtask

  initial begin
    logic [31:0] x [32];
    int clocks, c0, h0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // rate: only single-clock instructions
    for (int t = 0; t < 20; t++) begin
      for (int r = 0; r < 32; r++) sregs[r] = $urandom;
      sregs[5] = DBASE;
      for (int r = 0; r < 32; r++) x[r] = sregs[r];
      x[0] = 0;
      gen(16, 5 + $urandom % 40, 1'b1);
      ref_run(64, x);
      h0 = n_halt;
      run_thread(16, clocks);
      chk(clocks == ref_steps, $sformatf("%0d instructions took %0d clocks", ref_steps, clocks));
      chk(n_halt == h0 + 1, "halt pulse");
    end

    // function
    for (int t = 0; t < 300; t++) begin
      for (int w = 0; w < 64; w++) begin
        dmem[w] = $urandom;
        rmem[w] = dmem[w];
      end
      for (int r = 0; r < 32; r++) sregs[r] = $urandom;
      sregs[5] = DBASE;
      sregs[0] = 0;
      for (int r = 0; r < 32; r++) x[r] = sregs[r];
      gen(16, 10 + $urandom % 60, 1'b0);
      exp_sp.delete();
      got_sp.delete();
      exp_conf = 0;
      c0 = n_conf;
      ref_run(64, x);
      run_thread(16, clocks);
      chk(idle, "thread finished");
      for (int r = 0; r < 32; r++)
        chk(dut.rf_q[r] == x[r], $sformatf("test %0d x%0d = %h, expected %h", t, r, dut.rf_q[r], x[r]));
      for (int w = 0; w < 64; w++)
        chk(dmem[w] == rmem[w], $sformatf("test %0d word %0d", t, w));
      chk(got_sp.size() == exp_sp.size(), $sformatf("test %0d spawn count", t));
      foreach (exp_sp[k]) if (k < got_sp.size())
        chk(got_sp[k] == exp_sp[k], $sformatf("test %0d spawn %0d", t, k));
      chk(n_conf - c0 == exp_conf, "conflict pulse");
    end
    chk(n_ill == 0, "unimplemented instruction flagged");

    // illegal instruction (ecall) is flagged and skipped
    prog[200] = 32'h0000_0073;
    prog[201] = enc_i(0, 0, 2, 0, OPC_NPA);
    run_thread(200, clocks);
    chk(n_ill == 1 && clocks == 2, "ecall flagged and skipped");

    // kill during a load
    prog[210] = enc_i(0, 5, 2, 7, 7'b0000011);
    prog[211] = enc_i(0, 0, 2, 0, OPC_NPA);
    @(negedge clk);
    start = 1'b1;
    spc = 4 * 210;
    @(negedge clk);
    start = 1'b0;
    while (!rsp_pending) @(negedge clk);
    kill = 1'b1;
    @(negedge clk);
    kill = 1'b0;
    if (rsp_pending) begin
      chk(!idle, "waits for the access in flight after kill");
      while (rsp_pending) @(negedge clk);
    end
    @(negedge clk);
    chk(idle, "idle after kill");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
