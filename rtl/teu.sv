// teu: Thread Execution Unit, the in-order RISC-V core that runs the body of a thread.
//
// A thread arrives from a TRS of the same cluster with its registers and resume pc
// already holding the data its prologue fetched (start_i, one clock). The TEU then
// executes RV32I (loads and stores of byte, half and word, branches, jumps, ALU
// operations; fence is a no-op) plus the word AMOs of the RISC-V "A" extension
// (amoswap, amoadd, amoxor, amoand, amoor, amomin/max[u]) that serve as the hardware
// locks and atomic updates at the end of a thread, and the two accelerator
// instructions:
//   spawn rs1, rs2, label  - sends {seed = rs1, count = rs2, label} to the Control
//                            Unit and waits until it is accepted, then continues;
//   teu_halt               - ends the thread; the TEU is idle from the next clock.
// A store to CONFLICT_ADDR is not sent to memory; it raises conflict_o so that the
// Control Unit halts every thread (the SAT "conflict detected" exit). lr/sc, ecall,
// ebreak and CSR instructions are not implemented: they raise illegal_o and are skipped.
//
// Timing: instructions are fetched combinationally from the cluster's stencil memory;
// ALU, branch and jump instructions take one clock; loads, stores and AMOs hold a
// request until the Omega network grants it and then wait for the cache's response
// (one access outstanding). A non-pipelined one-instruction-per-clock core is this
// design's simplification of the document's "simple, in-order pipeline": most
// instructions take a single clock there too.
//
// kill_i (conflict halt) stops the thread at once; an access already inside the
// memory system is waited for in DRAIN and dropped.
module teu
  import npa_pkg::*;
#(
  parameter int unsigned PORT_ID = 50
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   kill_i,
  // thread hand-over from a TRS
  input  logic                   start_i,
  input  logic [31:0][XLEN-1:0]  start_regs_i,
  input  logic [XLEN-1:0]        start_pc_i,
  output logic                   idle_o,
  // instruction fetch
  output logic [XLEN-1:0]        imem_addr_o,
  input  logic [XLEN-1:0]        imem_data_i,
  // memory port
  output logic                   mreq_valid_o,
  output mem_req_t               mreq_o,
  input  logic                   mreq_grant_i,
  input  logic                   mrsp_valid_i,
  input  logic [XLEN-1:0]        mrsp_data_i,
  // nested spawn to the Control Unit
  output logic                   spawn_valid_o,
  output spawn_t                 spawn_o,
  input  logic                   spawn_ready_i,
  output logic                   conflict_o,
  output logic                   halt_o,      // teu_halt executed this clock
  output logic                   illegal_o
);
  typedef enum logic [2:0] {S_IDLE, S_RUN, S_MREQ, S_MWAIT, S_SPAWN, S_DRAIN} state_e;

  state_e                 state_q;
  logic [31:0][XLEN-1:0]  rf_q;
  logic [XLEN-1:0]        pc_q;
  mem_req_t               req_q;
  logic [4:0]             mrd_q;
  logic [2:0]             mf3_q;
  logic                   mwb_q;     // response is written to a register
  spawn_t                 spawn_q;

  // ---------------------------------------------------------------- decode
  logic [31:0] ins;
  logic [6:0]  opc, f7;
  logic [4:0]  rd, rs1, rs2;
  logic [2:0]  f3;
  logic [XLEN-1:0] v1, v2, imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    ins   = imem_data_i;
    opc   = ins[6:0];
    rd    = ins[11:7];
    f3    = ins[14:12];
    rs1   = ins[19:15];
    rs2   = ins[24:20];
    f7    = ins[31:25];
    v1    = (rs1 == 5'd0) ? '0 : rf_q[rs1];
    v2    = (rs2 == 5'd0) ? '0 : rf_q[rs2];
    imm_i = {{20{ins[31]}}, ins[31:20]};
    imm_s = {{20{ins[31]}}, ins[31:25], ins[11:7]};
    imm_b = {{19{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
    imm_u = {ins[31:12], 12'b0};
    imm_j = {{11{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
  end

  function automatic logic [XLEN-1:0] alu(logic [2:0] fn, logic alt, logic [XLEN-1:0] a,
                                          logic [XLEN-1:0] b);
    unique case (fn)
      3'd0: return alt ? a - b : a + b;
      3'd1: return a << b[4:0];
      3'd2: return XLEN'($signed(a) < $signed(b));
      3'd3: return XLEN'(a < b);
      3'd4: return a ^ b;
      3'd5: return alt ? XLEN'($signed(a) >>> b[4:0]) : a >> b[4:0];
      3'd6: return a | b;
      default: return a & b;
    endcase
  endfunction

  function automatic logic take_branch(logic [2:0] fn, logic [XLEN-1:0] a, logic [XLEN-1:0] b);
    unique case (fn)
      3'd0: return a == b;
      3'd1: return a != b;
      3'd4: return $signed(a) < $signed(b);
      3'd5: return $signed(a) >= $signed(b);
      3'd6: return a < b;
      3'd7: return a >= b;
      default: return 1'b0;
    endcase
  endfunction

  // Load data extraction from the returned word.
  function automatic logic [XLEN-1:0] load_ext(logic [2:0] fn, logic [1:0] off,
                                               logic [XLEN-1:0] w);
    logic [15:0] s;
    s = 16'(w >> (8 * off));
    unique case (fn)
      3'd0: return {{24{s[7]}}, s[7:0]};
      3'd1: return {{16{s[15]}}, s[15:0]};
      3'd4: return {24'b0, s[7:0]};
      3'd5: return {16'b0, s[15:0]};
      default: return w;
    endcase
  endfunction

  // Classification of the instruction at pc.
  logic is_lui, is_auipc, is_jal, is_jalr, is_br, is_ld, is_st, is_opi, is_op, is_fence;
  logic is_amo, is_spawn, is_halt, legal;
  logic [XLEN-1:0] ea;
  always_comb begin
    is_lui   = (opc == 7'b0110111);
    is_auipc = (opc == 7'b0010111);
    is_jal   = (opc == 7'b1101111);
    is_jalr  = (opc == 7'b1100111) && (f3 == 3'd0);
    is_br    = (opc == 7'b1100011) && (f3 != 3'd2) && (f3 != 3'd3);
    is_ld    = (opc == 7'b0000011) && (f3 inside {3'd0, 3'd1, 3'd2, 3'd4, 3'd5});
    is_st    = (opc == 7'b0100011) && (f3 inside {3'd0, 3'd1, 3'd2});
    is_opi   = (opc == 7'b0010011);
    is_op    = (opc == 7'b0110011) && (f7 == 7'd0 || (f7 == 7'b0100000 && (f3 == 3'd0 || f3 == 3'd5)));
    is_fence = (opc == 7'b0001111);
    is_amo   = (opc == 7'b0101111) && (f3 == 3'b010) &&
               (ins[31:27] inside {AMO_ADD, AMO_SWAP, AMO_XOR, AMO_OR, AMO_AND,
                                   AMO_MIN, AMO_MAX, AMO_MINU, AMO_MAXU});
    is_spawn = (opc == OPC_NPA) && (f3 == F3_SPAWN);
    is_halt  = (opc == OPC_NPA) && (f3 == F3_TEU_HALT);
    legal    = is_lui | is_auipc | is_jal | is_jalr | is_br | is_ld | is_st | is_opi |
               is_op | is_fence | is_amo | is_spawn | is_halt;
    ea       = v1 + (is_st ? imm_s : (is_amo ? '0 : imm_i));
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rf_q    <= '0;
      pc_q    <= '0;
      req_q   <= '0;
      mrd_q   <= '0;
      mf3_q   <= '0;
      mwb_q   <= 1'b0;
      spawn_q <= '0;
    end else if (kill_i) begin
      state_q <= ((state_q == S_MWAIT || state_q == S_DRAIN) && !mrsp_valid_i) ? S_DRAIN :
                 (state_q == S_MREQ && mreq_grant_i)   ? S_DRAIN : S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_i) begin
          rf_q    <= start_regs_i;
          rf_q[0] <= '0;
          pc_q    <= start_pc_i;
          state_q <= S_RUN;
        end
        S_RUN: begin
          pc_q <= pc_q + 4;
          if (is_lui   && rd != 0) rf_q[rd] <= imm_u;
          if (is_auipc && rd != 0) rf_q[rd] <= pc_q + imm_u;
          if (is_opi   && rd != 0) rf_q[rd] <= alu(f3, (f3 == 3'd5) && ins[30], v1, imm_i);
          if (is_op    && rd != 0) rf_q[rd] <= alu(f3, ins[30], v1, v2);
          if ((is_jal || is_jalr) && rd != 0) rf_q[rd] <= pc_q + 4;
          if (is_jal)  pc_q <= pc_q + imm_j;
          if (is_jalr) pc_q <= (v1 + imm_i) & ~XLEN'(1);
          if (is_br && take_branch(f3, v1, v2)) pc_q <= pc_q + imm_b;
          if (is_halt) state_q <= S_IDLE;
          if (is_spawn) begin
            spawn_q.seed  <= v1;
            spawn_q.count <= v2;
            spawn_q.label <= imm_s;
            state_q       <= S_SPAWN;
          end
          if ((is_ld || is_st || is_amo) && !(is_st && ea == CONFLICT_ADDR)) begin
            req_q.op    <= is_ld ? MEM_LOAD : (is_st ? MEM_STORE : MEM_AMO);
            req_q.amo   <= amo_fn_e'(ins[31:27]);
            req_q.addr  <= ea;
            req_q.wdata <= is_st ? (v2 << (8 * ea[1:0])) : v2;
            req_q.wstrb <= (f3[1:0] == 2'd0) ? (4'b0001 << ea[1:0]) :
                           (f3[1:0] == 2'd1) ? (4'b0011 << ea[1:0]) : 4'b1111;
            req_q.src   <= PORT_W'(PORT_ID);
            mrd_q       <= rd;
            mf3_q       <= is_amo ? 3'd2 : f3;
            mwb_q       <= !is_st;
            pc_q        <= pc_q;
            state_q     <= S_MREQ;
          end
        end
        S_MREQ:  if (mreq_grant_i) state_q <= S_MWAIT;
        S_MWAIT: if (mrsp_valid_i) begin
          if (mwb_q && mrd_q != 0) rf_q[mrd_q] <= load_ext(mf3_q, req_q.addr[1:0], mrsp_data_i);
          pc_q    <= pc_q + 4;
          state_q <= S_RUN;
        end
        S_SPAWN: if (spawn_ready_i) state_q <= S_RUN;   // pc already advanced
        S_DRAIN: if (mrsp_valid_i) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    idle_o        = (state_q == S_IDLE);
    imem_addr_o   = pc_q;
    mreq_valid_o  = (state_q == S_MREQ);
    mreq_o        = req_q;
    spawn_valid_o = (state_q == S_SPAWN);
    spawn_o       = spawn_q;
    conflict_o    = (state_q == S_RUN) && !kill_i && is_st && (ea == CONFLICT_ADDR);
    halt_o        = (state_q == S_RUN) && !kill_i && is_halt;
    illegal_o     = (state_q == S_RUN) && !kill_i && !legal;
  end

endmodule
