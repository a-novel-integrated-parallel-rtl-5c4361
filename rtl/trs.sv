// trs: Thread Reservation Station, the lightweight load unit that runs the first part
// of a thread.
//
// A thread's code starts with a short straight-line prologue whose loads are the
// irregular, pointer-chasing ones (for unit propagation: finding the clause the thread
// works on). A TRS runs that prologue so that the thread reaches an execution unit only
// once its data is in registers. It executes just four instructions, as the document
// specifies: lui, add, lw and trs_halt. It has a full 32-entry RISC-V register file
// (x0 reads zero) that starts cleared except a0 = seed and a1 = thread id; that register
// convention is this design's choice. Any other instruction raises illegal_o for one
// clock and is skipped.
//
// States: IDLE (Idle bit visible to the SWB) -> ALLOC (a thread is granted and on its
// way through the dispatch link) -> RUN (one instruction per clock) -> MREQ/MWAIT (a lw
// in the memory system; one outstanding access) -> READY (trs_halt executed; the
// registers and the resume pc = halt pc + 4 wait for the cluster's TEU) -> IDLE when
// take_i moves the thread to the TEU.
//
// kill_i (conflict halt) returns the TRS to IDLE, except that a TRS whose load is
// already inside the memory system waits in DRAIN for that response and drops it, so
// that no stale response can reach a later thread.
//
// Interface: memory requests use valid/grant (the request is held until granted);
// responses arrive as a one-clock valid with data. Instruction fetch is a
// combinational read of the cluster's stencil memory at imem_addr_o.
module trs
  import npa_pkg::*;
#(
  parameter int unsigned PORT_ID = 0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        kill_i,
  // dispatch
  input  logic                        alloc_i,
  output logic                        idle_o,
  input  logic                        thr_valid_i,
  input  thread_t                     thr_i,
  // instruction fetch
  output logic [XLEN-1:0]             imem_addr_o,
  input  logic [XLEN-1:0]             imem_data_i,
  // memory port
  output logic                        mreq_valid_o,
  output mem_req_t                    mreq_o,
  input  logic                        mreq_grant_i,
  input  logic                        mrsp_valid_i,
  input  logic [XLEN-1:0]             mrsp_data_i,
  // hand-over to the TEU
  output logic                        ready_o,
  output logic [31:0][XLEN-1:0]       regs_o,
  output logic [XLEN-1:0]             pc_o,
  input  logic                        take_i,
  output logic                        busy_o,
  output logic                        illegal_o
);
  typedef enum logic [2:0] {S_IDLE, S_ALLOC, S_RUN, S_MREQ, S_MWAIT, S_READY, S_DRAIN} state_e;

  state_e                 state_q;
  logic [31:0][XLEN-1:0]  rf_q;
  logic [XLEN-1:0]        pc_q;
  logic [XLEN-1:0]        maddr_q;
  logic [4:0]             mrd_q;

  logic [31:0] ins;
  logic [6:0]  opc;
  logic [4:0]  rd, rs1, rs2;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [XLEN-1:0] v1, v2, imm_i;
  logic is_lui, is_add, is_lw, is_halt;

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
    is_lui  = (opc == 7'b0110111);
    is_add  = (opc == 7'b0110011) && (f3 == 3'd0) && (f7 == 7'd0);
    is_lw   = (opc == 7'b0000011) && (f3 == 3'b010);
    is_halt = (opc == OPC_NPA) && (f3 == F3_TRS_HALT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      maddr_q <= '0;
      mrd_q   <= '0;
      rf_q    <= '0;
    end else if (kill_i) begin
      state_q <= ((state_q == S_MWAIT || state_q == S_DRAIN) && !mrsp_valid_i) ? S_DRAIN :
                 (state_q == S_MREQ && mreq_grant_i)   ? S_DRAIN : S_IDLE;
    end else begin
      unique case (state_q)
        S_IDLE:  if (alloc_i) state_q <= S_ALLOC;
        S_ALLOC: if (thr_valid_i) begin
          rf_q           <= '0;
          rf_q[REG_SEED] <= thr_i.seed;
          rf_q[REG_TID]  <= thr_i.tid;
          pc_q           <= thr_i.label;
          state_q        <= S_RUN;
        end
        S_RUN: begin
          if (is_halt) begin
            pc_q    <= pc_q + 4;
            state_q <= S_READY;
          end else if (is_lw) begin
            maddr_q <= v1 + imm_i;
            mrd_q   <= rd;
            state_q <= S_MREQ;
          end else begin
            if (is_lui && rd != 5'd0) rf_q[rd] <= {ins[31:12], 12'b0};
            if (is_add && rd != 5'd0) rf_q[rd] <= v1 + v2;
            pc_q <= pc_q + 4;
          end
        end
        S_MREQ:  if (mreq_grant_i) state_q <= S_MWAIT;
        S_MWAIT: if (mrsp_valid_i) begin
          if (mrd_q != 5'd0) rf_q[mrd_q] <= mrsp_data_i;
          pc_q    <= pc_q + 4;
          state_q <= S_RUN;
        end
        S_READY: if (take_i) state_q <= S_IDLE;
        S_DRAIN: if (mrsp_valid_i) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    idle_o       = (state_q == S_IDLE);
    busy_o       = (state_q != S_IDLE);
    ready_o      = (state_q == S_READY);
    regs_o       = rf_q;
    pc_o         = pc_q;
    imem_addr_o  = pc_q;
    illegal_o    = (state_q == S_RUN) && !kill_i && !(is_lui || is_add || is_lw || is_halt);
    mreq_valid_o = (state_q == S_MREQ);
    mreq_o.op    = MEM_LOAD;
    mreq_o.amo   = AMO_ADD;
    mreq_o.addr  = maddr_q;
    mreq_o.wdata = '0;
    mreq_o.wstrb = '0;
    mreq_o.src   = PORT_W'(PORT_ID);
  end

endmodule
