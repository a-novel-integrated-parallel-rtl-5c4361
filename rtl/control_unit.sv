// control_unit: the accelerator's Control Unit (CU).
//
// The CU sits between the host CPU and the accelerator. It collects spawn commands from
// the CPU and from every TEU (nested spawns) and forwards them, one per clock, to the
// Spawn Waiting Buffer; when the SWB is full the selected requester simply waits, which
// suspends further spawning until space frees up. It watches the status of the SWB, the
// dispatch link and every cluster (TRSs and TEU) and reports the accelerator busy while
// any thread exists anywhere, so that the CPU can "wait until no threads exist" and
// then read the verdict. A conflict signal from any TEU sets the verdict to FALSE and
// issues a one-clock kill that empties the SWB and the link and stops every TRS and TEU
// (units with a memory access in flight drain it first and stay busy until then).
//
// Choices of this design where the document gives only the CU's duties: round-robin
// among the TEUs with the CPU as one more requester, one spawn forwarded per clock, and
// the conflict flag cleared by the first CPU spawn accepted while the accelerator is idle.
//
// Interface: valid/ready spawn handshakes on every side; busy_o, done_o (one-clock
// pulse when the accelerator turns idle), conflict_o (sticky verdict), kill_o.
module control_unit
  import npa_pkg::*;
#(
  parameter int unsigned N_TEU = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // CPU side
  input  logic                cpu_spawn_valid_i,
  input  spawn_t              cpu_spawn_i,
  output logic                cpu_spawn_ready_o,
  output logic                busy_o,
  output logic                done_o,
  output logic                conflict_o,
  // TEU side
  input  logic [N_TEU-1:0]    teu_spawn_valid_i,
  input  spawn_t [N_TEU-1:0]  teu_spawn_i,
  output logic [N_TEU-1:0]    teu_spawn_ready_o,
  input  logic [N_TEU-1:0]    teu_conflict_i,
  // SWB side
  output logic                swb_valid_o,
  output spawn_t              swb_spawn_o,
  input  logic                swb_ready_i,
  // status
  input  logic                swb_empty_i,
  input  logic                link_busy_i,
  input  logic [N_TEU-1:0]    cluster_busy_i,
  output logic                kill_o
);
  localparam int unsigned NR = N_TEU + 1;            // requester N_TEU is the CPU
  localparam int unsigned RW = $clog2(NR);

  logic [NR-1:0]   req;
  spawn_t [NR-1:0] cmd;
  logic [RW-1:0]   rr_q, sel;
  logic            any;
  logic            busy_q, conflict_q, kill_q;
  logic            active;

  always_comb begin
    req = {cpu_spawn_valid_i && !kill_q, teu_spawn_valid_i & {N_TEU{!kill_q}}};
    cmd = {cpu_spawn_i, teu_spawn_i};
    any = 1'b0;
    sel = '0;
    for (int j = 0; j < NR; j++) begin
      logic [RW-1:0] idx;
      idx = RW'((32'(rr_q) + j) % NR);
      if (!any && req[idx]) begin
        any = 1'b1;
        sel = idx;
      end
    end
    swb_valid_o = any;
    swb_spawn_o = cmd[sel];
    {cpu_spawn_ready_o, teu_spawn_ready_o} = '0;
    if (any && swb_ready_i) begin
      if (32'(sel) == N_TEU) cpu_spawn_ready_o = 1'b1;
      else                   teu_spawn_ready_o[sel] = 1'b1;
    end
    active = !swb_empty_i || link_busy_i || (cluster_busy_i != '0) || any;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q       <= '0;
      busy_q     <= 1'b0;
      conflict_q <= 1'b0;
      kill_q     <= 1'b0;
    end else begin
      if (any && swb_ready_i) rr_q <= RW'((32'(sel) + 1) % NR);
      busy_q <= active;
      kill_q <= (teu_conflict_i != '0) && !kill_q;
      if (teu_conflict_i != '0)                            conflict_q <= 1'b1;
      else if (cpu_spawn_ready_o && !busy_q)                conflict_q <= 1'b0;
    end
  end

  always_comb begin
    busy_o     = busy_q;
    done_o     = busy_q && !active;
    conflict_o = conflict_q;
    kill_o     = kill_q;
  end

endmodule
