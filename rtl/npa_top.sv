// npa_top: the Nested Parallel Accelerator (NPA) attached to a host CPU.
//
// The NPA runs fine-grained, irregular, recursively spawned threads without joins: a
// thread that spawns children does not wait for them; it simply ends, and the host only
// waits until no thread exists anywhere. The host CPU (outside this block) issues spawn
// commands and then watches busy_o/done_o; threads running on the accelerator issue
// further spawns themselves.
//
// Path of a thread:
//   CPU or TEU spawn -> Control Unit -> Spawn Waiting Buffer (pending spawn commands)
//   -> prefix-sum dispatch, one thread to every idle TRS per clock
//   -> dispatch link (LINK_LAT clocks) -> Thread Reservation Station: runs the
//      lui/add/lw prologue that fetches the thread's irregular data, ends with trs_halt
//   -> the cluster's Thread Execution Unit, once it is free: runs the RV32I+AMO body,
//      may spawn, ends with teu_halt.
// The CPU port, every TRS and every TEU reach the N_BANKS banks of the shared cache
// through an Omega network (requests) and a second Omega network (responses); each
// cache bank is backed by its own main-memory bank.
//
// Memory-port numbering (the response tag): TRS t of cluster c is port c*TRS_PER_TEU+t,
// TEU c is port N_TRS+c, the CPU is port N_TRS+N_TEU. Bank b sits at Omega position
// b*(2**LOGN/N_BANKS), spreading the banks over the network's outputs.
//
// Defaults follow the document's main configuration: 10 TEUs with 5 TRSs each, a
// 5-clock SWB-to-TRS transfer, a 1 MB 8-way cache in 8 banks with a 5-clock access and
// a 100-clock 8-bank main memory. SWB depth, line size, stencil-memory size and
// main-memory capacity are this design's choices.
//
// Interface (all synchronous to clk, active-low asynchronous reset):
//   cpu_spawn_*   spawn command from the CPU (valid/ready)
//   busy_o        some thread, pending spawn or dispatch exists; done_o pulses when it ends
//   conflict_o    a thread signalled a conflict; all threads were halted
//   cpu_mreq_*/cpu_mrsp_*  the CPU's port into the shared cache (one access outstanding)
//   code_we_i/...  writes the thread code into every cluster's stencil memory
//   illegal_o     some TRS or TEU met an instruction it does not implement
//   events_o      per-clock activity flags (see npa_events_t) for performance counters
//   swb_used_o    number of pending spawn commands in the SWB
//   mem_range_err_o  an access reached beyond the main-memory capacity
module npa_top
  import npa_pkg::*;
#(
  parameter int unsigned N_TEU         = 10,
  parameter int unsigned TRS_PER_TEU   = 5,
  parameter int unsigned SWB_DEPTH     = 16,
  parameter int unsigned LINK_LAT      = 5,
  parameter int unsigned STENCIL_WORDS = 256,
  parameter int unsigned N_BANKS       = 8,
  parameter int unsigned CACHE_BYTES   = 1048576,
  parameter int unsigned WAYS          = 8,
  parameter int unsigned LINE_BYTES    = 64,
  parameter int unsigned HIT_LAT       = 5,
  parameter int unsigned MEM_LAT       = 100,
  parameter int unsigned MEM_LINES     = 65536     // per main-memory bank
) (
  input  logic            clk,
  input  logic            rst_n,
  // CPU spawn and completion
  input  logic            cpu_spawn_valid_i,
  input  spawn_t          cpu_spawn_i,
  output logic            cpu_spawn_ready_o,
  output logic            busy_o,
  output logic            done_o,
  output logic            conflict_o,
  // CPU memory port
  input  logic            cpu_mreq_valid_i,
  input  mem_req_t        cpu_mreq_i,
  output logic            cpu_mreq_grant_o,
  output logic            cpu_mrsp_valid_o,
  output logic [XLEN-1:0] cpu_mrsp_data_o,
  // thread code load
  input  logic            code_we_i,
  input  logic [$clog2(STENCIL_WORDS)-1:0] code_addr_i,   // word index
  input  logic [XLEN-1:0] code_data_i,
  output logic            illegal_o,
  // status for the host
  output npa_events_t     events_o,
  output logic [$clog2(SWB_DEPTH+1)-1:0] swb_used_o,
  output logic            mem_range_err_o
);
  localparam int unsigned N_TRS     = N_TEU * TRS_PER_TEU;
  localparam int unsigned NP        = N_TRS + N_TEU + 1;
  localparam int unsigned CPU_PORT  = N_TRS + N_TEU;
  localparam int unsigned LOGN      = $clog2((NP > N_BANKS) ? NP : N_BANKS);
  localparam int unsigned NN        = 1 << LOGN;
  localparam int unsigned BSTRIDE   = NN / N_BANKS;
  localparam int unsigned LINE_BITS = LINE_BYTES * 8;
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES);
  localparam int unsigned BNK_W     = (N_BANKS > 1) ? $clog2(N_BANKS) : 1;
  localparam int unsigned REQ_W     = $bits(mem_req_t);
  localparam int unsigned RSP_W     = $bits(mem_rsp_t);

  if (NP > (1 << PORT_W)) begin : g_bad_ports
    $error("npa_top: more memory ports than the request tag can name");
  end

  // ------------------------------------------------------------ control and dispatch
  logic                 kill;
  logic                 swb_valid, swb_ready, swb_empty, swb_dual;
  spawn_t               swb_spawn;
  logic [N_TRS-1:0]     trs_idle, grant, lnk_valid;
  thread_t [N_TRS-1:0]  grant_thr, lnk_thr;
  logic                 link_busy;
  logic [$clog2(SWB_DEPTH+1)-1:0] swb_used;

  logic [N_TEU-1:0]     teu_spawn_valid, teu_spawn_ready, teu_conflict, cl_busy;
  logic [N_TEU-1:0]     cl_wait, cl_sched, cl_halt, cl_illegal;
  spawn_t [N_TEU-1:0]   teu_spawn;

  control_unit #(.N_TEU(N_TEU)) u_cu (
    .clk               (clk),
    .rst_n             (rst_n),
    .cpu_spawn_valid_i (cpu_spawn_valid_i),
    .cpu_spawn_i       (cpu_spawn_i),
    .cpu_spawn_ready_o (cpu_spawn_ready_o),
    .busy_o            (busy_o),
    .done_o            (done_o),
    .conflict_o        (conflict_o),
    .teu_spawn_valid_i (teu_spawn_valid),
    .teu_spawn_i       (teu_spawn),
    .teu_spawn_ready_o (teu_spawn_ready),
    .teu_conflict_i    (teu_conflict),
    .swb_valid_o       (swb_valid),
    .swb_spawn_o       (swb_spawn),
    .swb_ready_i       (swb_ready),
    .swb_empty_i       (swb_empty),
    .link_busy_i       (link_busy),
    .cluster_busy_i    (cl_busy),
    .kill_o            (kill)
  );

  swb #(.N_TRS(N_TRS), .DEPTH(SWB_DEPTH)) u_swb (
    .clk          (clk),
    .rst_n        (rst_n),
    .flush_i      (kill),
    .spawn_valid_i(swb_valid),
    .spawn_i      (swb_spawn),
    .spawn_ready_o(swb_ready),
    .trs_idle_i   (trs_idle),
    .grant_o      (grant),
    .thr_o        (grant_thr),
    .empty_o      (swb_empty),
    .used_o       (swb_used),
    .dual_o       (swb_dual)
  );

  dispatch_link #(.N_TRS(N_TRS), .LAT(LINK_LAT)) u_link (
    .clk    (clk),
    .rst_n  (rst_n),
    .flush_i(kill),
    .valid_i(grant),
    .thr_i  (grant_thr),
    .valid_o(lnk_valid),
    .thr_o  (lnk_thr),
    .busy_o (link_busy)
  );

  // ------------------------------------------------------------ memory ports
  logic     [NP-1:0]           p_req_valid, p_req_grant, p_rsp_valid;
  mem_req_t [NP-1:0]           p_req;
  logic     [NP-1:0][XLEN-1:0] p_rsp_data;

  for (genvar c = 0; c < N_TEU; c++) begin : g_cl
    logic     [TRS_PER_TEU:0]           m_valid, m_grant, r_valid;
    mem_req_t [TRS_PER_TEU:0]           m_req;
    logic     [TRS_PER_TEU:0][XLEN-1:0] r_data;

    trs_cluster #(
      .K            (TRS_PER_TEU),
      .TRS_PORT_BASE(c * TRS_PER_TEU),
      .TEU_PORT     (N_TRS + c),
      .STENCIL_WORDS(STENCIL_WORDS)
    ) u_cluster (
      .clk          (clk),
      .rst_n        (rst_n),
      .kill_i       (kill),
      .alloc_i      (grant[c*TRS_PER_TEU +: TRS_PER_TEU]),
      .idle_o       (trs_idle[c*TRS_PER_TEU +: TRS_PER_TEU]),
      .thr_valid_i  (lnk_valid[c*TRS_PER_TEU +: TRS_PER_TEU]),
      .thr_i        (lnk_thr[c*TRS_PER_TEU +: TRS_PER_TEU]),
      .mreq_valid_o (m_valid),
      .mreq_o       (m_req),
      .mreq_grant_i (m_grant),
      .mrsp_valid_i (r_valid),
      .mrsp_data_i  (r_data),
      .spawn_valid_o(teu_spawn_valid[c]),
      .spawn_o      (teu_spawn[c]),
      .spawn_ready_i(teu_spawn_ready[c]),
      .conflict_o   (teu_conflict[c]),
      .imem_we_i    (code_we_i),
      .imem_waddr_i (code_addr_i),
      .imem_wdata_i (code_data_i),
      .busy_o       (cl_busy[c]),
      .wait_o       (cl_wait[c]),
      .sched_o      (cl_sched[c]),
      .halt_o       (cl_halt[c]),
      .illegal_o    (cl_illegal[c])
    );

    always_comb begin
      for (int k = 0; k < TRS_PER_TEU; k++) begin
        p_req_valid[c*TRS_PER_TEU + k] = m_valid[k];
        p_req[c*TRS_PER_TEU + k]       = m_req[k];
        m_grant[k] = p_req_grant[c*TRS_PER_TEU + k];
        r_valid[k] = p_rsp_valid[c*TRS_PER_TEU + k];
        r_data[k]  = p_rsp_data[c*TRS_PER_TEU + k];
      end
      p_req_valid[N_TRS + c]   = m_valid[TRS_PER_TEU];
      p_req[N_TRS + c]         = m_req[TRS_PER_TEU];
      m_grant[TRS_PER_TEU]     = p_req_grant[N_TRS + c];
      r_valid[TRS_PER_TEU]     = p_rsp_valid[N_TRS + c];
      r_data[TRS_PER_TEU]      = p_rsp_data[N_TRS + c];
    end
  end

  always_comb begin
    p_req_valid[CPU_PORT] = cpu_mreq_valid_i;
    p_req[CPU_PORT]       = cpu_mreq_i;
    p_req[CPU_PORT].src   = PORT_W'(CPU_PORT);
    cpu_mreq_grant_o      = p_req_grant[CPU_PORT];
    cpu_mrsp_valid_o      = p_rsp_valid[CPU_PORT];
    cpu_mrsp_data_o       = p_rsp_data[CPU_PORT];
    illegal_o             = (cl_illegal != '0);
  end

  // ------------------------------------------------------------ Omega networks
  logic [NN-1:0]            qi_valid, qi_grant, qo_valid, qo_ready;
  logic [NN-1:0][LOGN-1:0]  qi_dest;
  logic [NN-1:0][REQ_W-1:0] qi_data, qo_data;
  logic [NN-1:0]            si_valid, si_grant, so_valid, so_ready;
  logic [NN-1:0][LOGN-1:0]  si_dest;
  logic [NN-1:0][RSP_W-1:0] si_data, so_data;
  logic [LOGN:0]            q_blocked, s_blocked;

  logic     [N_BANKS-1:0]  b_req_ready, b_rsp_valid, b_rsp_grant;
  mem_rsp_t [N_BANKS-1:0]  b_rsp;
  logic [N_BANKS-1:0][5:0] bank_ev;     // hit, miss, write-back, queued, memory busy, range error

  always_comb begin
    qi_valid = '0;
    qi_dest  = '0;
    qi_data  = '0;
    for (int p = 0; p < NP; p++) begin
      qi_valid[p] = p_req_valid[p];
      qi_dest[p]  = LOGN'(32'(p_req[p].addr[OFF_W +: BNK_W] % N_BANKS) * BSTRIDE);
      qi_data[p]  = p_req[p];
    end
    for (int p = 0; p < NP; p++) p_req_grant[p] = qi_grant[p];
    qo_ready = '0;
    for (int b = 0; b < N_BANKS; b++) qo_ready[b*BSTRIDE] = b_req_ready[b];

    si_valid = '0;
    si_dest  = '0;
    si_data  = '0;
    for (int b = 0; b < N_BANKS; b++) begin
      si_valid[b*BSTRIDE] = b_rsp_valid[b];
      si_dest[b*BSTRIDE]  = LOGN'(b_rsp[b].dst);
      si_data[b*BSTRIDE]  = b_rsp[b];
      b_rsp_grant[b]      = si_grant[b*BSTRIDE];
    end
    so_ready = '1;
    for (int p = 0; p < NP; p++) begin
      p_rsp_valid[p] = so_valid[p];
      p_rsp_data[p]  = so_data[p][RSP_W-1 -: XLEN];     // the rdata field of mem_rsp_t
    end
  end

  omega_net #(.LOGN(LOGN), .W(REQ_W)) u_req_net (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_i    (qi_valid),
    .dest_i     (qi_dest),
    .data_i     (qi_data),
    .grant_o    (qi_grant),
    .out_valid_o(qo_valid),
    .out_data_o (qo_data),
    .out_ready_i(qo_ready),
    .conflict_o (q_blocked)
  );

  omega_net #(.LOGN(LOGN), .W(RSP_W)) u_rsp_net (
    .clk        (clk),
    .rst_n      (rst_n),
    .valid_i    (si_valid),
    .dest_i     (si_dest),
    .data_i     (si_data),
    .grant_o    (si_grant),
    .out_valid_o(so_valid),
    .out_data_o (so_data),
    .out_ready_i(so_ready),
    .conflict_o (s_blocked)
  );

  // ------------------------------------------------------------ cache and main memory
  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    logic                 mrd_v, mrsp_v, mwr_v, mm_busy, mm_err;
    logic [XLEN-1:0]      mrd_l, mwr_l;
    logic [LINE_BITS-1:0] mrsp_d, mwr_d;
    logic                 ev_hit, ev_miss, ev_wb, ev_queued;

    cache_bank #(
      .BANK_BYTES(CACHE_BYTES / N_BANKS),
      .WAYS      (WAYS),
      .LINE_BYTES(LINE_BYTES),
      .N_BANKS   (N_BANKS),
      .HIT_LAT   (HIT_LAT)
    ) u_cache (
      .clk        (clk),
      .rst_n      (rst_n),
      .req_valid_i(qo_valid[b*BSTRIDE]),
      .req_i      (mem_req_t'(qo_data[b*BSTRIDE])),
      .req_ready_o(b_req_ready[b]),
      .rsp_valid_o(b_rsp_valid[b]),
      .rsp_o      (b_rsp[b]),
      .rsp_grant_i(b_rsp_grant[b]),
      .mrd_valid_o(mrd_v),
      .mrd_line_o (mrd_l),
      .mrd_valid_i(mrsp_v),
      .mrd_data_i (mrsp_d),
      .mwr_valid_o(mwr_v),
      .mwr_line_o (mwr_l),
      .mwr_data_o (mwr_d),
      .hit_o      (ev_hit),
      .miss_o     (ev_miss),
      .wb_o       (ev_wb),
      .queued_o   (ev_queued)
    );

    main_mem_bank #(
      .LINES    (MEM_LINES),
      .LINE_BITS(LINE_BITS),
      .LAT      (MEM_LAT)
    ) u_mem (
      .clk        (clk),
      .rst_n      (rst_n),
      .rd_valid_i (mrd_v),
      .rd_line_i  (mrd_l),
      .rsp_valid_o(mrsp_v),
      .rsp_data_o (mrsp_d),
      .wr_valid_i (mwr_v),
      .wr_line_i  (mwr_l),
      .wr_data_i  (mwr_d),
      .busy_o     (mm_busy),
      .range_err_o(mm_err)
    );
    assign bank_ev[b] = {ev_hit, ev_miss, ev_wb, ev_queued, mm_busy, mm_err};
  end

  // ------------------------------------------------------------ status
  always_comb begin
    logic [5:0] any_bank;
    any_bank = '0;
    for (int b = 0; b < N_BANKS; b++) any_bank |= bank_ev[b];
    events_o.swb_full    = swb_valid && !swb_ready;
    events_o.multi       = ($countones(grant) > 1);
    events_o.dual        = swb_dual;
    events_o.teu_wait    = (cl_wait != '0);
    events_o.teu_start   = (cl_sched != '0);
    events_o.teu_halt    = (cl_halt != '0);
    events_o.nested      = ((teu_spawn_valid & teu_spawn_ready) != '0);
    events_o.kill        = kill;
    events_o.req_blocked = (q_blocked != '0);
    events_o.rsp_blocked = (s_blocked != '0);
    {events_o.hit, events_o.miss, events_o.writeback, events_o.queued, events_o.mem_busy,
     mem_range_err_o} = any_bank;
    swb_used_o = swb_used;
  end

endmodule
