// trs_cluster: a group of Thread Reservation Stations sharing one Thread Execution Unit.
//
// The accelerator organises its TRSs in clusters, each wired to one TEU, and keeps
// more TRSs than TEUs (5 per TEU in the configuration it recommends) so that threads
// wait for their irregular loads in cheap TRSs while the TEU stays busy. This block
// holds K TRSs, the TEU and the cluster's copy of the thread code (stencil memory),
// and does the thread scheduling step: whenever the TEU is idle and at least one TRS
// has executed trs_halt, one such TRS hands its registers and resume pc to the TEU in
// a single clock and becomes idle again. Threads therefore move to the TEU in the
// order in which they become ready, not the order in which they were spawned. Among
// several ready TRSs a round-robin pointer chooses (the tie-break rule is this
// design's choice).
//
// Interface: per-TRS dispatch lanes from the SWB (alloc_i immediate, thr_valid_i/thr_i
// after the dispatch link), K+1 memory ports (TRS 0..K-1, then the TEU), the TEU's spawn
// and conflict outputs, the host's code-load write port, and kill_i. busy_o is set while
// any TRS or the TEU holds a thread; wait_o flags a clock in which a ready thread waits
// because the TEU is busy.
module trs_cluster
  import npa_pkg::*;
#(
  parameter int unsigned K             = 5,
  parameter int unsigned TRS_PORT_BASE = 0,
  parameter int unsigned TEU_PORT      = 50,
  parameter int unsigned STENCIL_WORDS = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  kill_i,
  // dispatch lanes
  input  logic [K-1:0]          alloc_i,
  output logic [K-1:0]          idle_o,
  input  logic [K-1:0]          thr_valid_i,
  input  thread_t [K-1:0]       thr_i,
  // memory ports: [0..K-1] TRSs, [K] TEU
  output logic [K:0]            mreq_valid_o,
  output mem_req_t [K:0]        mreq_o,
  input  logic [K:0]            mreq_grant_i,
  input  logic [K:0]            mrsp_valid_i,
  input  logic [K:0][XLEN-1:0]  mrsp_data_i,
  // TEU to Control Unit
  output logic                  spawn_valid_o,
  output spawn_t                spawn_o,
  input  logic                  spawn_ready_i,
  output logic                  conflict_o,
  // code load
  input  logic                  imem_we_i,
  input  logic [$clog2(STENCIL_WORDS)-1:0] imem_waddr_i,   // word index
  input  logic [XLEN-1:0]       imem_wdata_i,
  // status
  output logic                  busy_o,
  output logic                  wait_o,
  output logic                  sched_o,
  output logic                  halt_o,
  output logic                  illegal_o
);
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [K:0][XLEN-1:0]          iaddr, idata;
  logic [K-1:0]                  ready, take, tbusy, tillegal;
  logic [K-1:0][31:0][XLEN-1:0]  tregs;
  logic [K-1:0][XLEN-1:0]        tpc;
  logic                          teu_idle, teu_start, teu_illegal;
  logic [31:0][XLEN-1:0]         start_regs;
  logic [XLEN-1:0]               start_pc;
  logic [KW-1:0]                 rr_q, pick;
  logic                          found;

  stencil_mem #(.WORDS(STENCIL_WORDS), .NR(K + 1)) u_code (
    .clk    (clk),
    .we_i   (imem_we_i),
    .waddr_i(imem_waddr_i),
    .wdata_i(imem_wdata_i),
    .raddr_i(iaddr),
    .rdata_o(idata)
  );

  for (genvar k = 0; k < K; k++) begin : g_trs
    trs #(.PORT_ID(TRS_PORT_BASE + k)) u_trs (
      .clk         (clk),
      .rst_n       (rst_n),
      .kill_i      (kill_i),
      .alloc_i     (alloc_i[k]),
      .idle_o      (idle_o[k]),
      .thr_valid_i (thr_valid_i[k]),
      .thr_i       (thr_i[k]),
      .imem_addr_o (iaddr[k]),
      .imem_data_i (idata[k]),
      .mreq_valid_o(mreq_valid_o[k]),
      .mreq_o      (mreq_o[k]),
      .mreq_grant_i(mreq_grant_i[k]),
      .mrsp_valid_i(mrsp_valid_i[k]),
      .mrsp_data_i (mrsp_data_i[k]),
      .ready_o     (ready[k]),
      .regs_o      (tregs[k]),
      .pc_o        (tpc[k]),
      .take_i      (take[k]),
      .busy_o      (tbusy[k]),
      .illegal_o   (tillegal[k])
    );
  end

  // Round-robin choice of one ready TRS for an idle TEU.
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int j = 0; j < K; j++) begin
      logic [KW-1:0] idx;
      idx = KW'((32'(rr_q) + j) % K);
      if (!found && ready[idx]) begin
        found = 1'b1;
        pick  = idx;
      end
    end
    teu_start  = found && teu_idle && !kill_i;
    take       = '0;
    take[pick] = teu_start;
    start_regs = tregs[pick];
    start_pc   = tpc[pick];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         rr_q <= '0;
    else if (teu_start) rr_q <= KW'((32'(pick) + 1) % K);
  end

  teu #(.PORT_ID(TEU_PORT)) u_teu (
    .clk          (clk),
    .rst_n        (rst_n),
    .kill_i       (kill_i),
    .start_i      (teu_start),
    .start_regs_i (start_regs),
    .start_pc_i   (start_pc),
    .idle_o       (teu_idle),
    .imem_addr_o  (iaddr[K]),
    .imem_data_i  (idata[K]),
    .mreq_valid_o (mreq_valid_o[K]),
    .mreq_o       (mreq_o[K]),
    .mreq_grant_i (mreq_grant_i[K]),
    .mrsp_valid_i (mrsp_valid_i[K]),
    .mrsp_data_i  (mrsp_data_i[K]),
    .spawn_valid_o(spawn_valid_o),
    .spawn_o      (spawn_o),
    .spawn_ready_i(spawn_ready_i),
    .conflict_o   (conflict_o),
    .halt_o       (halt_o),
    .illegal_o    (teu_illegal)
  );

  always_comb begin
    busy_o    = (tbusy != '0) || !teu_idle;
    wait_o    = found && !teu_idle;
    sched_o   = teu_start;
    illegal_o = (tillegal != '0) || teu_illegal;
  end

endmodule
