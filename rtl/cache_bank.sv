// cache_bank: one bank of the accelerator's shared, multi-bank, set-associative cache.
//
// The CPU, the TRSs and the TEUs share one cache of 1 MB, 8-way set associative, split
// into 8 banks with a 5-cycle access time; misses go to a multi-bank main memory with
// 100-cycle latency. Requests that reach the same bank in the same clock are queued per
// bank. This block is one such bank: a request queue (QDEPTH entries), a tag/data lookup
// stage that performs loads, byte-masked stores and read-modify-write atomics in place,
// and a response pipeline that delivers the answer HIT_LAT clocks after the request
// entered the bank. Lines are LINE_BYTES long and interleaved across banks:
//   addr = {tag, set, bank, word-in-line, byte}.
// The bank is write-back and write-allocate. On a miss it stops taking the queue head,
// writes the victim line back if dirty, reads the line from its main-memory bank,
// installs it and then serves the head as a hit; so a miss costs the memory latency plus
// HIT_LAT. The victim is an invalid way if there is one, otherwise the way named by a
// per-set round-robin pointer.
//
// From the document: total size, associativity, bank count, 5-cycle access time and
// per-bank queuing. This design's choices: line size (64 B), queue depth, write-back
// write-allocate policy, round-robin replacement and one miss at a time per bank.
//
// Interface: req_valid_i/req_ready_o (queue not full); rsp_valid_o/rsp_o held until
// rsp_grant_i (the response network may refuse it, which stalls the bank); main-memory
// port mrd_*/mwr_* works on whole lines, addressed by line index {tag, set}.
module cache_bank
  import npa_pkg::*;
#(
  parameter int unsigned BANK_BYTES = 131072,   // 1 MB / 8 banks
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned N_BANKS    = 8,
  parameter int unsigned HIT_LAT    = 5,
  parameter int unsigned QDEPTH     = 4,
  localparam int unsigned LINE_BITS = LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid_i,
  input  mem_req_t              req_i,
  output logic                  req_ready_o,
  output logic                  rsp_valid_o,
  output mem_rsp_t              rsp_o,
  input  logic                  rsp_grant_i,
  // main memory
  output logic                  mrd_valid_o,
  output logic [XLEN-1:0]       mrd_line_o,
  input  logic                  mrd_valid_i,
  input  logic [LINE_BITS-1:0]  mrd_data_i,
  output logic                  mwr_valid_o,
  output logic [XLEN-1:0]       mwr_line_o,
  output logic [LINE_BITS-1:0]  mwr_data_o,
  // event pulses
  output logic                  hit_o,
  output logic                  miss_o,
  output logic                  wb_o,
  output logic                  queued_o     // a request had to wait behind another
);
  localparam int unsigned SETS  = BANK_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned OFF_W = $clog2(LINE_BYTES);
  localparam int unsigned BNK_W = $clog2(N_BANKS);
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned TAG_W = XLEN - OFF_W - BNK_W - SET_W;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WPL   = LINE_BYTES / 4;
  localparam int unsigned WRD_W = $clog2(WPL);
  localparam int unsigned QW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;
  localparam int unsigned PD    = HIT_LAT - 1;          // response pipeline depth

  // ---------------------------------------------------------------- storage
  logic [LINE_BITS-1:0] data_q [SETS*WAYS];
  logic [TAG_W-1:0]     tag_q  [SETS*WAYS];
  logic [SETS*WAYS-1:0] valid_q, dirty_q;
  logic [WAY_W-1:0]     rr_q   [SETS];

  // ---------------------------------------------------------------- request queue
  mem_req_t        q_q [QDEPTH];
  logic [QW-1:0]   qh_q, qt_q;
  logic [QW:0]     qn_q;
  mem_req_t        head;

  // ---------------------------------------------------------------- response pipe
  logic [PD-1:0]   pv_q;
  mem_rsp_t        pd_q [PD];
  logic            stall;

  typedef enum logic [1:0] {C_LOOKUP, C_WAIT, C_FILL} cstate_e;
  cstate_e         st_q;
  logic [TAG_W-1:0] miss_tag_q;
  logic [SET_W-1:0] miss_set_q;
  logic [WAY_W-1:0] miss_way_q;

  // ---------------------------------------------------------------- lookup
  logic [SET_W-1:0] set_i;
  logic [TAG_W-1:0] tag_i;
  logic [WRD_W-1:0] wrd_i;
  logic             hit, found_inv;
  logic [WAY_W-1:0] hway, vway;
  logic             serve, do_miss, deq, enq;
  logic [XLEN-1:0]  old_w, new_w;

  always_comb begin
    head  = q_q[qh_q];
    set_i = head.addr[OFF_W+BNK_W +: SET_W];
    tag_i = head.addr[XLEN-1 -: TAG_W];
    wrd_i = head.addr[2 +: WRD_W];
    hit = 1'b0;
    hway = '0;
    found_inv = 1'b0;
    vway = rr_q[set_i];
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[32'(set_i)*WAYS + w] && tag_q[32'(set_i)*WAYS + w] == tag_i) begin
        hit  = 1'b1;
        hway = WAY_W'(w);
      end
    end
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!valid_q[32'(set_i)*WAYS + w]) begin
        found_inv = 1'b1;
        vway = WAY_W'(w);
      end
    end
    stall   = pv_q[PD-1] && !rsp_grant_i;
    serve   = (st_q == C_LOOKUP) && (qn_q != '0) && hit && !stall;
    do_miss = (st_q == C_LOOKUP) && (qn_q != '0) && !hit;
    deq     = serve;
    enq     = req_valid_i && req_ready_o;
    old_w   = data_q[32'(set_i)*WAYS + 32'(hway)][32*wrd_i +: 32];
    unique case (head.op)
      MEM_STORE: new_w = merge_bytes(old_w, head.wdata, head.wstrb);
      MEM_AMO:   new_w = amo_apply(head.amo, old_w, head.wdata);
      default:   new_w = old_w;
    endcase
  end

  assign req_ready_o = (qn_q < (QW+1)'(QDEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qh_q    <= '0;
      qt_q    <= '0;
      qn_q    <= '0;
      pv_q    <= '0;
      valid_q <= '0;
      dirty_q <= '0;
      st_q    <= C_LOOKUP;
      miss_tag_q  <= '0;
      miss_set_q  <= '0;
      miss_way_q  <= '0;
      for (int s = 0; s < SETS; s++) rr_q[s] <= '0;
    end else begin
      // queue
      if (enq) qt_q <= QW'((32'(qt_q) + 1) % QDEPTH);
      if (deq) qh_q <= QW'((32'(qh_q) + 1) % QDEPTH);
      qn_q <= qn_q + (enq ? 1 : 0) - (deq ? 1 : 0);

      // response pipeline
      if (!stall) begin
        pv_q[0] <= serve;
        for (int p = 1; p < PD; p++) pv_q[p] <= pv_q[p-1];
      end

      // lookup / miss handling
      unique case (st_q)
        C_LOOKUP: begin
          if (serve && head.op != MEM_LOAD) dirty_q[32'(set_i)*WAYS + 32'(hway)] <= 1'b1;
          if (do_miss) begin
            miss_tag_q  <= tag_i;
            miss_set_q  <= set_i;
            miss_way_q  <= vway;
            if (!found_inv) rr_q[set_i] <= WAY_W'((32'(vway) + 1) % WAYS);
            valid_q[32'(set_i)*WAYS + 32'(vway)] <= 1'b0;
            st_q <= C_WAIT;
          end
        end
        C_WAIT: if (mrd_valid_i) begin
          valid_q[32'(miss_set_q)*WAYS + 32'(miss_way_q)] <= 1'b1;
          dirty_q[32'(miss_set_q)*WAYS + 32'(miss_way_q)] <= 1'b0;
          st_q <= C_LOOKUP;
        end
        default: st_q <= C_LOOKUP;
      endcase
    end
  end

  // Tag and data arrays: plain clocked writes without reset, so they map to RAM.
  // A store or atomic rewrites the whole line with the new word merged in.
  logic [LINE_BITS-1:0] upd_line;
  always_comb begin
    upd_line = data_q[32'(set_i)*WAYS + 32'(hway)];
    upd_line[32*wrd_i +: 32] = new_w;
  end

  always_ff @(posedge clk) begin
    if (enq) q_q[qt_q] <= req_i;
    if (!stall) begin
      pd_q[0] <= '{rdata: old_w, dst: head.src};
      for (int p = 1; p < PD; p++) pd_q[p] <= pd_q[p-1];
    end
    if (st_q == C_LOOKUP && serve && head.op != MEM_LOAD)
      data_q[32'(set_i)*WAYS + 32'(hway)] <= upd_line;
    else if (st_q == C_WAIT && mrd_valid_i)
      data_q[32'(miss_set_q)*WAYS + 32'(miss_way_q)] <= mrd_data_i;
    if (st_q == C_WAIT && mrd_valid_i)
      tag_q[32'(miss_set_q)*WAYS + 32'(miss_way_q)] <= miss_tag_q;
  end

  always_comb begin
    rsp_valid_o = pv_q[PD-1];
    rsp_o       = pd_q[PD-1];
    // miss: victim write-back and line read leave in the same clock (the write is
    // posted and the read is ordered after it by the main-memory bank)
    mrd_valid_o = do_miss;
    mrd_line_o  = XLEN'(head.addr >> (OFF_W + BNK_W));
    mwr_valid_o = do_miss && valid_q[32'(set_i)*WAYS + 32'(vway)] &&
                  dirty_q[32'(set_i)*WAYS + 32'(vway)];
    mwr_line_o  = XLEN'({tag_q[32'(set_i)*WAYS + 32'(vway)], set_i});
    mwr_data_o  = data_q[32'(set_i)*WAYS + 32'(vway)];
    hit_o       = serve;
    miss_o      = do_miss;
    wb_o        = mwr_valid_o;
    queued_o    = (qn_q > 1);
  end

  if (HIT_LAT < 2) begin : g_bad_lat
    $error("cache_bank: HIT_LAT must be at least 2");
  end

endmodule
