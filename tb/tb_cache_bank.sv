// tb_cache_bank: checks one shared-cache bank at its default size (128 KB, 8-way,
// 64-byte lines, 5-clock access) attached to a default main-memory bank (100 clocks).
//
// Checks:
//  - latency: a load that hits answers exactly HIT_LAT clocks after the bank accepted
//    it; a load that misses a clean line answers MEM_LAT + HIT_LAT + 1 clocks after
//    (the extra clock moves the line from memory into the array);
//  - data: random loads, byte/half/word stores and atomics on addresses spread over
//    more tags per set than there are ways (so lines are evicted dirty and read back
//    from memory) are compared with a flat reference memory; atomics return the old
//    word; responses come back in request order with the requester's number;
//  - back pressure: with requests offered every clock and the response side refusing
//    at random, the queue fills (ready drops) and nothing is lost;
//  - hit, miss, write-back and queuing events all occur.
module tb_cache_bank;
  import npa_pkg::*;

  localparam int HIT_LAT = 5, MEM_LAT = 100, LB = 512;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          rqv = 1'b0, rqr, rsv, rsg = 1'b1;
  mem_req_t      rq = '0;
  mem_rsp_t      rs;
  logic          mrdv_o, mrdv_i, mwrv, ev_hit, ev_miss, ev_wb, ev_q, mbusy, merr;
  logic [31:0]   mrdl, mwrl;
  logic [LB-1:0] mrdd, mwrd;

  cache_bank dut (
    .clk(clk), .rst_n(rst_n), .req_valid_i(rqv), .req_i(rq), .req_ready_o(rqr),
    .rsp_valid_o(rsv), .rsp_o(rs), .rsp_grant_i(rsg),
    .mrd_valid_o(mrdv_o), .mrd_line_o(mrdl), .mrd_valid_i(mrdv_i), .mrd_data_i(mrdd),
    .mwr_valid_o(mwrv), .mwr_line_o(mwrl), .mwr_data_o(mwrd),
    .hit_o(ev_hit), .miss_o(ev_miss), .wb_o(ev_wb), .queued_o(ev_q)
  );
  main_mem_bank mem (
    .clk(clk), .rst_n(rst_n), .rd_valid_i(mrdv_o), .rd_line_i(mrdl), .rsp_valid_o(mrdv_i),
    .rsp_data_o(mrdd), .wr_valid_i(mwrv), .wr_line_i(mwrl), .wr_data_i(mwrd), .busy_o(mbusy),
    .range_err_o(merr)
  );

  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_q = 0, n_full = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_wb) n_wb++;
    if (ev_q) n_q++;
    if (rqv && !rqr) n_full++;
  end

  // reference memory (words); a word never touched before takes its value from the
  // main-memory array, whose start contents are arbitrary
  logic [31:0] ref_mem [int];
  function automatic logic [31:0] rd_ref(logic [31:0] a);
    if (!ref_mem.exists(a >> 2)) ref_mem[a >> 2] = mem.mem_q[16'(a >> 9)][32*a[5:2] +: 32];
    return ref_mem[a >> 2];
  endfunction

  // expected responses in order
  logic [31:0] exp_q [$];
  logic [PORT_W-1:0] src_q [$];

  // addresses in bank 0: pick one of 3 sets and one of 10 tags per set
  function automatic logic [31:0] rnd_addr();
    logic [31:0] a;
    a = '0;
    a[5:2]   = $urandom % 16;                  // word in line
    a[8:6]   = 3'd0;                           // bank 0
    a[16:9]  = 8'($urandom % 3);               // set
    a[31:17] = 15'(1 + $urandom % 10);         // tag
    return a;
  endfunction

  function automatic mem_req_t rnd_req(logic [PORT_W-1:0] src);
    mem_req_t r;
    int k = $urandom % 4;
    r.addr  = rnd_addr();
    r.src   = src;
    r.wdata = $urandom;
    r.amo   = AMO_ADD;
    r.wstrb = 4'hF;
    if (k == 0) r.op = MEM_LOAD;
    else if (k == 1) begin
      r.op = MEM_STORE;
      case ($urandom % 3)
        0: r.wstrb = 4'b0001 << ($urandom % 4);
        1: r.wstrb = ($urandom % 2) ? 4'b0011 : 4'b1100;
        default: r.wstrb = 4'hF;
      endcase
    end else if (k == 2) r.op = MEM_LOAD;
    else begin
      r.op = MEM_AMO;
      case ($urandom % 5)
        0: r.amo = AMO_ADD;
        1: r.amo = AMO_OR;
        2: r.amo = AMO_SWAP;
        3: r.amo = AMO_MAXU;
        default: r.amo = AMO_MIN;
      endcase
    end
    return r;
  endfunction

  // apply a request to the reference and record its expected response
  function automatic void model(mem_req_t r);
    logic [31:0] old = rd_ref(r.addr);
    exp_q.push_back(old);
    src_q.push_back(r.src);
    if (r.op == MEM_STORE)    ref_mem[r.addr >> 2] = merge_bytes(old, r.wdata, r.wstrb);
    else if (r.op == MEM_AMO) ref_mem[r.addr >> 2] = amo_apply(r.amo, old, r.wdata);
  endfunction

  // response checker
  int n_rsp = 0;
  bit sent_all = 1'b0;
  always @(posedge clk) if (rst_n && rsv && rsg) begin
    n_rsp++;
    if (exp_q.size() == 0) begin
      failures++; checks++;
      $display("FAIL: response without request");
    end else begin
      logic [31:0] e;
      logic [PORT_W-1:0] s;
      e = exp_q.pop_front();
      s = src_q.pop_front();
      checks++;
      if (rs.rdata != e || rs.dst != s) begin
        failures++;
        $display("FAIL: response %0d data %h dst %0d, expected %h dst %0d", n_rsp, rs.rdata,
                 rs.dst, e, s);
      end
    end
  end

  // single request, return the latency from acceptance to response
  task automatic one(mem_req_t r, output int lat);
    @(negedge clk);
    rqv = 1'b1; rq = r;
    @(posedge clk);
    while (!rqr) @(posedge clk);
    model(r);
    lat = 0;
    #1 rqv = 1'b0;
    do begin
      @(posedge clk);
      lat++;
    end while (!(rsv && rsg) && lat < 1000);
    #1;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    mem_req_t r;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // latency: miss then hit on the same line
    r = '{op: MEM_LOAD, amo: AMO_ADD, addr: 32'h0002_0004, wdata: 0, wstrb: 4'hF, src: PORT_W'(3)};
    one(r, lat);
    chk(lat == MEM_LAT + HIT_LAT + 1, $sformatf("miss latency %0d, expected %0d", lat,
                                                MEM_LAT + HIT_LAT + 1));
    one(r, lat);
    chk(lat == HIT_LAT, $sformatf("hit latency %0d, expected %0d", lat, HIT_LAT));
    r.op = MEM_STORE; r.wdata = 32'h1234_5678; r.addr = 32'h0002_0008;
    one(r, lat);
    chk(lat == HIT_LAT, $sformatf("store hit latency %0d, expected %0d", lat, HIT_LAT));
    // one at a time, random
    for (int t = 0; t < 300; t++) one(rnd_req(PORT_W'(t)), lat);
    // back to back with response back pressure
    fork
      begin
        for (int t = 0; t < 1500; t++) begin
          @(negedge clk);
          rqv = 1'b1; rq = rnd_req(PORT_W'(t));
          @(posedge clk);
          while (!rqr) @(posedge clk);
          model(rq);
          #1 rqv = 1'b0;
        end
        sent_all = 1'b1;
      end
      begin
        while (!sent_all) begin
          @(negedge clk);
          rsg = ($urandom % 3) != 0;
        end
      end
    join
    @(negedge clk) rsg = 1'b1;
    repeat (400) @(posedge clk);
    chk(!merr, "line index beyond memory");
    chk(exp_q.size() == 0, $sformatf("%0d responses missing", exp_q.size()));
    chk(n_hit > 0 && n_miss > 0 && n_wb > 0 && n_q > 0 && n_full > 0, "events missing");
    $display("hit=%0d miss=%0d wb=%0d queued=%0d full=%0d", n_hit, n_miss, n_wb, n_q, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
