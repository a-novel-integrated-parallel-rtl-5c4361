// tb_control_unit: checks the Control Unit at its default size (10 TEUs plus the CPU).
//
// The test bench drives random spawn requests from the CPU and every TEU (each request
// is held until accepted, as the TEU does), a random SWB ready, and random status
// inputs. Checks, every clock:
//  - at most one command goes to the SWB, it is the command of the requester that is
//    told ready, and a requester is told ready only together with the SWB taking it;
//  - no request waits while more than 11 other commands are accepted (round robin);
//  - busy_o is the previous clock's "SWB not empty, link busy, cluster busy or a spawn
//    request pending", and done_o pulses exactly when busy_o falls;
//  - a conflict from a TEU raises conflict_o and a kill in the next clock lasting one
//    clock, and nothing is forwarded during the kill; conflict_o stays set until the
//    CPU's next spawn is accepted while the accelerator is idle.
module tb_control_unit;
  import npa_pkg::*;

  localparam int NT = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cv = 1'b0, cr, busy, done, conf, swv, swr = 1'b0, swe = 1'b1, lb = 1'b0, kill;
  spawn_t             cs = '0, sws;
  logic [NT-1:0]      tv = '0, tr, tc = '0, cb = '0;
  spawn_t [NT-1:0]    ts = '0;

  control_unit dut (
    .clk(clk), .rst_n(rst_n), .cpu_spawn_valid_i(cv), .cpu_spawn_i(cs),
    .cpu_spawn_ready_o(cr), .busy_o(busy), .done_o(done), .conflict_o(conf),
    .teu_spawn_valid_i(tv), .teu_spawn_i(ts), .teu_spawn_ready_o(tr),
    .teu_conflict_i(tc), .swb_valid_o(swv), .swb_spawn_o(sws), .swb_ready_i(swr),
    .swb_empty_i(swe), .link_busy_i(lb), .cluster_busy_i(cb), .kill_o(kill)
  );

  int checks = 0, failures = 0, n_fwd = 0, n_kill = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int  waited [NT+1];
  bit  prev_active = 0, prev_busy = 0, prev_conf_in = 0, prev_kill = 0;

  // per-clock checks, just before the clock edge
  task automatic check_clock();
    int nr = $countones({cr, tr});
    bit any_req = (cv || tv != '0) && !kill;
    chk(nr <= 1, "more than one requester told ready");
    chk(swv == any_req, "SWB valid");
    chk(nr == (swv && swr ? 1 : 0), "ready only when the SWB takes the command");
    if (cr) chk(sws == cs, "CPU command forwarded");
    for (int i = 0; i < NT; i++) if (tr[i]) chk(sws == ts[i], $sformatf("TEU %0d command", i));
    chk(busy == prev_active, "busy is the registered activity");
    chk(done == (busy && !(!swe || lb || cb != '0 || any_req)), "done pulse");
    chk(kill == (prev_conf_in && !prev_kill), "kill follows a conflict by one clock");
    if (kill) n_kill++;
    if (kill) chk(!swv, "nothing forwarded during a kill");
    // fairness
    for (int i = 0; i <= NT; i++) begin
      bit v = (i == NT) ? cv : tv[i];
      bit r = (i == NT) ? cr : tr[i];
      if (v && !r && swv && swr) waited[i]++;
      if (r || !v) waited[i] = 0;
      chk(waited[i] <= NT, $sformatf("requester %0d starved", i));
    end
    prev_active  = !swe || lb || cb != '0 || any_req;
    prev_conf_in = tc != '0;
    prev_kill    = kill;
    if (swv && swr) n_fwd++;
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= NT; i++) waited[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    prev_active = 0;
    for (int t = 0; t < 5000; t++) begin
      // new requests (held until accepted)
      if (!cv || cr) begin
        cv = ($urandom % 4) == 0;
        cs = '{seed: $urandom, count: $urandom % 8, label: $urandom};
      end
      for (int i = 0; i < NT; i++)
        if (!tv[i] || tr[i]) begin
          tv[i] = ($urandom % 3) == 0;
          ts[i] = '{seed: $urandom, count: $urandom % 8, label: $urandom};
        end
      swr = ($urandom % 4) != 0;
      swe = ($urandom % 3) == 0;
      lb  = ($urandom % 5) == 0;
      cb  = (($urandom % 3) == 0) ? NT'($urandom) : '0;
      tc  = (t % 500 == 250) ? NT'(1) << ($urandom % NT) : '0;
      #1;
      check_clock();
      @(negedge clk);
    end
    // drain to idle: conflict stays set until the CPU's next spawn while idle
    tc = NT'(1);
    cv = 1'b0; tv = '0; swe = 1'b1; lb = 1'b0; cb = '0; swr = 1'b1;
    #1 check_clock();
    @(negedge clk);
    tc = '0;
    repeat (4) begin
      #1 check_clock();
      @(negedge clk);
    end
    chk(conf && !busy, "conflict verdict held while idle");
    cv = 1'b1;
    #1 check_clock();
    @(negedge clk);
    cv = 1'b0;
    #1 check_clock();
    chk(!conf, "conflict verdict cleared by the next CPU spawn");
    chk(n_kill > 5, "kills");
    $display("forwarded=%0d kills=%0d", n_fwd, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
