// tb_dispatch_link: checks the SWB-to-TRS transfer network model.
//
// Default size (50 lanes, 5-clock latency). Random threads enter random lanes every
// clock; a scoreboard records each one with its entry clock and checks that it leaves
// on the same lane exactly LAT clocks later with its seed, id and label unchanged, that
// nothing else ever leaves, and that busy_o is set exactly while a thread is in flight.
// A flush in the middle of traffic must drop every thread in flight.
module tb_dispatch_link;
  import npa_pkg::*;

  localparam int N = 50, LAT = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              flush = 1'b0, busy;
  logic [N-1:0]      vin = '0, vout;
  thread_t [N-1:0]   tin, tout;

  dispatch_link dut (
    .clk(clk), .rst_n(rst_n), .flush_i(flush), .valid_i(vin), .thr_i(tin),
    .valid_o(vout), .thr_o(tout), .busy_o(busy)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // expected arrivals: ring of LAT+1 slots indexed by clock
  logic    [LAT:0][N-1:0] ev;
  thread_t [LAT:0][N-1:0] et;
  int cyc = 0, inflight = 0, delivered = 0;

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // outputs for this clock
      for (int i = 0; i < N; i++) begin
        chk(vout[i] == ev[cyc % (LAT+1)][i], $sformatf("lane %0d valid at clock %0d", i, cyc));
        if (vout[i] && ev[cyc % (LAT+1)][i]) begin
          chk(tout[i] == et[cyc % (LAT+1)][i], $sformatf("lane %0d thread", i));
          delivered++;
        end
      end
      chk(busy == (inflight != 0), "busy");
      inflight -= $countones(ev[cyc % (LAT+1)]);
      ev[cyc % (LAT+1)] = '0;
      // new inputs
      flush = (t == 1000);
      for (int i = 0; i < N; i++) begin
        vin[i] = ($urandom % 4) == 0;
        tin[i] = '{seed: $urandom, tid: $urandom, label: $urandom};
      end
      if (flush) begin
        ev = '0;
        inflight = 0;
      end else begin
        ev[(cyc + LAT) % (LAT+1)] = vin;
        et[(cyc + LAT) % (LAT+1)] = tin;
        inflight += $countones(vin);
      end
      @(posedge clk);
      cyc++;
    end
    chk(delivered > 1000, "too few threads delivered");
    $display("delivered=%0d", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
