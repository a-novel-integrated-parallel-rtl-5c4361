// tb_main_mem_bank: checks one main-memory bank at its default size (65536 lines of
// 512 bits, 100-clock latency).
//
// Random lines are written, then read back in random order, one read at a time. Every
// read must be answered exactly LAT clocks after it was issued, with the last data
// written to that line, and rsp_valid_o must be a single-clock pulse. A write posted in
// the same clock as a read of the same line must be visible to that read (this is how
// a cache bank writes back a victim and refills in one go). busy_o must be set while a
// read is outstanding, and range_err_o must flag a line index beyond the capacity.
module tb_main_mem_bank;
  import npa_pkg::*;

  localparam int LINES = 65536, LB = 512, LAT = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          rdv = 1'b0, wrv = 1'b0, rspv, busy, rerr;
  logic [31:0]   rdl = '0, wrl = '0;
  logic [LB-1:0] wrd = '0, rspd;

  main_mem_bank dut (
    .clk(clk), .rst_n(rst_n), .rd_valid_i(rdv), .rd_line_i(rdl), .rsp_valid_o(rspv),
    .rsp_data_o(rspd), .wr_valid_i(wrv), .wr_line_i(wrl), .wr_data_i(wrd), .busy_o(busy),
    .range_err_o(rerr)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [LB-1:0] model [int];
  int lines [$];

  function automatic logic [LB-1:0] rnd_line();
    logic [LB-1:0] v;
    for (int k = 0; k < LB / 32; k++) v[32*k +: 32] = $urandom;
    return v;
  endfunction

  task automatic write_line(int l, logic [LB-1:0] d);
    @(negedge clk);
    wrv = 1'b1; wrl = l; wrd = d;
    #1 chk(rerr == (l >= LINES), "range error flag");
    @(negedge clk);
    wrv = 1'b0;
    model[l % LINES] = d;
  endtask

  // read a line, optionally posting a write to the same line in the same clock
  task automatic read_line(int l, bit with_write);
    int n;
    logic [LB-1:0] d;
    @(negedge clk);
    rdv = 1'b1; rdl = l;
    if (with_write) begin
      d = rnd_line();
      wrv = 1'b1; wrl = l; wrd = d;
      model[l] = d;
    end
    @(negedge clk);
    rdv = 1'b0; wrv = 1'b0;
    n = 1;
    while (!rspv && n < 3 * LAT) begin
      chk(busy, "busy while a read is outstanding");
      @(negedge clk);
      n++;
    end
    chk(n == LAT, $sformatf("read latency %0d, expected %0d", n, LAT));
    chk(rspd == model[l], $sformatf("line %0d data", l));
    @(negedge clk);
    chk(!rspv && !busy, "response is a single pulse");
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      int l = (k < 2) ? k * (LINES - 1) : $urandom % LINES;
      write_line(l, rnd_line());
      lines.push_back(l);
    end
    lines.shuffle();
    foreach (lines[k]) read_line(lines[k], 1'b0);
    for (int k = 0; k < 8; k++) read_line(lines[k], 1'b1);
    // a line index beyond the capacity is flagged (and wraps)
    write_line(LINES + 3, rnd_line());
    read_line(3, 1'b0);
    // overwrite and read again
    for (int k = 0; k < 8; k++) begin
      write_line(lines[k], rnd_line());
      read_line(lines[k], 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
