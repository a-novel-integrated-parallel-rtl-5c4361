// tb_stencil_mem: checks a cluster's instruction memory at its default size (256 words,
// 6 read ports: five TRSs and the TEU).
//
// The memory is loaded with random words through the write port (word index) and every read port is
// then driven with random byte addresses each clock. Each port must return, in the same
// clock, the word stored at that address (word index = address bits above the two byte
// bits), and a write must be visible on every port from the next clock on.
module tb_stencil_mem;
  import npa_pkg::*;

  localparam int WORDS = 256, NR = 6;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                    we = 1'b0;
  logic [7:0]              wa = '0;
  logic [31:0]             wd = '0;
  logic [NR-1:0][31:0]     ra, rd;

  stencil_mem dut (
    .clk(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd)
  );

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  logic [31:0] model [WORDS];

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = '0;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      we = 1'b1; wa = 8'(w); wd = $urandom;
      model[w] = wd;
    end
    @(negedge clk);
    we = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int k = 0; k < NR; k++) ra[k] = 4 * ($urandom % WORDS);
      // occasionally rewrite a word read by port 0 and check it next clock
      we = (t % 7) == 0;
      wa = 8'(ra[0] / 4);
      wd = $urandom;
      #1;
      for (int k = 0; k < NR; k++)
        chk(rd[k] == model[ra[k] / 4], $sformatf("port %0d address %0h", k, ra[k]));
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
