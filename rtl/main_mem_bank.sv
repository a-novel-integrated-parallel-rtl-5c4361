// main_mem_bank: one bank of the accelerator's multi-bank main memory.
//
// Cache misses go to a main memory made of 8 banks with a 100-clock latency; each
// cache bank owns one main-memory bank. This block is that bank as a line-wide storage
// array: a line read requested in clock t is answered in clock t+LAT; a line write
// (victim write-back) takes effect at the clock edge and is therefore seen by any later
// read. Only one read is outstanding at a time, which is all its cache bank (blocking
// on a miss) ever issues. The capacity, LINES lines per bank, is not given by the
// document; the default (4 MB per bank, 32 MB in all) is this design's choice and is
// enough for the SAT instances the document evaluates.
//
// Interface: rd_valid_i/rd_line_i -> rsp_valid_o/rsp_data_o LAT clocks later;
// wr_valid_i/wr_line_i/wr_data_i. Line indices wrap at LINES; range_err_o flags, in
// the same clock, a read or write whose line index is LINES or more.
module main_mem_bank
  import npa_pkg::*;
#(
  parameter int unsigned LINES     = 65536,
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned LAT       = 100
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  rd_valid_i,
  input  logic [XLEN-1:0]       rd_line_i,
  output logic                  rsp_valid_o,
  output logic [LINE_BITS-1:0]  rsp_data_o,
  input  logic                  wr_valid_i,
  input  logic [XLEN-1:0]       wr_line_i,
  input  logic [LINE_BITS-1:0]  wr_data_i,
  output logic                  busy_o,
  output logic                  range_err_o   // a line index beyond LINES was used
);
  localparam int unsigned AW = $clog2(LINES);

  logic [LINE_BITS-1:0] mem_q [LINES];
  logic                 busy_q;
  logic [AW-1:0]        line_q;
  logic [$clog2(LAT+1)-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (wr_valid_i) mem_q[wr_line_i[AW-1:0]] <= wr_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      line_q <= '0;
      cnt_q  <= '0;
    end else begin
      assert (!(rd_valid_i && busy_q));      // one read outstanding
      if (rd_valid_i && !busy_q) begin
        busy_q <= 1'b1;
        line_q <= rd_line_i[AW-1:0];
        cnt_q  <= ($clog2(LAT+1))'(LAT - 1);
      end else if (busy_q) begin
        if (cnt_q == '0) busy_q <= 1'b0;
        else             cnt_q  <= cnt_q - 1'b1;
      end
    end
  end

  always_comb begin
    rsp_valid_o = busy_q && (cnt_q == '0);
    rsp_data_o  = mem_q[line_q];
    busy_o      = busy_q;
    range_err_o = (rd_valid_i && (rd_line_i >> AW) != '0) ||
                  (wr_valid_i && (wr_line_i >> AW) != '0);
  end


endmodule
