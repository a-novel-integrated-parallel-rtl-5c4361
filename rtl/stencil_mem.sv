// stencil_mem: a cluster's local copy of the thread code ("stencils").
//
// All threads of one spawn run the same code on different data. The TEUs keep their
// own copy of the thread routines so that they never fetch instructions through the
// shared cache; this block is that copy, shared by the TEU and the TRSs of one
// cluster (letting the TRSs read the same copy is this design's choice). It is a
// word array with one write port, used by the host to load the code before the
// accelerator starts, and NR combinational read ports, one per TRS plus one for the
// TEU. Addresses are byte addresses; bits [1:0] are ignored and the word index
// wraps at WORDS. The size (256 words) is not given by the document.
//
// Interface: we_i/waddr_i/wdata_i write in the clock edge; raddr_i[k] -> rdata_o[k]
// in the same clock.
module stencil_mem
  import npa_pkg::*;
#(
  parameter int unsigned WORDS = 256,
  parameter int unsigned NR    = 6
) (
  input  logic                      clk,
  input  logic                      we_i,
  input  logic [$clog2(WORDS)-1:0]  waddr_i,      // word index
  input  logic [XLEN-1:0]           wdata_i,
  input  logic [NR-1:0][XLEN-1:0]   raddr_i,
  output logic [NR-1:0][XLEN-1:0]   rdata_o
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem_q [WORDS];

  always_ff @(posedge clk) begin
    if (we_i) mem_q[waddr_i] <= wdata_i;
  end

  always_comb begin
    for (int k = 0; k < NR; k++) rdata_o[k] = mem_q[raddr_i[k][AW+1:2]];
  end

endmodule
