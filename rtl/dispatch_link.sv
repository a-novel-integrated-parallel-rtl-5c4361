// dispatch_link: pipelined interconnect carrying dispatched threads from the Spawn
// Waiting Buffer to the TRS clusters.
//
// The accelerator connects the SWB to the TRS clusters through a pipelined, buffered
// network and its evaluation charges a fixed 5-cycle transfer. This block models that
// network as LAT register stages per TRS lane: a thread granted to TRS i in clock t
// arrives at TRS i in clock t+LAT. Every lane has its own path, so there is no
// contention; the document leaves the network's topology open (it names a
// Mesh-of-Trees as one candidate), and a plain pipeline per lane is this design's
// simplest stand-in that keeps the stated latency.
//
// Interface: valid_i[i]/thr_i[i] enter, valid_o[i]/thr_o[i] leave LAT clocks later.
// flush_i drops everything in flight (conflict halt). busy_o is set while any thread
// is in flight. LAT must be at least 1.
module dispatch_link
  import npa_pkg::*;
#(
  parameter int unsigned N_TRS = 50,
  parameter int unsigned LAT   = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                flush_i,
  input  logic [N_TRS-1:0]    valid_i,
  input  thread_t [N_TRS-1:0] thr_i,
  output logic [N_TRS-1:0]    valid_o,
  output thread_t [N_TRS-1:0] thr_o,
  output logic                busy_o
);
  logic    [LAT-1:0][N_TRS-1:0] v_q;
  thread_t [LAT-1:0][N_TRS-1:0] d_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
    end else if (flush_i) begin
      v_q <= '0;
    end else begin
      v_q[0] <= valid_i;
      for (int s = 1; s < LAT; s++) v_q[s] <= v_q[s-1];
    end
  end

  always_ff @(posedge clk) begin
    d_q[0] <= thr_i;
    for (int s = 1; s < LAT; s++) d_q[s] <= d_q[s-1];
  end

  always_comb begin
    valid_o = v_q[LAT-1];
    thr_o   = d_q[LAT-1];
    busy_o  = (v_q != '0);
  end

endmodule
