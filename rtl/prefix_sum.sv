// prefix_sum: one-cycle (purely combinational) parallel prefix sum over N one-bit inputs.
//
// The Spawn Waiting Buffer feeds it the Idle bits of all Thread Reservation Stations
// and gets, for every TRS, how many idle TRSs lie below it (the exclusive prefix sum,
// i.e. the rank of this TRS among the idle ones) plus the total number of idle TRSs.
// The rank is the index of the thread an idle TRS receives, so all idle TRSs are
// served in parallel in one clock, as the accelerator's dispatch requires.
//
// Insides: a Kogge-Stone parallel-prefix adder tree, log2(N) levels of W-bit adders.
// The choice of Kogge-Stone is this design's own; the document asks only for a
// one-cycle prefix-sum unit.
//
// Interface: bits_i[N] in; excl_o[i] = sum(bits_i[0..i-1]); incl_o[i] = excl_o[i] + bits_i[i];
// total_o = sum of all bits. No clock: combinational.
module prefix_sum #(
  parameter int unsigned N = 50,
  parameter int unsigned W = $clog2(N + 1)
) (
  input  logic [N-1:0]         bits_i,
  output logic [N-1:0][W-1:0]  excl_o,
  output logic [N-1:0][W-1:0]  incl_o,
  output logic [W-1:0]         total_o
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [LEVELS:0][N-1:0][W-1:0] lvl;

  for (genvar i = 0; i < N; i++) begin : g_in
    assign lvl[0][i] = W'(bits_i[i]);
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar i = 0; i < N; i++) begin : g_node
      if (i >= (1 << l)) begin : g_add
        assign lvl[l+1][i] = lvl[l][i] + lvl[l][i - (1 << l)];
      end else begin : g_pass
        assign lvl[l+1][i] = lvl[l][i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      incl_o[i] = lvl[LEVELS][i];
      excl_o[i] = lvl[LEVELS][i] - W'(bits_i[i]);
    end
    total_o = lvl[LEVELS][N-1];
  end

endmodule
