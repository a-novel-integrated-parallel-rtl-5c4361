// omega_net: N x N Omega multistage interconnection network (N = 2**LOGN), bufferless,
// with destination-tag routing.
//
// The accelerator connects the CPU, the TRSs and the TEUs to the banks of the shared
// cache through an Omega network; one instance carries requests towards the banks and a
// second one carries responses back. An Omega network has LOGN stages; each stage is a
// perfect shuffle of the N lines (line i moves to i rotated left by one bit) followed by
// N/2 two-by-two switches. A message's destination address is its routing tag: at stage
// s the switch sends it to its upper (0) or lower (1) output according to destination
// bit LOGN-1-s, which after LOGN stages lands it on output dest.
//
// The switches hold no buffers: when the two inputs of a switch want the same output,
// one wins and the other is dropped for this clock; a message also fails when its
// output's receiver is not ready. A sender learns in the same clock through grant_o
// whether its message got through, and keeps presenting it until it does. The winner
// alternates every clock, and between neighbouring switches, so that no input is
// locked out. Being bufferless and single-clock is this design's choice: the document
// names the network and its place but not its switch design.
//
// Interface: valid_i/dest_i/data_i per input; out_valid_o/out_data_o per output with
// out_ready_i from the receiver; grant_o[i] = input i's message was delivered this
// clock. conflict_o counts the stages in which some switch dropped a message this clock.
module omega_net #(
  parameter int unsigned LOGN = 6,
  parameter int unsigned W    = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [(1<<LOGN)-1:0]           valid_i,
  input  logic [(1<<LOGN)-1:0][LOGN-1:0] dest_i,
  input  logic [(1<<LOGN)-1:0][W-1:0]    data_i,
  output logic [(1<<LOGN)-1:0]           grant_o,
  output logic [(1<<LOGN)-1:0]           out_valid_o,
  output logic [(1<<LOGN)-1:0][W-1:0]    out_data_o,
  input  logic [(1<<LOGN)-1:0]           out_ready_i,
  output logic [LOGN:0]                  conflict_o
);
  localparam int unsigned N = 1 << LOGN;

  typedef struct packed {
    logic            v;
    logic [LOGN-1:0] src;
    logic [LOGN-1:0] dst;
    logic [W-1:0]    d;
  } msg_t;

  msg_t [N-1:0]         line0, last;
  logic                 prio_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prio_q <= 1'b0;
    else        prio_q <= ~prio_q;
  end

  logic [LOGN-1:0] stage_conf;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      line0[i].v   = valid_i[i];
      line0[i].src = LOGN'(i);
      line0[i].dst = dest_i[i];
      line0[i].d   = data_i[i];
    end
  end

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    msg_t [N-1:0] inp, outp, shuf;
    if (s == 0) begin : g_first
      assign inp = line0;
    end else begin : g_next
      assign inp = g_stage[s-1].outp;
    end
    // perfect shuffle: position i -> i rotated left by one bit
    for (genvar i = 0; i < N; i++) begin : g_shuf
      assign shuf[((i << 1) | (i >> (LOGN - 1))) & (N - 1)] = inp[i];
    end
    logic [N/2-1:0] sw_conf;
    // 2x2 switches: a message passes unless the other input wants the same output and
    // has priority this clock
    for (genvar j = 0; j < N / 2; j++) begin : g_sw
      msg_t a, b;
      logic pa, pb, upper_first, a_ok, b_ok;
      always_comb begin
        a  = shuf[2*j];
        b  = shuf[2*j + 1];
        pa = a.dst[LOGN-1-s];
        pb = b.dst[LOGN-1-s];
        upper_first = prio_q ^ 1'(j) ^ 1'(s);
        sw_conf[j] = a.v && b.v && (pa == pb);
        a_ok = a.v && !(sw_conf[j] && !upper_first);
        b_ok = b.v && !(sw_conf[j] &&  upper_first);
        outp[2*j]     = (a_ok && !pa) ? a : ((b_ok && !pb) ? b : '0);
        outp[2*j + 1] = (a_ok &&  pa) ? a : ((b_ok &&  pb) ? b : '0);
      end
    end
    assign stage_conf[s] = (sw_conf != '0);
  end

  assign last = g_stage[LOGN-1].outp;

  always_comb begin
    conflict_o = '0;
    for (int s = 0; s < LOGN; s++) conflict_o = conflict_o + (LOGN+1)'(stage_conf[s]);
    grant_o = '0;
    for (int o = 0; o < N; o++) begin
      out_valid_o[o] = last[o].v;
      out_data_o[o]  = last[o].d;
      if (last[o].v && out_ready_i[o]) grant_o[last[o].src] = 1'b1;
    end
  end

  // Destination-tag routing must deliver every message to the output it names.
  always_comb begin
    for (int o = 0; o < N; o++)
      assert (!last[o].v || last[o].dst == LOGN'(o));
  end

endmodule
