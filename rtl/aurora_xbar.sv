// aurora_xbar: crossbar transport for AuRORA messages.
//
// N_IN sources, N_OUT destinations. Each input presents one msg_t flit with a
// valid/ready handshake; the flit goes to the output whose index equals its
// dst field. Every output has its own round-robin arbiter and a one-flit
// output register, so a flit crosses the crossbar in exactly one clock cycle
// when its output is free, and an output can take a new flit in the same
// cycle its current one is taken (full throughput per output). Flits from one
// source to one destination stay in order. The crossbar is one of the two
// transports AuRORA is evaluated with; its arbitration, the output register
// and the one-cycle latency are this design's choices.
//
// Handshake: a flit moves when valid and ready are both high at a clock edge.
// in_ready may depend on in_valid (arbitration); out_valid does not depend on
// out_ready. A flit whose dst is not below N_OUT is a protocol error (asserted).
module aurora_xbar
  import aurora_pkg::*;
#(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 10
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  in_valid,
  output logic [N_IN-1:0]  in_ready,
  input  msg_t             in_msg    [N_IN],
  output logic [N_OUT-1:0] out_valid,
  input  logic [N_OUT-1:0] out_ready,
  output msg_t             out_msg   [N_OUT]
);
  logic [N_IN-1:0] req  [N_OUT];
  logic [N_IN-1:0] gnt  [N_OUT];
  logic [N_OUT-1:0] load;
  msg_t            sel  [N_OUT];

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < N_IN; i++)
        req[o][i] = in_valid[i] && (int'(in_msg[i].dst) == o);
    end

    assign load[o] = !out_valid[o] || out_ready[o];

    rr_arbiter #(.N(N_IN)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req[o]),
      .advance (load[o]),
      .gnt     (gnt[o])
    );

    always_comb begin
      sel[o] = in_msg[0];
      for (int i = 0; i < N_IN; i++)
        if (gnt[o][i]) sel[o] = in_msg[i];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
      end else if (load[o]) begin
        out_valid[o] <= |req[o];
      end
    end

    always_ff @(posedge clk) begin
      if (load[o] && |req[o]) out_msg[o] <= sel[o];
    end
  end

  always_comb begin
    in_ready = '0;
    for (int o = 0; o < N_OUT; o++)
      in_ready |= gnt[o] & {N_IN{load[o]}};
  end

  for (genvar i = 0; i < N_IN; i++) begin : g_chk
    a_dst_in_range: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] |-> int'(in_msg[i].dst) < N_OUT)
      else $error("aurora_xbar: input %0d sends to nonexistent output %0d", i, in_msg[i].dst);
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] && !in_ready[i] |=> in_valid[i] && $stable(in_msg[i]))
      else $error("aurora_xbar: input %0d dropped or changed a waiting flit", i);
  end
endmodule
