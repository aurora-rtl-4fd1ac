// rr_arbiter: round-robin arbiter, N requesters.
//
// gnt is one-hot (or zero when nobody requests) and is a combinational
// function of req and an internal priority pointer. When the caller signals
// `advance` (the granted request was taken this cycle) the pointer moves to
// the requester just after the winner, so every requester that keeps its
// request up is served within N grants. Reset gives requester 0 the first
// priority. Helper of the message crossbar; the policy is this design's
// choice.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [PW-1:0] ptr;
  logic [PW-1:0] win;
  logic          found;

  always_comb begin
    gnt   = '0;
    win   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      int unsigned idx;
      idx = (int'(ptr) + k) % N;
      if (!found && req[idx]) begin
        found    = 1'b1;
        win      = PW'(idx);
        gnt[idx] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 ptr <= '0;
    else if (advance && found)  ptr <= (int'(win) == N - 1) ? '0 : win + PW'(1);
  end
endmodule
