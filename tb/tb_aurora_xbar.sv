// tb_aurora_xbar: self-checking test of the message crossbar.
//
// First a directed flit checks the one-cycle crossing. Then every input
// sends a stream of flits to random outputs while the outputs take flits
// with random back-pressure. Each flit carries its source and a per
// (source, destination) sequence number; the checker verifies that every
// flit arrives at the output it names, that flits between one pair stay in
// order, and that none is lost or duplicated. It also counts cycles in which
// two inputs competed for one output, and fails if that never happened.
module tb_aurora_xbar;
  import aurora_pkg::*;

  localparam int unsigned NI = 4;
  localparam int unsigned NO = 3;
  localparam int unsigned PER_INPUT = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NI-1:0] in_valid, in_ready;
  msg_t          in_msg [NI];
  logic [NO-1:0] out_valid, out_ready;
  msg_t          out_msg [NO];

  aurora_xbar #(.N_IN(NI), .N_OUT(NO)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned sent_seq [NI][NO];
  int unsigned exp_seq  [NI][NO];
  int unsigned n_recv = 0, n_sent = 0, n_conflict = 0;
  bit random_phase = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // receiver / scoreboard
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NO; o++) begin
      if (out_valid[o] && out_ready[o]) begin
        int s;
        s = int'(out_msg[o].src);
        check(int'(out_msg[o].dst) == o, $sformatf("flit for %0d left at output %0d", out_msg[o].dst, o));
        check(out_msg[o].cmd.rs1 == 64'(exp_seq[s][o]),
              $sformatf("out %0d from %0d: seq %0d, expected %0d", o, s, out_msg[o].cmd.rs1, exp_seq[s][o]));
        exp_seq[s][o] = exp_seq[s][o] + 1;
        n_recv++;
      end
    end
    for (int o = 0; o < NO; o++) begin
      int n;
      n = 0;
      for (int i = 0; i < NI; i++) if (in_valid[i] && int'(in_msg[i].dst) == o) n++;
      if (n > 1) n_conflict++;
    end
    if (random_phase) for (int o = 0; o < NO; o++) out_ready[o] <= ($urandom_range(0, 3) != 0);
  end

  // one driver per input
  for (genvar i = 0; i < NI; i++) begin : g_drv
    initial begin
      in_valid[i] = 1'b0;
      in_msg[i]   = '0;
      wait (random_phase);
      for (int k = 0; k < PER_INPUT; k++) begin
        int d;
        d = $urandom_range(0, NO - 1);
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) @(negedge clk);
        in_msg[i].kind = MSG_CMD;
        in_msg[i].src  = ID_W'(i);
        in_msg[i].dst  = ID_W'(d);
        in_msg[i].cmd.rs1 = 64'(sent_seq[i][d]);
        in_msg[i].cmd.rs2 = 64'($urandom);
        sent_seq[i][d]++;
        in_valid[i] = 1'b1;
        do @(posedge clk); while (!in_ready[i]);
        n_sent++;
        @(negedge clk);
        in_valid[i] = 1'b0;
      end
    end
  end

  initial begin
    for (int i = 0; i < NI; i++)
      for (int o = 0; o < NO; o++) begin sent_seq[i][o] = 0; exp_seq[i][o] = 0; end
    out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: one flit from input 2 to output 1, must be visible one cycle later
    @(negedge clk);
    in_msg[2].kind = MSG_ACQ_REQ;
    in_msg[2].src  = ID_W'(2);
    in_msg[2].dst  = ID_W'(1);
    in_msg[2].cmd  = '0;
    sent_seq[2][1] = 1;
    in_valid[2] = 1'b1;
    @(posedge clk);
    check(in_ready[2] == 1'b1, "lone flit not accepted at once");
    @(negedge clk);
    in_valid[2] = 1'b0;
    check(out_valid == 3'b010, $sformatf("lone flit: out_valid=%b one cycle later, expected 010", out_valid));
    check(out_msg[1].kind == MSG_ACQ_REQ && out_msg[1].src == 2, "lone flit content");
    @(negedge clk);
    check(out_valid == 3'b000, "lone flit delivered twice");
    random_phase = 1;
    wait (n_sent == NI * PER_INPUT);
    out_ready = '1;
    repeat (20) @(posedge clk);
    check(n_recv == NI * PER_INPUT + 1, $sformatf("received %0d flits, sent %0d", n_recv, NI * PER_INPUT + 1));
    check(n_conflict > 0, "no output contention happened");
    $display("contention cycles: %0d", n_conflict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
