// tb_aurora_manager: self-checking test of one AuRORA manager in front of a
// behavioural accelerator.
//
// The testbench plays the clients: it sends acquire, state, command and
// release messages from two clients (1 and 3) to manager 2 and checks every
// reply flit, the shadowed state driven to the accelerator, which commands
// reach the accelerator (and with which opcode), the results the
// accelerator computes with the shadowed satp, the one-cycle reply latency,
// and that a release is acknowledged only after the accelerator has
// drained. Replies are taken with random back-pressure.
module tb_aurora_manager;
  import aurora_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid, in_ready;
  msg_t        in_msg;
  logic        out_valid, out_ready;
  msg_t        out_msg;
  logic        acc_cmd_valid, acc_cmd_ready;
  rocc_cmd_t   acc_cmd;
  logic        acc_resp_valid, acc_resp_ready;
  rocc_resp_t  acc_resp;
  logic        acc_busy;
  arch_state_t acc_state;
  logic        acquired;
  logic [ID_W-1:0] owner;
  logic        prot_err;
  int unsigned lat_extra;
  int unsigned n_cmds;
  logic [6:0]  last_opcode;

  aurora_manager #(.MY_ID(4'd2)) dut (.*);

  accel_model #(.LAT(3)) u_acc (
    .clk, .rst_n,
    .cmd_valid  (acc_cmd_valid), .cmd_ready (acc_cmd_ready), .cmd (acc_cmd),
    .resp_valid (acc_resp_valid), .resp_ready (acc_resp_ready), .resp (acc_resp),
    .busy (acc_busy), .state (acc_state), .lat_extra, .n_cmds, .last_opcode
  );

  int checks = 0, failures = 0;
  int n_prot = 0;
  bit bp = 0;
  msg_t rxq [$];
  int   rx_cycle [$];
  int   cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid && out_ready) begin
      rxq.push_back(out_msg);
      rx_cycle.push_back(cyc);
    end
    if (prot_err) n_prot++;
    out_ready <= bp ? ($urandom_range(0, 2) == 0) : 1'b1;
  end

  int sent_cycle;
  task automatic send(input msg_kind_e k, input int src, input rocc_cmd_t c);
    @(negedge clk);
    in_msg      = '0;
    in_msg.kind = k;
    in_msg.src  = ID_W'(src);
    in_msg.dst  = ID_W'(2);
    in_msg.cmd  = c;
    in_valid    = 1'b1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    sent_cycle = cyc;
    in_valid = 1'b0;
  endtask

  task automatic expect_msg(input msg_kind_e k, input int dst, input logic [63:0] d, input string what);
    int t;
    t = 0;
    while (rxq.size() == 0 && t < 200) begin @(posedge clk); t++; end
    if (rxq.size() == 0) begin
      check(0, {what, ": no reply"});
    end else begin
      msg_t m;
      m = rxq.pop_front();
      void'(rx_cycle.pop_front());
      check(m.kind == k && int'(m.dst) == dst && m.src == 2 && m.cmd.rs1 == d,
            $sformatf("%s: got kind %0d dst %0d src %0d data %h", what, m.kind, m.dst, m.src, m.cmd.rs1));
    end
  endtask

  function automatic rocc_cmd_t mk(input logic [6:0] opc, input logic xd, input logic [4:0] rd,
                                   input logic [63:0] a, input logic [63:0] b);
    rocc_cmd_t c;
    c = '0;
    c.inst.opcode = opc;
    c.inst.xd     = xd;
    c.inst.rd     = rd;
    c.rs1 = a;
    c.rs2 = b;
    return c;
  endfunction

  localparam logic [63:0] SATP_A = 64'h8000_0000_0001_2345;
  localparam logic [63:0] SATP_B = 64'h8000_0000_0006_789a;

  initial begin
    in_valid  = 1'b0;
    in_msg    = '0;
    lat_extra = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!acquired, "acquired out of reset");

    // client 1 acquires: reply one cycle after acceptance
    send(MSG_ACQ_REQ, 1, mk('0, 0, 0, SATP_A, 64'h3));
    @(posedge clk);
    @(negedge clk);
    check(rxq.size() == 1 && rx_cycle[0] == sent_cycle + 1,
          $sformatf("acquire reply latency: sent %0d, replied %0p", sent_cycle, rx_cycle));
    expect_msg(MSG_ACQ_RESP, 1, 64'd1, "grant to client 1");
    check(acquired && owner == 1, "owner after grant");
    check(acc_state.satp == SATP_A && acc_state.status == 64'h3, "shadowed state after acquire");

    // client 3 is refused
    send(MSG_ACQ_REQ, 3, mk('0, 0, 0, SATP_B, 64'h0));
    expect_msg(MSG_ACQ_RESP, 3, 64'd0, "deny to client 3");
    check(owner == 1 && acc_state.satp == SATP_A, "deny must not change owner or state");

    // forwarded command, opcode rewritten to custom3
    send(MSG_CMD, 1, mk(OPC_CUSTOM1, 1, 5'd7, 64'd100, 64'd23));
    expect_msg(MSG_ACC_RESP, 1, 64'd123 + SATP_A, "response of first command");
    check(last_opcode == OPC_CUSTOM3, "opcode rewritten for the accelerator");
    check(n_cmds == 1, "one command executed");

    // state update from the owner
    send(MSG_STATE, 1, mk('0, 0, 0, SATP_B, 64'h1));
    @(posedge clk);
    check(acc_state.satp == SATP_B && acc_state.status == 64'h1, "state update taken");
    send(MSG_CMD, 1, mk(OPC_CUSTOM2, 1, 5'd9, 64'd5, 64'd6));
    expect_msg(MSG_ACC_RESP, 1, 64'd11 + SATP_B, "response uses updated state");

    // non-owner command and state are dropped
    send(MSG_CMD, 3, mk(OPC_CUSTOM1, 1, 5'd1, 64'd1, 64'd1));
    send(MSG_STATE, 3, mk('0, 0, 0, 64'hdead, 64'h0));
    repeat (10) @(posedge clk);
    check(n_cmds == 2, "non-owner command reached the accelerator");
    check(acc_state.satp == SATP_B, "non-owner state taken");
    check(n_prot == 2, $sformatf("prot_err pulses %0d, expected 2", n_prot));
    check(rxq.size() == 0, "reply to a dropped message");

    // non-owner release is refused
    send(MSG_REL_REQ, 3, '0);
    expect_msg(MSG_REL_ACK, 3, 64'd0, "non-owner release refused");
    check(acquired && owner == 1, "still owned by client 1");

    // release while the accelerator is busy: ack only after drain
    lat_extra = 30;
    bp = 1;
    send(MSG_CMD, 1, mk(OPC_CUSTOM1, 1, 5'd4, 64'd1000, 64'd1));
    send(MSG_REL_REQ, 1, '0);
    repeat (5) @(posedge clk);
    check(acc_busy && acquired && rxq.size() == 0, "release acknowledged before drain");
    expect_msg(MSG_ACC_RESP, 1, 64'd1001 + SATP_B, "response before release ack");
    expect_msg(MSG_REL_ACK, 1, 64'd1, "release ack after drain");
    repeat (2) @(posedge clk);
    check(!acquired, "manager idle after release");
    bp = 0;
    lat_extra = 0;

    // now client 3 gets it
    send(MSG_ACQ_REQ, 3, mk('0, 0, 0, SATP_B, 64'h0));
    expect_msg(MSG_ACQ_RESP, 3, 64'd1, "grant to client 3 after release");
    check(owner == 3, "owner is client 3");
    // re-acquire by the owner is granted again
    send(MSG_ACQ_REQ, 3, mk('0, 0, 0, SATP_A, 64'h0));
    expect_msg(MSG_ACQ_RESP, 3, 64'd1, "owner re-acquire granted");
    check(acc_state.satp == SATP_A, "owner re-acquire refreshes state");

    repeat (5) @(posedge clk);
    check(rxq.size() == 0, "stray reply");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
