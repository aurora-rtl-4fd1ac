// tb_aurora_client: self-checking test of one AuRORA client.
//
// The testbench plays both the CPU (RoCC commands, responses, thread state)
// and the managers (it answers the client's messages). It checks the
// message each instruction produces and its one-cycle latency, acquire
// grants and denials, refusal of a second binding to one accelerator,
// forwarding through the virtual-to-physical table,
// local refusal of bad instructions, state-update messages to every bound
// manager when the thread state changes (including a change that races an
// acquire), passing of accelerator responses to the CPU, and release.
module tb_aurora_client;
  import aurora_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        cmd_valid, cmd_ready;
  rocc_cmd_t   cmd;
  logic        resp_valid, resp_ready;
  rocc_resp_t  resp;
  logic        busy;
  arch_state_t cpu_state;
  logic        out_valid, out_ready;
  msg_t        out_msg;
  logic        in_valid, in_ready;
  msg_t        in_msg;
  logic [N_VSLOTS-1:0] slot_valid;
  logic        bad_cmd;

  aurora_client #(.MY_ID(4'd1), .N_MANAGERS(10)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_bad = 0;
  msg_t       txq [$];
  int         tx_cycle [$];
  rocc_resp_t rspq [$];

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
      txq.push_back(out_msg);
      tx_cycle.push_back(cyc);
    end
    if (rst_n && resp_valid && resp_ready) rspq.push_back(resp);
    if (rst_n && bad_cmd) n_bad++;
  end

  int issue_cycle;
  task automatic issue(input logic [6:0] opc, input logic [6:0] f7, input logic xd,
                       input logic [4:0] rd, input logic [63:0] a, input logic [63:0] b);
    @(negedge clk);
    cmd = '0;
    cmd.inst.opcode = opc;
    cmd.inst.funct7 = f7;
    cmd.inst.xd     = xd;
    cmd.inst.rd     = rd;
    cmd.rs1 = a;
    cmd.rs2 = b;
    cmd_valid = 1'b1;
    do @(posedge clk); while (!cmd_ready);
    @(negedge clk);
    issue_cycle = cyc;
    cmd_valid = 1'b0;
  endtask

  task automatic reply(input msg_kind_e k, input int src, input logic [4:0] rd, input logic [63:0] d);
    @(negedge clk);
    in_msg = '0;
    in_msg.kind = k;
    in_msg.src  = ID_W'(src);
    in_msg.dst  = ID_W'(1);
    in_msg.cmd.inst.rd = rd;
    in_msg.cmd.rs1 = d;
    in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic expect_tx(input msg_kind_e k, input int dst, input logic [63:0] d, input string what);
    int t;
    t = 0;
    while (txq.size() == 0 && t < 100) begin @(posedge clk); t++; end
    if (txq.size() == 0) check(0, {what, ": no message"});
    else begin
      msg_t m;
      m = txq.pop_front();
      void'(tx_cycle.pop_front());
      check(m.kind == k && int'(m.dst) == dst && m.src == 1 && m.cmd.rs1 == d,
            $sformatf("%s: got kind %0d dst %0d src %0d rs1 %h", what, m.kind, m.dst, m.src, m.cmd.rs1));
    end
  endtask

  task automatic expect_resp(input logic [4:0] rd, input logic [63:0] d, input string what);
    int t;
    t = 0;
    while (rspq.size() == 0 && t < 100) begin @(posedge clk); t++; end
    if (rspq.size() == 0) check(0, {what, ": no response"});
    else begin
      rocc_resp_t r;
      r = rspq.pop_front();
      check(r.rd == rd && r.data == d, $sformatf("%s: got rd %0d data %h", what, r.rd, r.data));
    end
  endtask

  localparam logic [63:0] S0 = 64'h8000_0000_0000_1000;
  localparam logic [63:0] S1 = 64'h8000_0000_0000_2000;
  localparam logic [63:0] S2 = 64'h8000_0000_0000_3000;

  initial begin
    cmd_valid  = 1'b0;
    cmd        = '0;
    in_valid   = 1'b0;
    in_msg     = '0;
    out_ready  = 1'b1;
    resp_ready = 1'b1;
    cpu_state  = '{satp: S0, status: 64'h0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(slot_valid == '0 && !busy, "idle after reset");

    // ACQUIRE slot 0 -> manager 4, granted
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd3, 64'd0, 64'd4);
    @(posedge clk); @(negedge clk);
    check(tx_cycle.size() == 1 && tx_cycle[0] == issue_cycle + 1, "acquire message one cycle after the instruction");
    expect_tx(MSG_ACQ_REQ, 4, S0, "acquire request carries satp");
    check(busy && !cmd_ready, "client must block while an acquire is outstanding");
    reply(MSG_ACQ_RESP, 4, 5'd0, 64'd1);
    expect_resp(5'd3, 64'd1, "acquire granted");
    check(slot_valid == 3'b001, "slot 0 bound");

    // forwarded instruction to slot 0
    issue(OPC_CUSTOM1, 7'd5, 1, 5'd8, 64'h1234, 64'h5678);
    expect_tx(MSG_CMD, 4, 64'h1234, "forward to manager 4");

    // instruction to unbound slot 1: refused locally
    issue(OPC_CUSTOM2, 7'd5, 1, 5'd9, 64'h1, 64'h2);
    expect_resp(5'd9, 64'd0, "unbound slot refused");
    check(n_bad == 1, "bad_cmd for unbound slot");

    // ACQUIRE slot 1 -> manager 7, denied
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd10, 64'd1, 64'd7);
    expect_tx(MSG_ACQ_REQ, 7, S0, "acquire request to 7");
    reply(MSG_ACQ_RESP, 7, 5'd0, 64'd0);
    expect_resp(5'd10, 64'd0, "acquire denied");
    check(slot_valid == 3'b001, "denied slot stays unbound");

    // bad acquires: pid out of range, slot already bound
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd11, 64'd1, 64'd12);
    expect_resp(5'd11, 64'd0, "pid out of range refused");
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd11, 64'd0, 64'd5);
    expect_resp(5'd11, 64'd0, "bound slot refused");
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd11, 64'd1, 64'd4);
    expect_resp(5'd11, 64'd0, "accelerator already held in another slot refused");
    check(n_bad == 4 && txq.size() == 0, "bad acquires send nothing");

    // state change: one update to manager 4
    @(negedge clk);
    cpu_state.satp = S1;
    expect_tx(MSG_STATE, 4, S1, "state update to manager 4");

    // ACQUIRE slot 2 -> manager 6, and the state changes before the grant
    issue(OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd12, 64'd2, 64'd6);
    expect_tx(MSG_ACQ_REQ, 6, S1, "acquire request to 6");
    @(negedge clk);
    cpu_state.satp = S2;
    expect_tx(MSG_STATE, 4, S2, "update to manager 4 after second change");
    reply(MSG_ACQ_RESP, 6, 5'd0, 64'd1);
    expect_resp(5'd12, 64'd1, "acquire of slot 2 granted");
    expect_tx(MSG_STATE, 6, S2, "newly granted manager gets the newer state");
    check(slot_valid == 3'b101, "slots 0 and 2 bound");

    // status change: both bound managers are updated
    @(negedge clk);
    cpu_state.status = 64'h22;
    expect_tx(MSG_STATE, 4, S2, "status update to 4");
    expect_tx(MSG_STATE, 6, S2, "status update to 6");

    // forward through slot 2 and accelerator response back
    issue(OPC_CUSTOM3, 7'd1, 1, 5'd13, 64'h77, 64'h0);
    expect_tx(MSG_CMD, 6, 64'h77, "forward to manager 6");
    resp_ready = 1'b0;
    fork
      reply(MSG_ACC_RESP, 6, 5'd13, 64'hcafe);
      begin
        repeat (3) @(negedge clk);
        check(resp_valid && !in_ready, "response held while the CPU is not ready");
        resp_ready = 1'b1;
      end
    join
    expect_resp(5'd13, 64'hcafe, "accelerator response to CPU");

    // release slot 0
    issue(OPC_CUSTOM0, F7_RELEASE, 1, 5'd14, 64'd0, 64'd0);
    expect_tx(MSG_REL_REQ, 4, 64'd0, "release request to 4");
    check(slot_valid == 3'b100, "slot 0 unbound at release");
    reply(MSG_REL_ACK, 4, 5'd0, 64'd1);
    expect_resp(5'd14, 64'd1, "release acknowledged");
    issue(OPC_CUSTOM1, 7'd5, 0, 5'd0, 64'h1, 64'h2);
    repeat (3) @(posedge clk);
    check(txq.size() == 0 && n_bad == 5, "released slot no longer forwards");

    repeat (5) @(posedge clk);
    check(txq.size() == 0 && rspq.size() == 0, "stray traffic");
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
