// tb_aurora_soc: end-to-end test of the AuRORA hardware layer at its full
// size (4 clients, 10 managers, default parameters).
//
// Ten behavioural accelerators sit on the managers' RoCC ports; the
// testbench plays four CPUs. First, directed steps measure the latencies of
// an acquire round trip, of a forwarded instruction and of a response, and
// let all four CPUs race for one accelerator (exactly one must win). Then
// the four CPUs run concurrently: each repeatedly acquires a random
// accelerator into one of its three virtual slots (retrying on denial),
// issues instructions and checks every result against rs1 + rs2 + its own
// satp, sometimes changes its satp in between (which must reach the
// accelerator before the next instruction), issues a last instruction
// without a result, releases the accelerator at once (so the release must
// wait for the drain) and tries an instruction on an unbound slot.
// Monitors check that an accelerator only ever runs instructions of its
// current owner and count every mechanism: grant, denial, forwarding,
// response, state update, release drain, crossbar contention, local
// refusal. A mechanism that never happened counts as a failure.
module tb_aurora_soc;
  import aurora_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned NM = 10;
  localparam int unsigned ROUNDS = 10;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        [NC-1:0] cpu_cmd_valid, cpu_cmd_ready;
  rocc_cmd_t            cpu_cmd        [NC];
  logic        [NC-1:0] cpu_resp_valid, cpu_resp_ready;
  rocc_resp_t           cpu_resp       [NC];
  logic        [NC-1:0] cpu_busy;
  arch_state_t          cpu_state      [NC];
  logic        [NC-1:0] cpu_bad_cmd;
  logic [N_VSLOTS-1:0]  cpu_slot_valid [NC];
  logic        [NM-1:0] acc_cmd_valid, acc_cmd_ready;
  rocc_cmd_t            acc_cmd        [NM];
  logic        [NM-1:0] acc_resp_valid, acc_resp_ready;
  rocc_resp_t           acc_resp       [NM];
  logic        [NM-1:0] acc_busy;
  arch_state_t          acc_state      [NM];
  logic        [NM-1:0] acc_acquired;
  logic [ID_W-1:0]      acc_owner      [NM];
  logic        [NM-1:0] acc_prot_err;

  aurora_soc dut (.*);

  int unsigned lat_extra [NM];
  int unsigned n_cmds    [NM];
  logic [6:0]  last_opc  [NM];

  for (genvar m = 0; m < NM; m++) begin : g_acc
    accel_model #(.LAT(2 + m % 3)) u_acc (
      .clk, .rst_n,
      .cmd_valid  (acc_cmd_valid[m]),  .cmd_ready  (acc_cmd_ready[m]),  .cmd  (acc_cmd[m]),
      .resp_valid (acc_resp_valid[m]), .resp_ready (acc_resp_ready[m]), .resp (acc_resp[m]),
      .busy (acc_busy[m]), .state (acc_state[m]), .lat_extra (lat_extra[m]),
      .n_cmds (n_cmds[m]), .last_opcode (last_opc[m])
    );
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_grant = 0, n_deny = 0, n_fwd = 0, n_resp = 0, n_sync = 0;
  int n_drain = 0, n_contend = 0, n_bad = 0, n_release = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // monitors
  int drain_cnt [NM];
  for (genvar m = 0; m < NM; m++) begin : g_drain_mon
    initial drain_cnt[m] = 0;
    always @(posedge clk)
      if (rst_n && dut.g_manager[m].u_manager.state == 2'd2 && acc_busy[m]) drain_cnt[m]++;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int m = 0; m < NM; m++) begin
      if (acc_cmd_valid[m] && acc_cmd_ready[m]) begin
        n_fwd++;
        check(acc_acquired[m] && int'(acc_owner[m]) == int'(acc_cmd[m].rs1[63:60]),
              $sformatf("accelerator %0d ran an instruction of CPU %0d while owned by %0d",
                        m, acc_cmd[m].rs1[63:60], acc_owner[m]));
        check(acc_cmd[m].inst.opcode == OPC_CUSTOM3, "opcode not rewritten");
      end
      if (acc_resp_valid[m] && acc_resp_ready[m]) n_resp++;
      if (dut.m_in_valid[m] && dut.m_in_ready[m] && dut.m_in_msg[m].kind == MSG_STATE) n_sync++;
      check(!acc_prot_err[m], $sformatf("manager %0d got a message from a non-owner", m));
    end
    for (int m = 0; m < NM; m++) begin
      int n;
      n = 0;
      for (int c = 0; c < NC; c++)
        if (dut.c_out_valid[c] && int'(dut.c_out_msg[c].dst) == m) n++;
      if (n > 1) n_contend++;
    end
    for (int c = 0; c < NC; c++) if (cpu_bad_cmd[c]) n_bad++;
  end

  // CPU-side helpers, all driven from the negative edge
  task automatic issue(input int c, input logic [6:0] opc, input logic [6:0] f7, input logic xd,
                       input logic [4:0] rd, input logic [63:0] a, input logic [63:0] b,
                       output int acc_cyc);
    @(negedge clk);
    cpu_cmd[c] = '0;
    cpu_cmd[c].inst.opcode = opc;
    cpu_cmd[c].inst.funct7 = f7;
    cpu_cmd[c].inst.xd     = xd;
    cpu_cmd[c].inst.rd     = rd;
    cpu_cmd[c].rs1 = a;
    cpu_cmd[c].rs2 = b;
    cpu_cmd_valid[c] = 1'b1;
    #1;
    while (!cpu_cmd_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    acc_cyc = cyc;            // the command was taken at edge number cyc
    cpu_cmd_valid[c] = 1'b0;
  endtask

  task automatic get_resp(input int c, output rocc_resp_t r, output int seen_cyc);
    int t;
    t = 0;
    while (!cpu_resp_valid[c] && t < 2000) begin @(negedge clk); t++; end
    r = cpu_resp[c];
    seen_cyc = cyc;
    check(cpu_resp_valid[c], $sformatf("CPU %0d: no response", c));
  endtask

  function automatic logic [6:0] slot_opc(input int s);
    return s == 0 ? OPC_CUSTOM1 : s == 1 ? OPC_CUSTOM2 : OPC_CUSTOM3;
  endfunction

  function automatic logic [63:0] tag(input int c, input int k);
    return {4'(c), 28'(k), 32'($urandom)};
  endfunction

  // one CPU thread of the concurrent phase
  task automatic run_cpu(input int c);
    rocc_resp_t r;
    int t0, t1;
    for (int round = 0; round < ROUNDS; round++) begin
      int s, pid, tries;
      logic [63:0] a, b;
      s = round % N_VSLOTS;
      // acquire, retrying on denial
      tries = 0;
      do begin
        pid = $urandom_range(0, NM - 1);
        issue(c, OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd1, 64'(s), 64'(pid), t0);
        get_resp(c, r, t1);
        check(r.rd == 5'd1, "acquire response rd");
        if (r.data == 64'd1) n_grant++; else n_deny++;
        tries++;
      end while (r.data != 64'd1 && tries < 200);
      check(r.data == 64'd1, $sformatf("CPU %0d never acquired an accelerator", c));
      @(negedge clk);
      check(cpu_slot_valid[c][s], "slot not bound after grant");
      // instructions with results
      for (int k = 0; k < 4; k++) begin
        if ($urandom_range(0, 2) == 0) begin
          @(negedge clk);
          cpu_state[c].satp = {4'h8, 28'd0, 32'($urandom)};
        end
        a = tag(c, k);
        b = 64'($urandom);
        issue(c, slot_opc(s), 7'(k), 1, 5'(k + 2), a, b, t0);
        get_resp(c, r, t1);
        check(r.rd == 5'(k + 2) && r.data == a + b + cpu_state[c].satp,
              $sformatf("CPU %0d result rd %0d data %h, expected %h", c, r.rd, r.data,
                        a + b + cpu_state[c].satp));
      end
      // instruction on an unbound slot is refused
      issue(c, slot_opc((s + 1) % N_VSLOTS), 7'd0, 1, 5'd20, tag(c, 99), 64'd0, t0);
      get_resp(c, r, t1);
      check(r.rd == 5'd20 && r.data == 64'd0, "unbound slot must return 0");
      // long instruction without result, then release at once
      lat_extra[pid] = 20;
      issue(c, slot_opc(s), 7'd9, 0, 5'd0, tag(c, 100), 64'd0, t0);
      issue(c, OPC_CUSTOM0, F7_RELEASE, 1, 5'd21, 64'(s), 64'd0, t0);
      get_resp(c, r, t1);
      check(r.rd == 5'd21 && r.data == 64'd1, $sformatf("CPU %0d release failed", c));
      check(!cpu_slot_valid[c][s], "slot still bound after release");
      n_release++;
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
  endtask

  initial begin
    rocc_resp_t r;
    int t0, t1;
    int wins;
    cpu_cmd_valid  = '0;
    cpu_resp_ready = '1;
    for (int c = 0; c < NC; c++) begin
      cpu_cmd[c]   = '0;
      cpu_state[c] = '{satp: {4'h8, 28'd0, 32'(c * 4096)}, status: 64'(c)};
    end
    for (int m = 0; m < NM; m++) lat_extra[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // directed: latencies with an idle system
    issue(0, OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd1, 64'd0, 64'd9, t0);
    get_resp(0, r, t1);
    check(r.data == 64'd1, "directed acquire");
    check(t1 - t0 == 3, $sformatf("acquire round trip: response %0d cycles after the command, expected 3", t1 - t0));
    check(acc_state[9].satp == cpu_state[0].satp, "shadowed satp at manager 9");
    fork
      issue(0, OPC_CUSTOM1, 7'd0, 1, 5'd2, {4'd0, 60'd5}, 64'd6, t0);
      begin
        int ta, tr;
        @(posedge acc_cmd_valid[9]);
        @(negedge clk);
        ta = cyc;
        @(posedge acc_resp_valid[9]);
        @(negedge clk);
        tr = cyc;
        get_resp(0, r, t1);
        check(ta - t0 == 1, $sformatf("forward latency %0d, expected 1 edge after the command edge", ta - t0));
        check(t1 - tr == 2, $sformatf("response latency %0d, expected 2", t1 - tr));
        check(r.data == 64'd11 + cpu_state[0].satp, "directed result");
      end
    join
    issue(0, OPC_CUSTOM0, F7_RELEASE, 1, 5'd1, 64'd0, 64'd0, t0);
    get_resp(0, r, t1);
    check(r.data == 64'd1 && !acc_acquired[9], "directed release");

    // directed: all four CPUs race for accelerator 0
    wins = 0;
    for (int c = 0; c < NC; c++) begin
      automatic int cc = c;
      fork
        begin
          rocc_resp_t rr;
          int a0, a1;
          issue(cc, OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd1, 64'd0, 64'd0, a0);
          get_resp(cc, rr, a1);
          if (rr.data == 64'd1) begin wins++; n_grant++; end else n_deny++;
        end
      join_none
    end
    wait fork;
    @(negedge clk);
    check(wins == 1, $sformatf("%0d CPUs won accelerator 0, expected 1", wins));
    for (int c = 0; c < NC; c++)
      if (cpu_slot_valid[c][0]) begin
        issue(c, OPC_CUSTOM0, F7_RELEASE, 1, 5'd1, 64'd0, 64'd0, t0);
        get_resp(c, r, t1);
        check(r.data == 64'd1, "release after race");
      end

    // concurrent phase
    fork
      run_cpu(0);
      run_cpu(1);
      run_cpu(2);
      run_cpu(3);
    join

    repeat (50) @(posedge clk);
    foreach (drain_cnt[m]) n_drain += drain_cnt[m];
    check(acc_acquired == '0, "accelerators left acquired");
    check(cpu_busy == '0, "clients left busy");
    check(n_release == NC * ROUNDS, "releases");
    $display("grants %0d denials %0d forwarded %0d responses %0d state-updates %0d drain-cycles %0d contention %0d refusals %0d",
             n_grant, n_deny, n_fwd, n_resp, n_sync, n_drain, n_contend, n_bad);
    check(n_grant > 0,   "no grant happened");
    check(n_deny > 0,    "no denial happened");
    check(n_fwd > 0,     "no instruction forwarded");
    check(n_resp > 0,    "no accelerator response");
    check(n_sync > 0,    "no state update happened");
    check(n_drain > 0,   "no release had to wait for a drain");
    check(n_contend > 0, "no crossbar contention happened");
    check(n_bad > 0,     "no local refusal happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
