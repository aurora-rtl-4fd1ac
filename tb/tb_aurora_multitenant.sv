// tb_aurora_multitenant: a multi-tenant scenario on the full-size AuRORA
// top (4 CPUs, 10 accelerators, default parameters).
//
// Each CPU runs a stream of inference tasks. A task is a chain of layers;
// before every layer the CPU (standing in for the runtime) asks for between
// one and three accelerators, binding them to its virtual slots 0..k-1 and
// taking whatever free accelerator it finds (a denial just means another
// tenant holds that one). It then issues the layer's instructions to all its
// slots back to back, without waiting, collects the results, which arrive
// from different accelerators in any order and are matched by rd, and
// checks each against rs1 + rs2 + satp. After the layer it releases
// everything, so accelerators move between tenants at layer boundaries.
// Each CPU also switches to a new satp at every task, which the managers
// must pick up. An acquire of an accelerator the CPU already holds in
// another slot must be refused by its client. Monitors check that an
// accelerator only runs instructions of its owner. 200 tasks are run
// in all; the testbench reports the cycles taken and how many acquire
// attempts were denied.
module tb_aurora_multitenant;
  import aurora_pkg::*;

  localparam int unsigned NC = 4;
  localparam int unsigned NM = 10;
  localparam int unsigned TASKS_PER_CPU = 50;

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
    accel_model #(.LAT(4 + 2 * (m % 4))) u_acc (
      .clk, .rst_n,
      .cmd_valid  (acc_cmd_valid[m]),  .cmd_ready  (acc_cmd_ready[m]),  .cmd  (acc_cmd[m]),
      .resp_valid (acc_resp_valid[m]), .resp_ready (acc_resp_ready[m]), .resp (acc_resp[m]),
      .busy (acc_busy[m]), .state (acc_state[m]), .lat_extra (lat_extra[m]),
      .n_cmds (n_cmds[m]), .last_opcode (last_opc[m])
    );
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_refused = 0;
  int n_tasks = 0, n_layers = 0, n_acq_try = 0, n_deny = 0, n_multi = 0, n_results = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int m = 0; m < NM; m++) begin
      if (acc_cmd_valid[m] && acc_cmd_ready[m])
        check(acc_acquired[m] && int'(acc_owner[m]) == int'(acc_cmd[m].rs1[63:60]),
              $sformatf("accelerator %0d ran CPU %0d's instruction while owned by %0d",
                        m, acc_cmd[m].rs1[63:60], acc_owner[m]));
      if (acc_prot_err[m]) check(0, "message from a non-owner");
    end
    for (int c = 0; c < NC; c++) if (cpu_bad_cmd[c]) n_refused++;
  end

  task automatic issue(input int c, input logic [6:0] opc, input logic [6:0] f7, input logic xd,
                       input logic [4:0] rd, input logic [63:0] a, input logic [63:0] b);
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
    cpu_cmd_valid[c] = 1'b0;
  endtask

  // every response the CPUs take is queued here, in arrival order
  rocc_resp_t rspq [NC][$];
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++)
      if (cpu_resp_valid[c] && cpu_resp_ready[c]) rspq[c].push_back(cpu_resp[c]);

  task automatic get_resp(input int c, output rocc_resp_t r);
    int t;
    t = 0;
    while (rspq[c].size() == 0 && t < 5000) begin @(negedge clk); t++; end
    check(rspq[c].size() != 0, $sformatf("CPU %0d: no response", c));
    r = (rspq[c].size() != 0) ? rspq[c].pop_front() : '0;
  endtask

  function automatic logic [6:0] slot_opc(input int s);
    return s == 0 ? OPC_CUSTOM1 : s == 1 ? OPC_CUSTOM2 : OPC_CUSTOM3;
  endfunction

  task automatic tenant(input int c);
    rocc_resp_t r;
    for (int task_i = 0; task_i < TASKS_PER_CPU; task_i++) begin
      int layers;
      @(negedge clk);
      cpu_state[c].satp = {4'h8, 4'(c), 24'(task_i), 32'($urandom)};
      layers = $urandom_range(2, 5);
      for (int l = 0; l < layers; l++) begin
        int want, got, per;
        logic [63:0] expect_data [32];
        bit          pending [32];
        int          n_pend;
        want = $urandom_range(1, N_VSLOTS);
        got  = 0;
        // acquire up to `want` accelerators, first free one found
        for (int s = 0; s < want; s++) begin
          int tries;
          tries = 0;
          do begin
            int pid;
            pid = $urandom_range(0, NM - 1);
            issue(c, OPC_CUSTOM0, F7_ACQUIRE, 1, 5'd1, 64'(s), 64'(pid));
            get_resp(c, r);
            n_acq_try++;
            if (r.data != 64'd1) n_deny++;  // taken by another tenant, or already ours
            tries++;
          end while (r.data != 64'd1 && tries < (s == 0 ? 1000 : 4));
          if (r.data != 64'd1) break;
          got++;
        end
        check(got >= 1, $sformatf("CPU %0d got no accelerator", c));
        if (got > 1) n_multi++;
        // issue the layer's instructions to all slots, then collect
        per = $urandom_range(2, 4);
        for (int i = 0; i < 32; i++) pending[i] = 0;
        n_pend = 0;
        for (int i = 0; i < per; i++)
          for (int s = 0; s < got; s++) begin
            logic [63:0] a, b;
            int rd;
            rd = 8 * s + i + 1;
            a  = {4'(c), 28'(l), 32'($urandom)};
            b  = 64'($urandom);
            expect_data[rd] = a + b + cpu_state[c].satp;
            pending[rd] = 1;
            n_pend++;
            issue(c, slot_opc(s), 7'(i), 1, 5'(rd), a, b);
          end
        while (n_pend > 0) begin
          get_resp(c, r);
          if (!pending[r.rd]) begin
            check(0, $sformatf("CPU %0d: unexpected response rd %0d", c, r.rd));
            break;
          end
          check(r.data == expect_data[r.rd],
                $sformatf("CPU %0d rd %0d: %h, expected %h", c, r.rd, r.data, expect_data[r.rd]));
          pending[r.rd] = 0;
          n_pend--;
          n_results++;
        end
        // layer done: give everything back
        for (int s = 0; s < got; s++) begin
          issue(c, OPC_CUSTOM0, F7_RELEASE, 1, 5'd2, 64'(s), 64'd0);
          get_resp(c, r);
          check(r.data == 64'd1, "release");
        end
        n_layers++;
      end
      n_tasks++;
    end
  endtask

  initial begin
    int t_start;
    cpu_cmd_valid  = '0;
    cpu_resp_ready = '1;
    for (int c = 0; c < NC; c++) begin
      cpu_cmd[c]   = '0;
      cpu_state[c] = '{satp: 64'h8000_0000_0000_0000, status: 64'(c)};
    end
    for (int m = 0; m < NM; m++) lat_extra[m] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    t_start = cyc;
    fork
      tenant(0);
      tenant(1);
      tenant(2);
      tenant(3);
    join
    repeat (20) @(posedge clk);
    check(n_tasks == NC * TASKS_PER_CPU, "tasks completed");
    check(acc_acquired == '0, "accelerators left acquired");
    check(n_deny > 0, "tenants never competed for an accelerator");
    check(n_multi > 0, "no layer ran on more than one accelerator");
    check(n_refused > 0, "no acquire of an accelerator already held was refused");
    $display("tasks %0d layers %0d results %0d acquire attempts %0d denied %0d multi-accelerator layers %0d refused %0d cycles %0d",
             n_tasks, n_layers, n_results, n_acq_try, n_deny, n_multi, n_refused, cyc - t_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
