// aurora_soc: the AuRORA hardware layer of a multi-accelerator SoC.
//
// N_CLIENTS CPUs each get an aurora_client on their RoCC port; N_MANAGERS
// accelerator tiles each get an aurora_manager in front of their RoCC
// accelerator. Clients and managers exchange one-flit messages over two
// crossbars: the request crossbar carries client -> manager traffic
// (acquire, release, state update, forwarded instruction) and the response
// crossbar manager -> client traffic (acquire answer, release
// acknowledgement, accelerator response). Any CPU can therefore acquire any
// free accelerator at run time, drive it with ordinary RoCC instructions as
// if it were attached to its own core, and give it back, while the
// accelerator works in the owner's address space through the state
// shadowed in its manager.
//
// The CPUs and the accelerators are outside this module: their RoCC ports
// are brought out as arrays (cpu_* and acc_*), index = client or manager id.
// 10 accelerator tiles follow the evaluated SoC; the number of CPUs and the
// crossbar transport (one cycle per crossing) are this design's choices.
// Latency of a forwarded instruction from cpu_cmd to acc_cmd: 2 cycles
// (client output register, crossbar register); of an accelerator response
// from acc_resp to cpu_resp: 2 cycles. An acquire or release round trip
// takes 4 cycles when nothing else competes.
module aurora_soc
  import aurora_pkg::*;
#(
  parameter int unsigned N_CLIENTS  = 4,
  parameter int unsigned N_MANAGERS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // CPU side, one RoCC port per client
  input  logic        [N_CLIENTS-1:0]  cpu_cmd_valid,
  output logic        [N_CLIENTS-1:0]  cpu_cmd_ready,
  input  rocc_cmd_t                    cpu_cmd        [N_CLIENTS],
  output logic        [N_CLIENTS-1:0]  cpu_resp_valid,
  input  logic        [N_CLIENTS-1:0]  cpu_resp_ready,
  output rocc_resp_t                   cpu_resp       [N_CLIENTS],
  output logic        [N_CLIENTS-1:0]  cpu_busy,
  input  arch_state_t                  cpu_state      [N_CLIENTS],
  output logic        [N_CLIENTS-1:0]  cpu_bad_cmd,
  output logic        [N_VSLOTS-1:0]   cpu_slot_valid [N_CLIENTS],
  // accelerator side, one RoCC port per manager
  output logic        [N_MANAGERS-1:0] acc_cmd_valid,
  input  logic        [N_MANAGERS-1:0] acc_cmd_ready,
  output rocc_cmd_t                    acc_cmd        [N_MANAGERS],
  input  logic        [N_MANAGERS-1:0] acc_resp_valid,
  output logic        [N_MANAGERS-1:0] acc_resp_ready,
  input  rocc_resp_t                   acc_resp       [N_MANAGERS],
  input  logic        [N_MANAGERS-1:0] acc_busy,
  output arch_state_t                  acc_state      [N_MANAGERS],
  output logic        [N_MANAGERS-1:0] acc_acquired,
  output logic        [ID_W-1:0]       acc_owner      [N_MANAGERS],
  output logic        [N_MANAGERS-1:0] acc_prot_err
);
  // request network: clients -> managers
  logic [N_CLIENTS-1:0]  c_out_valid, c_out_ready;
  msg_t                  c_out_msg [N_CLIENTS];
  logic [N_MANAGERS-1:0] m_in_valid, m_in_ready;
  msg_t                  m_in_msg  [N_MANAGERS];
  // response network: managers -> clients
  logic [N_MANAGERS-1:0] m_out_valid, m_out_ready;
  msg_t                  m_out_msg [N_MANAGERS];
  logic [N_CLIENTS-1:0]  c_in_valid, c_in_ready;
  msg_t                  c_in_msg  [N_CLIENTS];

  for (genvar c = 0; c < N_CLIENTS; c++) begin : g_client
    aurora_client #(
      .MY_ID      (ID_W'(c)),
      .N_MANAGERS (N_MANAGERS)
    ) u_client (
      .clk        (clk),
      .rst_n      (rst_n),
      .cmd_valid  (cpu_cmd_valid[c]),
      .cmd_ready  (cpu_cmd_ready[c]),
      .cmd        (cpu_cmd[c]),
      .resp_valid (cpu_resp_valid[c]),
      .resp_ready (cpu_resp_ready[c]),
      .resp       (cpu_resp[c]),
      .busy       (cpu_busy[c]),
      .cpu_state  (cpu_state[c]),
      .out_valid  (c_out_valid[c]),
      .out_ready  (c_out_ready[c]),
      .out_msg    (c_out_msg[c]),
      .in_valid   (c_in_valid[c]),
      .in_ready   (c_in_ready[c]),
      .in_msg     (c_in_msg[c]),
      .slot_valid (cpu_slot_valid[c]),
      .bad_cmd    (cpu_bad_cmd[c])
    );
  end

  aurora_xbar #(.N_IN(N_CLIENTS), .N_OUT(N_MANAGERS)) u_req_xbar (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (c_out_valid),
    .in_ready  (c_out_ready),
    .in_msg    (c_out_msg),
    .out_valid (m_in_valid),
    .out_ready (m_in_ready),
    .out_msg   (m_in_msg)
  );

  for (genvar m = 0; m < N_MANAGERS; m++) begin : g_manager
    aurora_manager #(
      .MY_ID (ID_W'(m))
    ) u_manager (
      .clk            (clk),
      .rst_n          (rst_n),
      .in_valid       (m_in_valid[m]),
      .in_ready       (m_in_ready[m]),
      .in_msg         (m_in_msg[m]),
      .out_valid      (m_out_valid[m]),
      .out_ready      (m_out_ready[m]),
      .out_msg        (m_out_msg[m]),
      .acc_cmd_valid  (acc_cmd_valid[m]),
      .acc_cmd_ready  (acc_cmd_ready[m]),
      .acc_cmd        (acc_cmd[m]),
      .acc_resp_valid (acc_resp_valid[m]),
      .acc_resp_ready (acc_resp_ready[m]),
      .acc_resp       (acc_resp[m]),
      .acc_busy       (acc_busy[m]),
      .acc_state      (acc_state[m]),
      .acquired       (acc_acquired[m]),
      .owner          (acc_owner[m]),
      .prot_err       (acc_prot_err[m])
    );
  end

  aurora_xbar #(.N_IN(N_MANAGERS), .N_OUT(N_CLIENTS)) u_resp_xbar (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (m_out_valid),
    .in_ready  (m_out_ready),
    .in_msg    (m_out_msg),
    .out_valid (c_in_valid),
    .out_ready (c_in_ready),
    .out_msg   (c_in_msg)
  );

  initial begin
    assert (N_CLIENTS <= 2**ID_W && N_MANAGERS <= 2**ID_W)
      else $fatal(1, "aurora_soc: more clients or managers than ID_W can name");
  end
endmodule
