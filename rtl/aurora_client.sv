// aurora_client: the AuRORA client that sits next to one CPU on its RoCC
// port and gives the running thread virtual accelerators.
//
// Software sees N_VSLOTS virtual accelerator slots. A slot is bound to a
// physical accelerator (the manager with index pid) by an ACQUIRE
// instruction and unbound by RELEASE; the binding lives in a small
// virtual-to-physical table in the client. Accelerator instructions name a
// slot through their opcode (custom1/2/3 -> slot 0/1/2) and are forwarded,
// unchanged, as a message to the manager the slot is bound to. The thread's
// architectural state (satp and status, from the CPU) is sent with every
// acquire; whenever it changes, the client sends a state-update message to
// every bound manager before it accepts another instruction, so the shadow
// copies in the managers stay in step with the thread.
//
// Control instructions (opcode custom0):
//   funct7 = 0 ACQUIRE: rs1 = slot, rs2 = pid. Returns 1 in rd if granted,
//                       0 if the manager belongs to someone else.
//   funct7 = 1 RELEASE: rs1 = slot. Returns 1 in rd once the accelerator has
//                       drained and the manager is free again.
// Both block further instructions until the manager answers. An ACQUIRE of
// a slot already bound, of a pid not below N_MANAGERS or of a pid this
// client already holds in another slot, a RELEASE of an
// unbound slot, an unknown funct7 and an instruction to an unbound slot are
// refused locally: bad_cmd pulses and, if the instruction writes rd, 0 is
// returned.
//
// That the client attaches through RoCC, holds the acquired managers and
// forwards instructions to them, and keeps the shadowed state in the
// managers current is the design's; the instruction encoding, the slot
// count, the table and the state-update policy are this implementation's
// choices.
//
// Timing: a command is accepted in one cycle and its message leaves from a
// one-flit output register in the next cycle. Manager responses go to the
// CPU's response port combinationally from the incoming message; local
// refusals come from a one-entry register and take priority.
module aurora_client
  import aurora_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID      = '0,
  parameter int unsigned     N_MANAGERS = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // RoCC port of the CPU
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  rocc_cmd_t   cmd,
  output logic        resp_valid,
  input  logic        resp_ready,
  output rocc_resp_t  resp,
  output logic        busy,
  input  arch_state_t cpu_state,
  // messages to managers (request crossbar)
  output logic        out_valid,
  input  logic        out_ready,
  output msg_t        out_msg,
  // messages from managers (response crossbar)
  input  logic        in_valid,
  output logic        in_ready,
  input  msg_t        in_msg,
  // status
  output logic [N_VSLOTS-1:0] slot_valid,
  output logic        bad_cmd
);
  localparam int unsigned SW = $clog2(N_VSLOTS + 1);

  typedef enum logic {C_READY, C_WAIT} cstate_e;

  cstate_e               state;
  logic [ID_W-1:0]       slot_pid [N_VSLOTS];
  logic [N_VSLOTS-1:0]   dirty;
  arch_state_t           last_state;
  logic                  state_changed;

  // pending control operation
  logic                  pend_acq;
  logic [SW-1:0]         pend_slot;
  logic [ID_W-1:0]       pend_pid;
  logic                  pend_xd;
  logic [4:0]            pend_rd;
  arch_state_t           pend_state;

  // local refusal response
  logic                  lresp_valid;
  rocc_resp_t            lresp;

  logic                  out_free;
  logic                  send_state;
  logic [SW-1:0]         dirty_slot;
  logic                  cmd_fire;

  // decode of the CPU command
  logic                  is_ctrl, is_acq, is_rel, is_fwd, cmd_ok, pid_bound;
  logic [SW-1:0]         c_slot;
  logic [ID_W-1:0]       c_pid;

  // incoming messages
  logic                  in_to_cpu, in_fire, ans_fire;
  logic [N_VSLOTS-1:0]   dirty_n;

  assign out_free      = !out_valid || out_ready;
  assign state_changed = (cpu_state != last_state);

  always_comb begin
    dirty_slot = '0;
    for (int s = N_VSLOTS - 1; s >= 0; s--)
      if (dirty[s]) dirty_slot = SW'(s);
  end
  assign send_state = out_free && (|dirty);

  always_comb begin
    is_ctrl = (cmd.inst.opcode == OPC_CUSTOM0);
    is_acq  = is_ctrl && (cmd.inst.funct7 == F7_ACQUIRE);
    is_rel  = is_ctrl && (cmd.inst.funct7 == F7_RELEASE);
    is_fwd  = 1'b0;
    c_slot  = SW'(cmd.rs1 < XLEN'(N_VSLOTS) ? cmd.rs1 : XLEN'(N_VSLOTS));
    c_pid   = cmd.rs2[ID_W-1:0];
    unique case (cmd.inst.opcode)
      OPC_CUSTOM1: begin is_fwd = 1'b1; c_slot = SW'(0); end
      OPC_CUSTOM2: begin is_fwd = 1'b1; c_slot = SW'(1); end
      OPC_CUSTOM3: begin is_fwd = 1'b1; c_slot = SW'(2); end
      default: ;
    endcase
    pid_bound = 1'b0;
    for (int s = 0; s < N_VSLOTS; s++)
      if (slot_valid[s] && slot_pid[s] == c_pid) pid_bound = 1'b1;
    cmd_ok = 1'b0;
    if (is_acq)
      cmd_ok = (int'(c_slot) < N_VSLOTS) && !slot_valid[c_slot] && !pid_bound &&
               (cmd.rs2 < XLEN'(N_MANAGERS));
    else if (is_rel || is_fwd)
      cmd_ok = (int'(c_slot) < N_VSLOTS) && slot_valid[c_slot];
  end

  assign cmd_ready = (state == C_READY) && out_free && !(|dirty) &&
                     !state_changed && !lresp_valid;
  assign cmd_fire  = cmd_valid && cmd_ready;
  assign bad_cmd   = cmd_fire && !cmd_ok;

  // Manager messages: acquire/release answers and accelerator responses.
  always_comb begin
    in_to_cpu = 1'b0;
    resp      = lresp;
    if (in_valid) begin
      unique case (in_msg.kind)
        MSG_ACQ_RESP, MSG_REL_ACK: begin
          in_to_cpu = pend_xd;
          if (!lresp_valid) resp = '{rd: pend_rd, data: XLEN'(in_msg.cmd.rs1[0])};
        end
        MSG_ACC_RESP: begin
          in_to_cpu = 1'b1;
          if (!lresp_valid) resp = '{rd: in_msg.cmd.inst.rd, data: in_msg.cmd.rs1};
        end
        default: ;
      endcase
    end
  end
  assign resp_valid = lresp_valid || (in_valid && in_to_cpu);
  assign in_ready   = !in_to_cpu || (resp_ready && !lresp_valid);
  assign in_fire    = in_valid && in_ready;

  // The answer to the pending acquire or release.
  assign ans_fire = in_fire && state == C_WAIT && in_msg.src == pend_pid &&
                    ((pend_acq && in_msg.kind == MSG_ACQ_RESP) ||
                     (!pend_acq && in_msg.kind == MSG_REL_ACK));

  // Slots whose manager still needs the current thread state: all bound
  // slots when the state changes, and a newly granted slot whose acquire
  // carried a state that has changed since.
  always_comb begin
    dirty_n = dirty;
    if (send_state) dirty_n[dirty_slot] = 1'b0;
    if (state_changed) dirty_n = dirty_n | slot_valid;
    if (ans_fire && pend_acq && in_msg.cmd.rs1[0] && cpu_state != pend_state)
      dirty_n[pend_slot] = 1'b1;
  end

  assign busy = (state == C_WAIT) || out_valid || (|dirty) || lresp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= C_READY;
      slot_valid  <= '0;
      dirty       <= '0;
      last_state  <= '0;
      pend_acq    <= 1'b0;
      pend_slot   <= '0;
      pend_pid    <= '0;
      pend_xd     <= 1'b0;
      pend_rd     <= '0;
      pend_state  <= '0;
      lresp_valid <= 1'b0;
      lresp       <= '0;
      out_valid   <= 1'b0;
      out_msg     <= '0;
      for (int s = 0; s < N_VSLOTS; s++) slot_pid[s] <= '0;
    end else begin
      if (state_changed) last_state <= cpu_state;

      // local refusals
      if (lresp_valid && resp_ready) lresp_valid <= 1'b0;

      // output register
      if (out_free) out_valid <= send_state || cmd_fire && cmd_ok;
      if (send_state) begin
        out_msg      <= '0;
        out_msg.kind <= MSG_STATE;
        out_msg.src  <= MY_ID;
        out_msg.dst  <= slot_pid[dirty_slot];
        out_msg.cmd.rs1 <= cpu_state.satp;
        out_msg.cmd.rs2 <= cpu_state.status;
      end

      if (cmd_fire) begin
        if (!cmd_ok) begin
          lresp_valid <= cmd.inst.xd;
          lresp       <= '{rd: cmd.inst.rd, data: '0};
        end else begin
          out_msg.src <= MY_ID;
          if (is_fwd) begin
            out_msg.kind <= MSG_CMD;
            out_msg.dst  <= slot_pid[c_slot];
            out_msg.cmd  <= cmd;
          end else begin
            state     <= C_WAIT;
            pend_acq  <= is_acq;
            pend_slot <= c_slot;
            pend_xd   <= cmd.inst.xd;
            pend_rd   <= cmd.inst.rd;
            pend_pid  <= is_acq ? c_pid : slot_pid[c_slot];
            out_msg.cmd <= '0;
            if (is_acq) begin
              pend_state      <= cpu_state;
              out_msg.kind    <= MSG_ACQ_REQ;
              out_msg.dst     <= c_pid;
              out_msg.cmd.rs1 <= cpu_state.satp;
              out_msg.cmd.rs2 <= cpu_state.status;
            end else begin
              out_msg.kind <= MSG_REL_REQ;
              out_msg.dst  <= slot_pid[c_slot];
              slot_valid[c_slot] <= 1'b0;
            end
          end
        end
      end

      // answers from managers
      if (ans_fire) begin
        state <= C_READY;
        if (pend_acq && in_msg.cmd.rs1[0]) begin
          slot_valid[pend_slot] <= 1'b1;
          slot_pid[pend_slot]   <= pend_pid;
        end
      end

      dirty <= dirty_n;
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_msg))
    else $error("aurora_client: output flit changed while waiting");
  a_resp_hold: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid && !resp_ready |=> resp_valid)
    else $error("aurora_client: response withdrawn");
endmodule
