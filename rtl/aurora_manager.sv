// aurora_manager: the AuRORA manager that sits in front of one RoCC
// accelerator and makes it a shareable, virtualised resource.
//
// The manager owns the accelerator on behalf of at most one client at a
// time. It is IDLE until a client's acquire request arrives; it then grants
// the request, records the client as owner, copies the requesting thread's
// architectural state (page-table root satp and status word) into its shadow
// registers and becomes ACQUIRED. The shadow state is driven to the
// accelerator (acc_state) so that the accelerator's page-table walker works
// in the owner's address space with no IOMMU set up by software. While
// ACQUIRED it:
//   * passes every instruction forwarded by the owner to the accelerator's
//     RoCC command port, rewriting the opcode to ACCEL_OPCODE;
//   * takes state-update messages from the owner into the shadow registers;
//   * returns every accelerator response to the owner as a message;
//   * answers an acquire from any other client with a denial.
// A release from the owner moves it to DRAINING: it waits until the
// accelerator is no longer busy and has no response left, then sends the
// release acknowledgement and returns to IDLE. Messages from a client that
// does not own the accelerator never reach it; they are dropped (commands,
// state) or refused (acquire, release), and prot_err pulses for the dropped
// ones.
//
// The IDLE / acquired states, acquire, release, state shadowing and
// instruction forwarding are the design's; the DRAINING state, the
// acknowledgement of releases, opcode rewriting, the dropping of non-owner
// messages and the reply priorities are this implementation's choices.
//
// Interfaces: msg in / msg out are valid/ready flit ports to the request and
// response crossbars; acc_cmd / acc_resp are the accelerator's RoCC command
// and response ports (valid/ready), acc_busy its RoCC busy. Timing: a
// forwarded command reaches acc_cmd in the cycle it arrives (combinational
// path from in_msg to acc_cmd); replies and responses leave through a
// one-flit output register, one cycle after they are produced. Priority for
// that register: release acknowledgement, then accelerator response, then
// acquire/release replies.
module aurora_manager
  import aurora_pkg::*;
#(
  parameter logic [ID_W-1:0] MY_ID        = '0,
  parameter logic [6:0]      ACCEL_OPCODE = OPC_CUSTOM3
) (
  input  logic        clk,
  input  logic        rst_n,
  // messages from clients (request crossbar)
  input  logic        in_valid,
  output logic        in_ready,
  input  msg_t        in_msg,
  // messages to clients (response crossbar)
  output logic        out_valid,
  input  logic        out_ready,
  output msg_t        out_msg,
  // RoCC port of the accelerator
  output logic        acc_cmd_valid,
  input  logic        acc_cmd_ready,
  output rocc_cmd_t   acc_cmd,
  input  logic        acc_resp_valid,
  output logic        acc_resp_ready,
  input  rocc_resp_t  acc_resp,
  input  logic        acc_busy,
  output arch_state_t acc_state,
  // status
  output logic        acquired,
  output logic [ID_W-1:0] owner,
  output logic        prot_err
);
  typedef enum logic [1:0] {M_IDLE, M_ACQUIRED, M_DRAINING} mstate_e;

  mstate_e state;
  logic    out_free, drain_fire, resp_fire, reply_ok;
  logic    is_owner;
  logic    take, reply, grant;
  msg_t    reply_msg;

  assign out_free   = !out_valid || out_ready;
  assign drain_fire = (state == M_DRAINING) && !acc_busy && !acc_resp_valid && out_free;
  assign acc_resp_ready = out_free && (state != M_IDLE);
  assign resp_fire  = acc_resp_valid && acc_resp_ready;
  assign reply_ok   = out_free && !drain_fire && !resp_fire;
  assign is_owner   = (state != M_IDLE) && (in_msg.src == owner);

  // Decode of the incoming message: whether it is taken this cycle, and
  // whether it produces a reply flit.
  always_comb begin
    take          = 1'b0;
    reply         = 1'b0;
    grant         = 1'b0;
    acc_cmd_valid = 1'b0;
    prot_err      = 1'b0;
    reply_msg     = '0;
    reply_msg.src = MY_ID;
    reply_msg.dst = in_msg.src;
    if (in_valid) begin
      unique case (in_msg.kind)
        MSG_ACQ_REQ: begin
          reply          = 1'b1;
          take           = reply_ok;
          grant          = (state == M_IDLE) || (state == M_ACQUIRED && is_owner);
          reply_msg.kind = MSG_ACQ_RESP;
          reply_msg.cmd.rs1[0] = grant;
        end
        MSG_REL_REQ: begin
          if (state == M_ACQUIRED && is_owner) begin
            take = 1'b1;               // acknowledged once drained
          end else begin
            reply          = 1'b1;
            take           = reply_ok;
            reply_msg.kind = MSG_REL_ACK;
            reply_msg.cmd.rs1[0] = 1'b0;
          end
        end
        MSG_STATE: begin
          take     = 1'b1;
          prot_err = !(state == M_ACQUIRED && is_owner);
        end
        MSG_CMD: begin
          if (state == M_ACQUIRED && is_owner) begin
            acc_cmd_valid = 1'b1;
            take          = acc_cmd_ready;
          end else begin
            take     = 1'b1;
            prot_err = 1'b1;
          end
        end
        default: begin
          take     = 1'b1;
          prot_err = 1'b1;
        end
      endcase
    end
  end

  assign in_ready = take;

  always_comb begin
    acc_cmd             = in_msg.cmd;
    acc_cmd.inst.opcode = ACCEL_OPCODE;
  end

  assign acquired = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= M_IDLE;
      owner     <= '0;
      acc_state <= '0;
    end else begin
      if (drain_fire) state <= M_IDLE;
      if (in_valid && take) begin
        unique case (in_msg.kind)
          MSG_ACQ_REQ: if (grant) begin
            state     <= M_ACQUIRED;
            owner     <= in_msg.src;
            acc_state <= '{satp: in_msg.cmd.rs1, status: in_msg.cmd.rs2};
          end
          MSG_REL_REQ: if (state == M_ACQUIRED && is_owner) state <= M_DRAINING;
          MSG_STATE: if (state == M_ACQUIRED && is_owner)
            acc_state <= '{satp: in_msg.cmd.rs1, status: in_msg.cmd.rs2};
          default: ;
        endcase
      end
    end
  end

  // One-flit output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_msg   <= '0;
    end else if (out_free) begin
      out_valid <= drain_fire || resp_fire || (in_valid && take && reply);
      if (drain_fire) begin
        out_msg      <= '0;
        out_msg.kind <= MSG_REL_ACK;
        out_msg.src  <= MY_ID;
        out_msg.dst  <= owner;
        out_msg.cmd.rs1[0] <= 1'b1;
      end else if (resp_fire) begin
        out_msg              <= '0;
        out_msg.kind         <= MSG_ACC_RESP;
        out_msg.src          <= MY_ID;
        out_msg.dst          <= owner;
        out_msg.cmd.inst.rd  <= acc_resp.rd;
        out_msg.cmd.rs1      <= acc_resp.data;
      end else if (in_valid && take && reply) begin
        out_msg <= reply_msg;
      end
    end
  end

  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_msg))
    else $error("aurora_manager: output flit changed while waiting");
  a_cmd_owner: assert property (@(posedge clk) disable iff (!rst_n)
    acc_cmd_valid |-> state == M_ACQUIRED)
    else $error("aurora_manager: command to accelerator while not acquired");
endmodule
