// aurora_pkg: types and constants shared by the AuRORA client, manager and
// message crossbar.
//
// AuRORA places a small client next to every CPU and a small manager next to
// every accelerator, and lets them talk over an on-chip interconnect with a
// short message protocol: acquire / release of an accelerator, upkeep of the
// owning thread's architectural state shadowed in the manager, forwarding of
// accelerator instructions from client to manager, and accelerator responses
// travelling back. Every message is one flit of type msg_t.
//
// The message kinds follow the protocol operations the design names
// (acquire, release, state synchronisation, instruction forwarding); their
// encoding, the field layout and all widths are this design's own choice.
// The RoCC field positions and custom opcodes follow the RISC-V RoCC
// convention used by Rocket-based SoCs.
package aurora_pkg;

  // Virtual accelerator slots per client: custom1, custom2 and custom3
  // instructions go to slots 0, 1 and 2.
  localparam int unsigned N_VSLOTS = 3;

  // Architectural register width of the host CPU (RV64).
  localparam int unsigned XLEN = 64;
  // Width of a client or manager identifier carried in messages.
  localparam int unsigned ID_W = 4;

  // RISC-V custom opcodes.
  localparam logic [6:0] OPC_CUSTOM0 = 7'b0001011;
  localparam logic [6:0] OPC_CUSTOM1 = 7'b0101011;
  localparam logic [6:0] OPC_CUSTOM2 = 7'b1011011;
  localparam logic [6:0] OPC_CUSTOM3 = 7'b1111011;

  // AuRORA control instructions live on custom0, selected by funct7.
  localparam logic [6:0] F7_ACQUIRE = 7'd0;  // rs1 = virtual slot, rs2 = physical manager id
  localparam logic [6:0] F7_RELEASE = 7'd1;  // rs1 = virtual slot

  // A RoCC instruction word, field by field.
  typedef struct packed {
    logic [6:0] funct7;
    logic [4:0] rs2;
    logic [4:0] rs1;
    logic       xd;
    logic       xs1;
    logic       xs2;
    logic [4:0] rd;
    logic [6:0] opcode;
  } rocc_inst_t;

  // A RoCC command: instruction plus the two source operands read by the CPU.
  typedef struct packed {
    rocc_inst_t      inst;
    logic [XLEN-1:0] rs1;
    logic [XLEN-1:0] rs2;
  } rocc_cmd_t;

  // A RoCC response: destination register and value written back.
  typedef struct packed {
    logic [4:0]      rd;
    logic [XLEN-1:0] data;
  } rocc_resp_t;

  // Architectural state of a thread that an accelerator needs to run on its
  // behalf: the page-table root (satp) and the status word (mstatus).
  typedef struct packed {
    logic [XLEN-1:0] satp;
    logic [XLEN-1:0] status;
  } arch_state_t;

  typedef enum logic [2:0] {
    MSG_ACQ_REQ  = 3'd0,  // client -> manager: d = state of the requesting thread
    MSG_ACQ_RESP = 3'd1,  // manager -> client: cmd.rs1[0] = granted
    MSG_REL_REQ  = 3'd2,  // client -> manager
    MSG_REL_ACK  = 3'd3,  // manager -> client: cmd.rs1[0] = released
    MSG_STATE    = 3'd4,  // client -> manager: d = new thread state
    MSG_CMD      = 3'd5,  // client -> manager: forwarded accelerator instruction
    MSG_ACC_RESP = 3'd6   // manager -> client: cmd.inst.rd / cmd.rs1 = response
  } msg_kind_e;

  // One message flit. cmd carries forwarded instructions and responses;
  // for MSG_ACQ_REQ and MSG_STATE its rs1/rs2 carry satp/status.
  typedef struct packed {
    msg_kind_e       kind;
    logic [ID_W-1:0] src;
    logic [ID_W-1:0] dst;
    rocc_cmd_t       cmd;
  } msg_t;

endpackage
