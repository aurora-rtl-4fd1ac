// accel_model: behavioural model of a RoCC accelerator, used by the
// testbenches in place of a real accelerator tile (not synthesizable
// intent, testbench only).
//
// It takes one command at a time (cmd_ready is high only when idle), works
// on it for LAT cycles with busy high, and then, if the instruction writes
// rd, returns rd with data = rs1 + rs2 + state.satp, sampling satp at
// the end of the work. The satp term lets a testbench see which shadowed
// address space the accelerator was running in. busy stays high until the
// response has been taken. n_cmds counts accepted commands and last_opcode
// keeps the opcode of the latest one.
module accel_model
  import aurora_pkg::*;
#(
  parameter int unsigned LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  rocc_cmd_t   cmd,
  output logic        resp_valid,
  input  logic        resp_ready,
  output rocc_resp_t  resp,
  output logic        busy,
  input  arch_state_t state,
  input  int unsigned lat_extra,
  output int unsigned n_cmds,
  output logic [6:0]  last_opcode
);
  rocc_cmd_t   cur;
  int unsigned cnt;
  logic        working;

  assign cmd_ready = !working && !resp_valid;
  assign busy      = working || resp_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      working     <= 1'b0;
      resp_valid  <= 1'b0;
      resp        <= '0;
      cnt         <= 0;
      n_cmds      <= 0;
      cur         <= '0;
      last_opcode <= '0;
    end else begin
      if (resp_valid && resp_ready) resp_valid <= 1'b0;
      if (cmd_valid && cmd_ready) begin
        cur         <= cmd;
        working     <= 1'b1;
        cnt         <= LAT + lat_extra;
        n_cmds      <= n_cmds + 1;
        last_opcode <= cmd.inst.opcode;
      end else if (working) begin
        if (cnt > 1) cnt <= cnt - 1;
        else begin
          working <= 1'b0;
          if (cur.inst.xd) begin
            resp_valid <= 1'b1;
            resp       <= '{rd: cur.inst.rd, data: cur.rs1 + cur.rs2 + state.satp};
          end
        end
      end
    end
  end
endmodule
