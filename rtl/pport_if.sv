// pport_if: the co-processor's interface to the 8051 parallel ports.
//
// The microcontroller talks to the co-processor through its I/O ports only:
//   P2 (p2_in)   command byte, see ecc_pkg::cmd_e
//   P0 (p0_in)   argument byte: operand data or a register number
//   P3.0 (p3_stb) one-clock strobe that issues the command on P2/P0
//   P1 (p1_out)  the low byte of the operand buffer, for reading results
//   P3.1 (p3_busy) high while a command is still being carried out
// Operands travel through a BUF_W-bit operand buffer, least significant byte
// first: CMD_BUF_IN shifts a byte in at the top, CMD_BUF_OUT shifts the
// buffer down by a byte so that P1 shows the next one. The 32-bit instruction
// register is filled the same way by CMD_IR_IN. STORE, LOAD, SETN and EXEC
// become a one-clock request to the controller (coproc_ctrl), with the
// register number taken from P0; LOAD returns the word into the buffer.
//
// Timing: the port clock is the co-processor clock. Buffer and IR commands
// take effect at the next edge and never raise busy. A controller request is
// registered, so busy rises in the clock after the strobe and stays high
// until the controller is idle again. The host may strobe only while busy is
// low (asserted).
//
// The block's existence between the 8051 ports and the instruction decoder
// follows the design description; the command set, the byte order and the
// handshake are this design's choice.
module pport_if #(
  parameter int unsigned L     = ecc_pkg::L,
  parameter int unsigned BUF_W = ecc_pkg::BUF_W,
  parameter int unsigned AW    = ecc_pkg::RAW
) (
  input  logic          clk,
  input  logic          rst_n,
  // 8051 side
  input  logic [7:0]    p0_in,
  input  logic [7:0]    p2_in,
  input  logic          p3_stb,
  output logic [7:0]    p1_out,
  output logic          p3_busy,
  // controller side
  output ecc_pkg::req_e req,
  output logic [AW-1:0] req_reg,
  output logic [L-1:0]  opbuf,
  output ecc_pkg::instr_t ir,
  input  logic          ctrl_busy,
  input  logic          ld_valid,
  input  logic [L-1:0]  ld_data
);
  import ecc_pkg::*;

  logic [BUF_W-1:0] buf_q;
  logic [31:0]      ir_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q   <= '0;
      ir_q    <= '0;
      req     <= REQ_NONE;
      req_reg <= '0;
    end else begin
      req <= REQ_NONE;
      if (ld_valid) buf_q <= BUF_W'(ld_data);
      if (p3_stb && !p3_busy) begin
        req_reg <= p0_in[AW-1:0];
        case (p2_in)
          CMD_BUF_IN:  buf_q <= {p0_in, buf_q[BUF_W-1:8]};
          CMD_BUF_OUT: buf_q <= buf_q >> 8;
          CMD_IR_IN:   ir_q  <= {p0_in, ir_q[31:8]};
          CMD_STORE:   req   <= REQ_STORE;
          CMD_LOAD:    req   <= REQ_LOAD;
          CMD_SETN:    req   <= REQ_SETN;
          CMD_EXEC:    req   <= REQ_EXEC;
          default:     ;
        endcase
      end
    end
  end

  assign p3_busy = ctrl_busy || (req != REQ_NONE);
  assign p1_out  = buf_q[7:0];
  assign opbuf   = buf_q[L-1:0];
  assign ir      = instr_t'(ir_q);

  a_no_strobe_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                          !(p3_stb && p3_busy));
endmodule
