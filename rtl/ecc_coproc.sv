// ecc_coproc: GF(p) co-processor for elliptic-curve point operations,
// attached to an 8051 microcontroller through its parallel ports.
//
// The microcontroller runs point multiplication, point addition and point
// doubling in software and hands every field operation to this block as one
// instruction: MALU_N(X, Y, S) = X*Y*2^-L + S mod N (Montgomery product plus
// an addend) or CP_N(A, B, C) = A + B + C mod N with B optionally
// complemented, so that CP(2N+1, t, 0) negates t. Operands live in a 32-word
// RAM inside the co-processor; the host fills and reads it a byte at a time.
//
// Inside: pport_if (port commands, operand buffer, instruction register),
// coproc_ctrl (instruction decoder and FSM), regfile (operand RAM), malu
// (carry-save Montgomery array, D bits of X per clock) and cp_stage (carry
// propagation and reduction mod N).
//
// Interface: the 8051 ports P0 (argument byte in), P2 (command byte),
// P3.0 strobe, P1 (result byte out), P3.1 busy; see pport_if. For
// observation, malu_op and cp_op pulse once per executed MALU/CP instruction.
//
// Timing: a MALU instruction occupies the co-processor for 50 clocks and a
// CP instruction for 8 (L = 164, D = 4), independent of the operands, so the
// duration of a sequence of instructions reveals only how many of each kind
// it holds. The software keeps those counts equal for point addition and
// point doubling.
//
// The partition (software above the field operations, hardware below), the
// MALU/CP instruction pair and the constant execution time follow the design
// description; sizes and the port protocol are this design's choices.
module ecc_coproc #(
  parameter int unsigned L     = ecc_pkg::L,
  parameter int unsigned D     = ecc_pkg::D,
  parameter int unsigned NREGS = ecc_pkg::NREGS,
  parameter int unsigned BUF_W = ecc_pkg::BUF_W
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] p0_in,
  input  logic [7:0] p2_in,
  input  logic       p3_stb,
  output logic [7:0] p1_out,
  output logic       p3_busy,
  output logic       malu_op,
  output logic       cp_op
);
  localparam int unsigned AW = $clog2(NREGS);
  localparam int unsigned CW = L + 2;

  ecc_pkg::req_e   req;
  ecc_pkg::instr_t ir;
  logic [AW-1:0]   req_reg;
  logic [L-1:0]    opbuf;
  logic            ctrl_busy, ld_valid;
  logic [L-1:0]    ld_data;
  logic            rf_we;
  logic [AW-1:0]   rf_waddr, rf_raddr;
  logic [L-1:0]    rf_wdata, rf_rdata;
  logic            malu_start, malu_done, malu_busy;
  logic [L-1:0]    malu_x, malu_y, malu_s;
  logic [L-1:0]    malu_rs, malu_rc0, malu_rc1;
  logic            cp_start, cp_done;
  logic [CW-1:0]   cp_u, cp_v, cp_w;
  logic [L-1:0]    cp_res;
  logic [L-1:0]    n_q;

  pport_if #(.L(L), .BUF_W(BUF_W), .AW(AW)) u_pport (
    .clk, .rst_n,
    .p0_in, .p2_in, .p3_stb, .p1_out, .p3_busy,
    .req, .req_reg, .opbuf, .ir,
    .ctrl_busy, .ld_valid, .ld_data
  );

  coproc_ctrl #(.L(L), .AW(AW), .CW(CW)) u_ctrl (
    .clk, .rst_n,
    .req, .req_reg, .opbuf, .ir,
    .ctrl_busy, .ld_valid, .ld_data,
    .rf_we, .rf_waddr, .rf_wdata, .rf_raddr, .rf_rdata,
    .malu_start, .malu_x, .malu_y, .malu_s, .malu_done,
    .malu_rs, .malu_rc0, .malu_rc1,
    .cp_start, .cp_u, .cp_v, .cp_w, .cp_done, .cp_res,
    .n_q,
    .malu_issued (malu_op),
    .cp_issued   (cp_op)
  );

  regfile #(.L(L), .NREGS(NREGS), .AW(AW)) u_rf (
    .clk,
    .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata),
    .raddr (rf_raddr), .rdata (rf_rdata)
  );

  malu #(.L(L), .D(D)) u_malu (
    .clk, .rst_n,
    .start (malu_start),
    .x_op (malu_x), .y_op (malu_y), .s_op (malu_s), .n_op (n_q),
    .busy (malu_busy), .done (malu_done),
    .res_s (malu_rs), .res_c0 (malu_rc0), .res_c1 (malu_rc1)
  );

  cp_stage #(.L(L), .CW(CW)) u_cp (
    .clk, .rst_n,
    .start (cp_start),
    .u (cp_u), .v (cp_v), .w (cp_w), .n (n_q),
    .done (cp_done), .res (cp_res)
  );

  // The controller never starts the array while it is still running.
  a_malu_idle_at_start: assert property (@(posedge clk) disable iff (!rst_n)
                                         malu_start |-> !malu_busy);
endmodule
