// coproc_ctrl: instruction decoder and sequencing FSM of the co-processor.
//
// It serves the host requests from pport_if and executes one instruction at
// a time:
//   STORE r  RAM[r] <= operand buffer                 (1 clock)
//   LOAD r   operand buffer <= RAM[r]                 (2 clocks)
//   SETN     modulus register N <= operand buffer     (1 clock)
//   EXEC     run the instruction register:
//     MALU rd, rx, ry, rs : rd = X*Y*2^-L + S mod N
//     CP   rd, rx, ry, rs : rd = A + (neg ? ~B : B) + C mod N
//     NOP                 : nothing
// For MALU and CP the FSM reads X/A, Y/B and S/C from the RAM in three
// consecutive clocks (operand modifiers from opnd_prep on X/A and S/C),
// starts the MALU and then the cp_stage (MALU) or the cp_stage directly (CP),
// and writes the reduced result to rd in the clock cp_stage signals done.
//
// Timing: every state sequence is fixed, so a MALU instruction always takes
// MALU_CYC clocks and a CP instruction CP_CYC clocks from the request to the
// clock after the write-back, whatever the operands: with L = 164, D = 4
// that is 50 and 8 clocks. This constant time per MALU or CP operation is
// the hardware half of the side-channel countermeasure; the software
// balances the number of operations.
//
// The instruction set (MALU_N and CP_N with three operands) and the constant
// execution time follow the design description; the encoding, the operand
// modifiers and the request protocol are this design's choice.
module coproc_ctrl #(
  parameter int unsigned L  = ecc_pkg::L,
  parameter int unsigned AW = ecc_pkg::RAW,
  parameter int unsigned CW = L + 2
) (
  input  logic            clk,
  input  logic            rst_n,
  // from the port interface
  input  ecc_pkg::req_e   req,
  input  logic [AW-1:0]   req_reg,
  input  logic [L-1:0]    opbuf,
  input  ecc_pkg::instr_t ir,
  output logic            ctrl_busy,
  output logic            ld_valid,
  output logic [L-1:0]    ld_data,
  // co-processor RAM
  output logic            rf_we,
  output logic [AW-1:0]   rf_waddr,
  output logic [L-1:0]    rf_wdata,
  output logic [AW-1:0]   rf_raddr,
  input  logic [L-1:0]    rf_rdata,
  // MALU (carry-save stage)
  output logic            malu_start,
  output logic [L-1:0]    malu_x,
  output logic [L-1:0]    malu_y,
  output logic [L-1:0]    malu_s,
  input  logic            malu_done,
  input  logic [L-1:0]    malu_rs,
  input  logic [L-1:0]    malu_rc0,
  input  logic [L-1:0]    malu_rc1,
  // carry-propagate stage
  output logic            cp_start,
  output logic [CW-1:0]   cp_u,
  output logic [CW-1:0]   cp_v,
  output logic [CW-1:0]   cp_w,
  input  logic            cp_done,
  input  logic [L-1:0]    cp_res,
  // modulus, shared by MALU and CP stage
  output logic [L-1:0]    n_q,
  // one-clock pulses when an instruction starts (for monitoring)
  output logic            malu_issued,
  output logic            cp_issued
);
  import ecc_pkg::*;

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_F1, S_F2, S_F3, S_GO, S_MUL, S_CPW
  } state_e;

  state_e         state;
  instr_t         cur;
  logic [L-1:0]   opa, opb, opc;
  logic [L-1:0]   prep_q;
  opmod_e         prep_mode;

  opnd_prep #(.L(L)) u_prep (
    .v    (rf_rdata),
    .n    (n_q),
    .mode (prep_mode),
    .q    (prep_q)
  );

  assign prep_mode = (state == S_F1) ? cur.xmod :
                     (state == S_F3) ? cur.smod : MOD_NONE;

  // RAM read address: the next operand of the running fetch sequence, or the
  // register a LOAD asks for.
  always_comb begin
    rf_raddr = req_reg;
    unique case (state)
      S_IDLE:  rf_raddr = (req == REQ_EXEC) ? AW'(ir.rx) : req_reg;
      S_F1:    rf_raddr = AW'(cur.ry);
      S_F2:    rf_raddr = AW'(cur.rs);
      default: rf_raddr = req_reg;
    endcase
  end

  // RAM write: host STORE while idle, or the result of an instruction.
  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = req_reg;
    rf_wdata = opbuf;
    if (state == S_IDLE && req == REQ_STORE) begin
      rf_we = 1'b1;
    end else if (state == S_CPW && cp_done) begin
      rf_we    = 1'b1;
      rf_waddr = AW'(cur.rd);
      rf_wdata = cp_res;
    end
  end

  assign ctrl_busy   = (state != S_IDLE);
  assign ld_valid    = (state == S_LOAD);
  // A LOAD hands the registered RAM read word straight to the buffer; the
  // FSM only says when it is valid.
  assign ld_data     = rf_rdata;
  assign malu_start  = (state == S_GO) && (cur.op == OP_MALU);
  assign malu_x      = opa;
  assign malu_y      = opb;
  assign malu_s      = opc;
  assign malu_issued = malu_start;
  assign cp_issued   = (state == S_GO) && (cur.op == OP_CP);

  // CP stage operands: the carry-save result after a MALU, or the
  // instruction's own operands for CP. The CP stage is two bits wider than a
  // register (sums up to 4N), so the top two bits of cp_u and cp_w are zero.
  always_comb begin
    cp_start = 1'b0;
    cp_u     = CW'(opa);
    cp_v     = cur.neg ? ~CW'(opb) : CW'(opb);
    cp_w     = CW'(opc);
    if (state == S_GO && cur.op == OP_CP) begin
      cp_start = 1'b1;
    end else if (state == S_MUL && malu_done) begin
      cp_start = 1'b1;
      cp_u     = CW'(malu_rs);
      cp_v     = CW'(malu_rc0);
      cp_w     = CW'(malu_rc1);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cur          <= '0;
      opa          <= '0;
      opb          <= '0;
      opc          <= '0;
      n_q          <= L'(1);
    end else begin
      unique case (state)
        S_IDLE: begin
          unique case (req)
            REQ_LOAD: state <= S_LOAD;
            REQ_SETN: n_q   <= opbuf;
            REQ_EXEC: begin
              cur   <= ir;
              state <= S_F1;
            end
            default: ;
          endcase
        end
        S_LOAD: state <= S_IDLE;
        S_F1: begin
          opa   <= prep_q;
          state <= S_F2;
        end
        S_F2: begin
          opb   <= rf_rdata;
          state <= S_F3;
        end
        S_F3: begin
          opc   <= prep_q;
          state <= S_GO;
        end
        S_GO: begin
          unique case (cur.op)
            OP_MALU: state <= S_MUL;
            OP_CP:   state <= S_CPW;
            default: state <= S_IDLE;
          endcase
        end
        S_MUL: if (malu_done) state <= S_CPW;
        S_CPW: if (cp_done)   state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A request only arrives while the controller is idle, and a MALU operand
  // Y must leave the top bit of the array free.
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                    (req != REQ_NONE) |-> (state == S_IDLE));
  a_malu_y_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                    malu_start |-> !opb[L-1]);
endmodule
