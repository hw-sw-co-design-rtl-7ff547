// malu: carry-save (CS) stage of the Modular Arithmetic Logic Unit.
//
// Computes MALU_N(X, Y, S) = (X*Y + M*N)/2^L + S, the Montgomery product of X
// and Y plus S, and leaves it in redundant form as three L-bit vectors
// (S, C0, C1) whose sum is the result; the cp_stage turns them into a normal
// integer and reduces it. With operands in Montgomery form (times R = 2^L)
// this is (XY + S)R mod N up to a multiple of N.
//
// How it works: L columns of malu_cell form the array. Each clock the array
// consumes the next D bits of X (least significant first) and performs D
// radix-2 Montgomery iterations: the quotient bits m_i come out of column 0
// (N is odd, so n_0 = 1), and each iteration shifts the redundant value one
// column to the right. S is added by feeding its bits, D per clock, into the
// sum input of the top column: a bit fed in iteration t has been halved
// L-1-t times at the end, so S arrives with weight 1. The carries c0/c1 and
// the sum bits sit in flip-flops between clocks. The bits shifted out of
// column 0 (sout) are always zero; a carry out of the top column never occurs
// while Y, N < 2^(L-1). Both are asserted.
//
// Timing: 'start' (one cycle, while idle) loads the operands; the array then
// runs L/D clocks; 'done' pulses one clock after the last one and the result
// stays on res_* until the next start. Total: L/D + 1 clocks from start to
// done, independent of the data.
//
// Operand ranges for an exact result below 4N: X < 2^L, Y < 2N, S < 2N,
// N odd, N < 2^(L-3).
//
// The array of 5-3 counters, the quotient taken from cell(i,0), and S entering
// at the top column follow the MALU description; D, ALPHA and the load/done
// handshake are this design's choice.
module malu #(
  parameter int unsigned L = ecc_pkg::L,
  parameter int unsigned D = ecc_pkg::D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [L-1:0] x_op,
  input  logic [L-1:0] y_op,
  input  logic [L-1:0] s_op,
  input  logic [L-1:0] n_op,
  output logic         busy,
  output logic         done,
  output logic [L-1:0] res_s,
  output logic [L-1:0] res_c0,
  output logic [L-1:0] res_c1
);
  localparam int unsigned NCYC = L / D;
  localparam int unsigned CW   = $clog2(NCYC + 1);

  logic [L-1:0]  x_sh, s_sh, y_r, n_r;
  logic [L-1:0]  s_q, c0_q, c1_q;
  logic [L-1:0]  s_d, c0_d, c1_d;
  logic [CW-1:0] cnt;

  // Array wiring.
  logic [D-1:0] cell_s_in  [L];
  logic [D-1:0] cell_c1_in [L];
  logic [D-1:0] cell_s_out [L];
  logic [D-1:0] cell_c1_out[L];
  logic [D-1:0] cell_m_out [L];
  logic         cell_c0_out[L];
  logic [D-1:0] m_i;
  logic [D-1:0] inj;
  logic [D-1:0] sout;

  assign inj  = s_sh[D-1:0];
  assign m_i  = cell_m_out[0];
  assign sout = cell_s_out[0];

  for (genvar j = 0; j < L; j++) begin : g_col
    for (genvar l = 0; l < D; l++) begin : g_lvl
      if (l == 0) begin : g_first
        assign cell_s_in[j][0]  = s_q[j];
        assign cell_c1_in[j][0] = c1_q[j];
      end else begin : g_next
        if (j == L - 1) begin : g_top
          assign cell_s_in[j][l] = inj[l-1];
        end else begin : g_mid
          assign cell_s_in[j][l] = cell_s_out[j+1][l-1];
        end
        if (j == 0) begin : g_bot
          assign cell_c1_in[j][l] = 1'b0;
        end else begin : g_up
          assign cell_c1_in[j][l] = cell_c1_out[j-1][l-1];
        end
      end
    end

    malu_cell #(.D(D)) u_cell (
      .x_bits (x_sh[D-1:0]),
      .y_bit  (y_r[j]),
      .m_bits (m_i),
      .n_bit  (n_r[j]),
      .s_in   (cell_s_in[j]),
      .c0_in  (c0_q[j]),
      .c1_in  (cell_c1_in[j]),
      .s_out  (cell_s_out[j]),
      .c0_out (cell_c0_out[j]),
      .c1_out (cell_c1_out[j]),
      .m_out  (cell_m_out[j])
    );

    assign c0_d[j] = cell_c0_out[j];
    if (j == L - 1) begin : g_stop
      assign s_d[j] = inj[D-1];
    end else begin : g_smid
      assign s_d[j] = cell_s_out[j+1][D-1];
    end
    if (j == 0) begin : g_cbot
      assign c1_d[j] = 1'b0;
    end else begin : g_cup
      assign c1_d[j] = cell_c1_out[j-1][D-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_sh <= '0;
      s_sh <= '0;
      y_r  <= '0;
      n_r  <= '0;
      s_q  <= '0;
      c0_q <= '0;
      c1_q <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x_sh <= x_op;
        s_sh <= s_op;
        y_r  <= y_op;
        n_r  <= n_op;
        s_q  <= '0;
        c0_q <= '0;
        c1_q <= '0;
        cnt  <= CW'(NCYC);
        busy <= 1'b1;
      end else if (busy) begin
        x_sh <= x_sh >> D;
        s_sh <= s_sh >> D;
        s_q  <= s_d;
        c0_q <= c0_d;
        c1_q <= c1_d;
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign res_s  = s_q;
  assign res_c0 = c0_q;
  assign res_c1 = c1_q;

  // The Montgomery quotient makes every shifted-out bit zero, and no carry
  // may leave the top column.
  a_sout_zero: assert property (@(posedge clk) disable iff (!rst_n)
                                busy |-> sout == '0);
  a_no_top_carry: assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> cell_c1_out[L-1] == '0);
  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n)
                            (start && !busy) |-> n_op[0]);

  initial begin
    assert (L % D == 0) else $error("malu: L must be a multiple of D");
  end
endmodule
