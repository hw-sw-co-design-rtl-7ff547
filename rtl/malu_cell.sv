// malu_cell: one column j of the MALU carry-save array, cell(i,j).
//
// The cell stacks D 5-3 counters, one per Montgomery iteration handled in a
// clock cycle (level l handles bit x_i[l] of the current multiplier digit).
// Level l adds x_i[l]&y_j, m_i[l]&n_j, a sum bit s, a carry c0 and a carry
// c1, all of weight 2^j. Because every iteration ends with a division by two,
// the level's outputs move as follows:
//   sum    -> s_out[l]  : column j-1, level l+1 (or the S flip-flop of j-1)
//   carry0 -> stays in this column for level l+1 (or the C0 flip-flop of j)
//   carry1 -> c1_out[l] : column j+1, level l+1 (or the C1 flip-flop of j+1)
// s_in[0], c0_in and c1_in[0] come from this column's flip-flops;
// s_in[l] (l>0) from column j+1 and c1_in[l] (l>0) from column j-1.
// m_out[l] is the parity of level l without the m_i n_j term; in column 0,
// where n_0 = 1, it is the quotient bit m_i[l] that makes the sum even.
//
// The 5-3 counters, the five inputs and the routing of s, c0 and c1 follow
// the MALU description; the stack of D counters per cell, the registered
// sum bit and the m_out port are this design's reading of it. Combinational.
module malu_cell #(
  parameter int unsigned D = ecc_pkg::D
) (
  input  logic [D-1:0] x_bits,   // x_i, one bit per level
  input  logic         y_bit,    // y_j
  input  logic [D-1:0] m_bits,   // m_i, one bit per level
  input  logic         n_bit,    // n_j
  input  logic [D-1:0] s_in,
  input  logic         c0_in,
  input  logic [D-1:0] c1_in,
  output logic [D-1:0] s_out,
  output logic         c0_out,
  output logic [D-1:0] c1_out,
  output logic [D-1:0] m_out
);
  logic [D:0] c0_chain;

  assign c0_chain[0] = c0_in;
  assign c0_out      = c0_chain[D];

  for (genvar l = 0; l < D; l++) begin : g_level
    csa53 u_csa (
      .in ({x_bits[l] & y_bit, m_bits[l] & n_bit, s_in[l], c0_chain[l], c1_in[l]}),
      .s  (s_out[l]),
      .c0 (c0_chain[l+1]),
      .c1 (c1_out[l])
    );
    assign m_out[l] = s_in[l] ^ c0_chain[l] ^ c1_in[l] ^ (x_bits[l] & y_bit);
  end
endmodule
