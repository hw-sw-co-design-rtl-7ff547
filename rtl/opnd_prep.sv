// opnd_prep: operand modifier applied while an operand is read from the RAM.
//
// MOD_NONE passes v, MOD_DBL returns 2v, MOD_HALF returns v/2 mod N, i.e.
// (v + v[0]*N)/2, which is exact because N is odd. The point-operation
// schedules use such operands directly (2X2, 2Y2, 2Z2, 2t2, t4/2, t1/2).
// Both the doubled and the halved value are always formed and a multiplexer
// picks one, so the delay does not depend on the data. Combinational.
// Providing the modifiers in the operand path, rather than as separate
// instructions, is this design's choice.
module opnd_prep #(
  parameter int unsigned L = ecc_pkg::L
) (
  input  logic [L-1:0]          v,
  input  logic [L-1:0]          n,
  input  ecc_pkg::opmod_e       mode,
  output logic [L-1:0]          q
);
  logic [L:0] plus_n;

  assign plus_n = {1'b0, v} + (v[0] ? {1'b0, n} : '0);

  always_comb begin
    unique case (mode)
      ecc_pkg::MOD_DBL:  q = v << 1;
      ecc_pkg::MOD_HALF: q = plus_n[L:1];
      default:           q = v;
    endcase
  end
endmodule
