// cp_stage: carry-propagate (CP) stage with modular reduction.
//
// Adds three vectors into a normal integer and reduces it modulo N:
//   res = (u + v + w) mod 2^CW, then minus 2N if >= 2N, then minus N if >= N.
// It serves two purposes. After a MALU operation u, v, w are the carry-save
// vectors S, C0, C1 and the stage resolves the carries. As an instruction of
// its own, CP_N(A, B, C), u, v, w are the operands themselves; the caller
// passes ~B for v to negate, so CP(2N+1, t, 0) = 2N+1 + ~t = 2N - t.
// The result is fully reduced (res < N) whenever the sum is below 4N.
//
// Timing: a three-stage pipeline (add, conditional -2N, conditional -N).
// 'done' pulses three clocks after 'start' and 'res' holds until the next
// operation. Both subtractions are always computed and the choice is a
// multiplexer, so the time never depends on the data.
//
// That carries are resolved here and that the CP operation adds operands mod
// N follows the design description; the adder width, the pipelining and the
// two-step reduction are this design's choice.
module cp_stage #(
  parameter int unsigned L  = ecc_pkg::L,
  parameter int unsigned CW = L + 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] u,
  input  logic [CW-1:0] v,
  input  logic [CW-1:0] w,
  input  logic [L-1:0]  n,
  output logic          done,
  output logic [L-1:0]  res
);
  logic [CW-1:0] sum_q, r1_q, r2_q;
  logic [CW:0]   diff2n, diff1n;
  logic [2:0]    vld;

  assign diff2n = {1'b0, sum_q} - ({1'b0, CW'(n)} << 1);
  assign diff1n = {1'b0, r1_q}  -  {1'b0, CW'(n)};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q <= '0;
      r1_q  <= '0;
      r2_q  <= '0;
      vld   <= '0;
    end else begin
      vld <= {vld[1:0], start};
      if (start)  sum_q <= u + v + w;
      if (vld[0]) r1_q  <= diff2n[CW] ? sum_q : diff2n[CW-1:0];
      if (vld[1]) r2_q  <= diff1n[CW] ? r1_q  : diff1n[CW-1:0];
    end
  end

  assign done = vld[2];
  assign res  = r2_q[L-1:0];
endmodule
