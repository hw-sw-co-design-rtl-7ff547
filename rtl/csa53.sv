// csa53: 5-3 carry-save adder, the counter the MALU array is built from.
//
// It adds five bits of equal weight and returns the count as three bits:
// s (weight 1), c0 (weight 2) and c1 (weight 4). Five ones give 5 = 101b, so
// three output bits always suffice. Purely combinational.
module csa53 (
  input  logic [4:0] in,
  output logic       s,
  output logic       c0,
  output logic       c1
);
  logic [2:0] cnt;

  always_comb begin
    cnt = '0;
    for (int b = 0; b < 5; b++) cnt = cnt + 3'(in[b]);
    {c1, c0, s} = cnt;
  end
endmodule
