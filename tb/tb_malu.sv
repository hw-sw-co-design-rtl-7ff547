// tb_malu: self-checking test of the MALU carry-save stage.
//
// Random odd moduli N just below 2^K and operands in the documented ranges
// (X < 4N, Y < 2N, S < 2N) plus corner operands (0, N-1, 2N-1, 4N-1).
// Each result r = S + C0 + C1 must satisfy r*2^L == X*Y + S*2^L (mod N)
// and r < 4N, and the operation must take exactly L/D + 1 clocks.
module tb_malu;
  import ecc_pkg::*;
  localparam int unsigned W = 2 * L + 8;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         start = 0;
  logic [L-1:0] x_op, y_op, s_op, n_op;
  logic         busy, done;
  logic [L-1:0] res_s, res_c0, res_c1;
  int           checks = 0, failures = 0;

  malu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] rnd_below(logic [L-1:0] lim);
    logic [W-1:0] v = '0;
    for (int i = 0; i < W / 32 + 1; i++) v = (v << 32) | W'($urandom);
    return L'(v % W'(lim));
  endfunction

  task automatic run(logic [L-1:0] x, logic [L-1:0] y, logic [L-1:0] s, logic [L-1:0] n);
    logic [W-1:0] r, lhs, rhs;
    int cyc;
    x_op = x; y_op = y; s_op = s; n_op = n;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    r   = W'(res_s) + W'(res_c0) + W'(res_c1);
    lhs = ((r << L) % W'(n));
    rhs = ((W'(x) * W'(y)) + (W'(s) << L)) % W'(n);
    checks++;
    if (lhs != rhs) begin
      failures++;
      $display("FAIL congruence x=%h y=%h s=%h n=%h r=%h", x, y, s, n, r);
    end
    checks++;
    if (r >= 4 * W'(n)) begin
      failures++;
      $display("FAIL range r=%h n=%h", r, n);
    end
    checks++;
    if (cyc != int'(L / D) + 1) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", cyc, L / D + 1);
    end
  endtask

  initial begin
    logic [L-1:0] n;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      n = rnd_below({1'b1, {(K){1'b0}}}) | L'(1);
      n[K-1] = 1'b1;
      if (t < 40) begin
        case (t % 4)
          0: run(4 * n - 1, 2 * n - 1, 2 * n - 1, n);
          1: run('0, 2 * n - 1, 2 * n - 1, n);
          2: run(4 * n - 1, '0, '0, n);
          default: run(n - 1, n - 1, n - 1, n);
        endcase
      end else begin
        run(rnd_below(4 * n), rnd_below(2 * n), rnd_below(2 * n), n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
