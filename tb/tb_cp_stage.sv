// tb_cp_stage: self-checking test of the carry-propagate stage.
//
// Drives random triples whose sum is below 4N (the stage's contract), the
// negation form (2N+1, ~t, 0) and corner sums 0, N-1, N, 2N-1, 2N, 4N-1.
// The result must equal the sum mod N and 'done' must come 3 clocks after
// 'start'.
module tb_cp_stage;
  import ecc_pkg::*;
  localparam int unsigned CW = L + 2;
  localparam int unsigned W  = 2 * L + 8;

  logic          clk = 0;
  logic          rst_n = 0;
  logic          start = 0;
  logic [CW-1:0] u, v, w;
  logic [L-1:0]  n;
  logic          done;
  logic [L-1:0]  res;
  int            checks = 0, failures = 0;

  cp_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] rnd_below(logic [L:0] lim);
    logic [W-1:0] r = '0;
    for (int i = 0; i < W / 32 + 1; i++) r = (r << 32) | W'($urandom);
    return L'(r % W'(lim));
  endfunction

  task automatic run(logic [CW-1:0] a, logic [CW-1:0] b, logic [CW-1:0] c, logic [W-1:0] expect_v);
    int cyc;
    u = a; v = b; w = c;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 2;
    if (W'(res) != expect_v) begin
      failures++;
      $display("FAIL u=%h v=%h w=%h n=%h res=%h exp=%h", a, b, c, n, res, expect_v);
    end
    if (cyc != 3) begin
      failures++;
      $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    logic [L-1:0] a, b, c, t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      n = rnd_below({1'b1, {(K){1'b0}}}) | L'(1);
      n[K-1] = 1'b1;
      // Random sum below 4N split in three.
      a = rnd_below(2 * n);
      b = rnd_below(n);
      c = rnd_below(n);
      run(CW'(a), CW'(b), CW'(c), (W'(a) + W'(b) + W'(c)) % W'(n));
      // Negation: 2N+1 + ~t + 0 = 2N - t.
      t = rnd_below(n);
      run(CW'(2 * n + 1), ~CW'(t), '0, (W'(n) - W'(t)) % W'(n));
      // Corner sums.
      case (k % 6)
        0: run('0, '0, '0, '0);
        1: run(CW'(n - 1), '0, '0, W'(n - 1));
        2: run('0, CW'(n), '0, '0);
        3: run(CW'(n), CW'(n - 1), '0, W'(n - 1));
        4: run(CW'(n), '0, CW'(n), '0);
        default: run(CW'(2 * n), CW'(n), CW'(n - 1), W'(n - 1));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
