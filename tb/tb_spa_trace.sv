// tb_spa_trace: simple-power-analysis experiment on the co-processor.
//
// The testbench runs the same 160-bit scalar multiplication twice through the
// ports of ecc_coproc: once with the plain point doubling (15 MALU + 3 CP,
// the performance-oriented software) and once with the balanced doubling
// (padded to the 21 MALU + 5 CP pattern of point addition). During both runs
// it records a power estimate: the toggle count per clock (Hamming distance
// between consecutive values) of the arithmetic registers, i.e. the MALU's
// S/C0/C1 state and operand shifters and the CP stage's pipeline registers.
//
// An attacker model then works from that trace alone. Every burst of
// toggling clocks is one instruction; a long burst is a MALU (the array runs
// for L/D clocks), a short one a CP. The resulting string of operation kinds
// is parsed with the known addition and doubling patterns.
//  * Plain doubling: the parse must succeed and the bits recovered (a
//    doubling followed by an addition is a 1) must equal the secret scalar.
//  * Balanced doubling: every point operation must show the addition
//    pattern, so the trace holds a uniform sequence of identical point
//    operations and no doubling can be told from an addition.
// Both runs must end with the same point. The clock counts of both runs and
// their ratio (the cost of the countermeasure) are printed.
module tb_spa_trace;
  import ecc_pkg::*;

  localparam int unsigned W = 2 * L + 8;

  localparam logic [4:0] RX1 = 0, RY1 = 1, RZ1 = 2, RX2 = 3, RY2 = 4, RZ2 = 5;
  localparam logic [4:0] T1 = 6, T2 = 7, T3 = 8, T4 = 9;
  localparam logic [4:0] ZERO = 10, ONE = 11, TWO = 12, CA = 13, NEG = 14;
  localparam logic [4:0] DUMMY = 15;

  localparam string PAT_ADD = "MMMMAMMMMMAMMMAMMAMMMMAMMM";
  localparam string PAT_DBL = "MMMMMMMMMMAMMAMMAM";

  logic       clk = 0;
  logic       rst_n = 0;
  logic [7:0] p0_in = '0, p2_in = '0;
  logic       p3_stb = 0;
  logic [7:0] p1_out;
  logic       p3_busy;
  logic       malu_op, cp_op;

  int checks = 0, failures = 0;
  longint cycle = 0;

  ecc_coproc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ power model
  // Toggle count per clock of the arithmetic registers.
  logic [L-1:0]    pv_s, pv_c0, pv_c1, pv_x, pv_sh;
  logic [L+1:0]    pv_sum, pv_r1, pv_r2;
  bit              tracing = 0;
  int              tcpc;
  int              burst_len = 0;
  string           kinds = "";
  longint          total_toggles = 0;
  localparam int   MALU_BURST = int'(L / D) / 2;

  always @(posedge clk) begin
    tcpc = $countones(dut.u_malu.s_q ^ pv_s) + $countones(dut.u_malu.c0_q ^ pv_c0) +
           $countones(dut.u_malu.c1_q ^ pv_c1) + $countones(dut.u_malu.x_sh ^ pv_x) +
           $countones(dut.u_malu.s_sh ^ pv_sh) + $countones(dut.u_cp.sum_q ^ pv_sum) +
           $countones(dut.u_cp.r1_q ^ pv_r1) + $countones(dut.u_cp.r2_q ^ pv_r2);
    pv_s  = dut.u_malu.s_q;   pv_c0 = dut.u_malu.c0_q; pv_c1 = dut.u_malu.c1_q;
    pv_x  = dut.u_malu.x_sh;  pv_sh = dut.u_malu.s_sh;
    pv_sum = dut.u_cp.sum_q;  pv_r1 = dut.u_cp.r1_q;   pv_r2 = dut.u_cp.r2_q;
    if (tracing) begin
      total_toggles += longint'(tcpc);
      // The attacker: bursts of activity separated by quiet clocks.
      if (tcpc > 0) begin
        burst_len++;
      end else if (burst_len > 0) begin
        kinds = {kinds, (burst_len > MALU_BURST) ? "M" : "A"};
        burst_len = 0;
      end
    end
  end

  // ------------------------------------------------------------- host model
  task automatic strobe(cmd_e cmd, logic [7:0] arg);
    while (p3_busy) @(negedge clk);
    p2_in  = cmd;
    p0_in  = arg;
    p3_stb = 1;
    @(negedge clk);
    p3_stb = 0;
  endtask

  task automatic wait_idle();
    @(negedge clk);
    while (p3_busy) @(negedge clk);
  endtask

  task automatic put_buf(logic [L-1:0] v);
    logic [BUF_W-1:0] b = BUF_W'(v);
    for (int k = 0; k < BUF_W / 8; k++) strobe(CMD_BUF_IN, b[8*k +: 8]);
  endtask

  task automatic write_reg(logic [4:0] r, logic [L-1:0] v);
    put_buf(v);
    strobe(CMD_STORE, 8'(r));
  endtask

  task automatic read_reg(logic [4:0] r, output logic [L-1:0] v);
    logic [BUF_W-1:0] b;
    strobe(CMD_LOAD, 8'(r));
    wait_idle();
    for (int k = 0; k < BUF_W / 8; k++) begin
      b[8*k +: 8] = p1_out;
      strobe(CMD_BUF_OUT, 8'h00);
    end
    v = b[L-1:0];
  endtask

  task automatic exec(instr_t i);
    logic [31:0] w = i;
    for (int k = 0; k < 4; k++) strobe(CMD_IR_IN, w[8*k +: 8]);
    strobe(CMD_EXEC, 8'h00);
  endtask

  function automatic instr_t malu_i(logic [4:0] rd, logic [4:0] rx, logic [4:0] ry, logic [4:0] rs,
                                    opmod_e xm = MOD_NONE, opmod_e sm = MOD_NONE);
    instr_t i = '0;
    i.op = OP_MALU; i.xmod = xm; i.smod = sm;
    i.rd = rd; i.rx = rx; i.ry = ry; i.rs = rs;
    return i;
  endfunction

  function automatic instr_t neg_i(logic [4:0] rd, logic [4:0] rt);
    instr_t i = '0;
    i.op = OP_CP; i.neg = 1'b1;
    i.rd = rd; i.rx = NEG; i.ry = rt; i.rs = ZERO;
    return i;
  endfunction

  task automatic point_add();
    exec(malu_i(T1,  RZ1, RZ1, ZERO));
    exec(malu_i(T2,  RX2, T1,  ZERO));
    exec(malu_i(T3,  RZ2, RZ2, ZERO));
    exec(malu_i(T4,  RX1, T3,  T2));
    exec(neg_i (T2,  T2));
    exec(malu_i(T2,  RX1, T3,  T2));
    exec(malu_i(T1,  T1,  RZ1, ZERO));
    exec(malu_i(T1,  T1,  RY2, ZERO));
    exec(malu_i(RY2, T3,  RZ2, ZERO));
    exec(malu_i(T3,  RY2, RY1, T1));
    exec(neg_i (T1,  T1));
    exec(malu_i(RY2, RY2, RY1, T1));
    exec(malu_i(T1,  T2,  T2,  ZERO));
    exec(malu_i(T1,  T4,  T1,  ZERO));
    exec(neg_i (T4,  T1));
    exec(malu_i(RX2, RY2, RY2, T4));
    exec(malu_i(T4,  TWO, RX2, ZERO));
    exec(neg_i (T4,  T4));
    exec(malu_i(T4,  ONE, T1,  T4));
    exec(malu_i(T1,  T2,  T2,  ZERO));
    exec(malu_i(T1,  T1,  T2,  ZERO));
    exec(malu_i(T1,  T3,  T1,  ZERO));
    exec(neg_i (T1,  T1));
    exec(malu_i(RY2, T4,  RY2, T1, MOD_HALF, MOD_HALF));
    exec(malu_i(T1,  RZ1, RZ2, ZERO));
    exec(malu_i(RZ2, T2,  T1,  ZERO));
  endtask

  task automatic point_dbl(bit balanced);
    exec(malu_i(T1,  RX2, RX2, ZERO));
    exec(malu_i(T1,  RX2, RX2, T1, MOD_DBL));
    exec(malu_i(T2,  RZ2, RZ2, ZERO));
    exec(malu_i(T2,  T2,  T2,  ZERO));
    if (balanced) exec(neg_i(DUMMY, T1));
    exec(malu_i(T2,  CA,  T2,  ZERO));
    exec(malu_i(T1,  ONE, T1,  T2));
    exec(malu_i(T2,  RY2, RY2, ZERO, MOD_DBL));
    exec(malu_i(T3,  T2,  T2,  ZERO, MOD_DBL));
    exec(malu_i(T2,  RX2, T2,  ZERO, MOD_DBL));
    if (balanced) exec(neg_i(T3, T3));
    exec(malu_i(T4,  TWO, T2,  ZERO));
    if (balanced) begin
      exec(malu_i(DUMMY, T1, T1, ZERO));
      exec(malu_i(DUMMY, T1, T1, ZERO));
    end
    exec(neg_i (T4,  T4));
    exec(malu_i(RX2, T1,  T1,  T4));
    exec(malu_i(T4,  ONE, RX2, ZERO));
    exec(neg_i (T4,  T4));
    exec(malu_i(T2,  ONE, T2,  T4));
    exec(malu_i(RZ2, RZ2, RY2, ZERO, MOD_DBL));
    if (!balanced) exec(neg_i(T3, T3));
    exec(malu_i(RY2, T1,  T2,  T3));
    if (balanced) begin
      exec(malu_i(DUMMY, T1, T1, ZERO));
      exec(neg_i(DUMMY, T1));
      exec(malu_i(DUMMY, T1, T1, ZERO));
      exec(malu_i(DUMMY, T1, T1, ZERO));
      exec(malu_i(DUMMY, T1, T1, ZERO));
    end
  endtask

  // --------------------------------------------------------------- helpers
  logic [L-1:0] pmod;

  function automatic logic [L-1:0] mulmod(logic [L-1:0] a, logic [L-1:0] b);
    return L'((W'(a) * W'(b)) % W'(pmod));
  endfunction

  function automatic logic [L-1:0] rnd_below(logic [L-1:0] lim);
    logic [W-1:0] v = '0;
    for (int i = 0; i < W / 32 + 1; i++) v = (v << 32) | W'($urandom);
    return L'(v % W'(lim));
  endfunction

  // Scalar multiplication Q = kP (Q starts as P), traced.
  task automatic scalar_mult(logic [K-1:0] k, bit balanced, output longint clocks,
                             output logic [L-1:0] qx, output logic [L-1:0] qy,
                             output logic [L-1:0] qz);
    longint t0;
    exec(malu_i(RX2, ONE, RX1, ZERO));
    exec(malu_i(RY2, ONE, RY1, ZERO));
    exec(malu_i(RZ2, ONE, RZ1, ZERO));
    wait_idle();
    repeat (2) @(negedge clk);
    kinds     = "";
    burst_len = 0;
    tracing   = 1;
    t0        = cycle;
    for (int b = K - 2; b >= 0; b--) begin
      point_dbl(balanced);
      if (k[b]) point_add();
    end
    wait_idle();
    repeat (4) @(negedge clk);
    tracing = 0;
    clocks  = cycle - t0;
    read_reg(RX2, qx);
    read_reg(RY2, qy);
    read_reg(RZ2, qz);
  endtask

  // Attacker: parse the operation string into doublings and additions.
  task automatic parse(string s, output logic [K-1:0] bits, output int nbits,
                       output int n_add_shaped, output int n_dbl_shaped, output bit ok);
    int pos = 0;
    bits = '0; nbits = 0; n_add_shaped = 0; n_dbl_shaped = 0; ok = 1;
    while (pos < s.len()) begin
      if (pos + PAT_ADD.len() <= s.len() && s.substr(pos, pos + PAT_ADD.len() - 1) == PAT_ADD) begin
        n_add_shaped++;
        if (nbits > 0) bits[0] = 1'b1;       // an addition follows a doubling
        pos += PAT_ADD.len();
      end else if (pos + PAT_DBL.len() <= s.len() && s.substr(pos, pos + PAT_DBL.len() - 1) == PAT_DBL) begin
        n_dbl_shaped++;
        bits = bits << 1;
        nbits++;
        pos += PAT_DBL.len();
      end else begin
        ok = 0;
        return;
      end
    end
  endtask

  initial begin
    logic [L-1:0] rm, px, py;
    logic [L-1:0] ax, ay, az, bx, by, bz;
    logic [K-1:0] scalar, rec;
    longint clk_plain, clk_bal;
    longint tog_plain, tog_bal;
    int nbits, na, nd;
    bit ok;

    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    pmod = {{(L - K){1'b0}}, {(K){1'b1}}} - (L'(1) << 31);   // 2^160 - 2^31 - 1
    rm   = L'((W'(1) << L) % W'(pmod));
    put_buf(pmod);
    strobe(CMD_SETN, 8'h00);
    write_reg(ZERO, '0);
    write_reg(ONE,  rm);
    write_reg(TWO,  L'((W'(rm) * 2) % W'(pmod)));
    write_reg(NEG,  2 * pmod + 1);
    write_reg(CA,   mulmod(pmod - L'(3), rm));
    px = rnd_below(pmod);
    py = rnd_below(pmod);
    write_reg(RX1, mulmod(px, rm));
    write_reg(RY1, mulmod(py, rm));
    write_reg(RZ1, rm);

    scalar = K'(rnd_below({1'b1, {(K){1'b0}}}));
    scalar[K-1] = 1'b1;

    // Performance-oriented software: the key leaks.
    scalar_mult(scalar, 1'b0, clk_plain, ax, ay, az);
    tog_plain = total_toggles;
    parse(kinds, rec, nbits, na, nd, ok);
    chk(ok, "plain run: trace parses into doublings and additions");
    chk(nbits == int'(K) - 1, $sformatf("plain run: %0d doublings seen", nbits));
    chk(rec == (scalar & ~(K'(1) << (K - 1))), "plain run: key recovered from the trace");
    $display("plain doubling:    %0d clocks, %0d operations, key bits recovered: %0d", clk_plain,
             kinds.len(), nbits);

    // Balanced software: all point operations look like additions.
    total_toggles = 0;
    scalar_mult(scalar, 1'b1, clk_bal, bx, by, bz);
    tog_bal = total_toggles;
    parse(kinds, rec, nbits, na, nd, ok);
    chk(ok && nd == 0, "balanced run: no doubling-shaped operation in the trace");
    chk(na == int'(K) - 1 + $countones(scalar) - 1,
        $sformatf("balanced run: %0d identical point operations", na));
    chk(ax == bx && ay == by && az == bz, "both runs compute the same point");
    $display("balanced doubling: %0d clocks, %0d operations, all point operations alike: %0d",
             clk_bal, kinds.len(), na);
    $display("cost of balancing: %0d%% more clocks, toggles %0d vs %0d",
             (clk_bal - clk_plain) * 100 / clk_plain, tog_bal, tog_plain);
    chk(clk_bal > clk_plain, "balancing costs time");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
