// tb_ecc_coproc: end-to-end test of the co-processor, driven the way the 8051
// software drives it, at the default sizes (K = 160, L = 164, D = 4).
//
// The testbench plays the microcontroller: it moves operands through the
// port interface a byte at a time, issues MALU and CP instructions and reads
// results back. A shadow model computes every instruction independently
// (Montgomery product through an explicit 2^-L mod N, CP through ordinary
// modular addition) and every read-back is compared with it.
//
// Phases:
//  1. Directed instructions covering each operand modifier (x2, /2 on X and
//     on S), the negating CP, NOP, LOAD/STORE/SETN, with read-back of each.
//  2. Curve set-up on y^2 = x^3 + a x + b over the 160-bit prime
//     p = 2^160 - 2^31 - 1 with a = -3 and b chosen so that a random point
//     P lies on it; P is converted to Montgomery form on the co-processor.
//  3. One plain (unbalanced) doubling, 15 MALU + 3 CP, to show that its
//     length differs from an addition.
//  4. A 160-bit scalar multiplication Q = kP with the binary method, using
//     the point-addition schedule (21 MALU + 5 CP) and the doubling schedule
//     padded with 6 dummy MALU and 2 dummy CP so that both have the same
//     sequence of operation kinds. Every point operation must produce the
//     same timing pattern of MALU/CP issues; the result, converted back to
//     affine coordinates, must equal an affine reference kP and lie on the
//     curve.
// Each mechanism (modifier, negation, dummy operation, busy wait, ...) is
// counted and one that never occurred is a failure.
module tb_ecc_coproc;
  import ecc_pkg::*;

  localparam int unsigned W  = 2 * L + 8;
  localparam int unsigned CW = L + 2;

  // Register map used by the software.
  localparam logic [4:0] RX1 = 0, RY1 = 1, RZ1 = 2, RX2 = 3, RY2 = 4, RZ2 = 5;
  localparam logic [4:0] T1 = 6, T2 = 7, T3 = 8, T4 = 9;
  localparam logic [4:0] ZERO = 10, ONE = 11, TWO = 12, CA = 13, NEG = 14;
  localparam logic [4:0] DUMMY = 15, R2 = 16, RAW1 = 17, SCR = 18;

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

  // ---------------------------------------------------------------- arithmetic
  logic [L-1:0] pmod;           // modulus N = p
  logic [L-1:0] rinv;           // 2^-L mod p
  logic [L-1:0] shadow [32];

  function automatic logic [L-1:0] mulmod(logic [L-1:0] a, logic [L-1:0] b);
    return L'((W'(a) * W'(b)) % W'(pmod));
  endfunction

  function automatic logic [L-1:0] addmod(logic [L-1:0] a, logic [L-1:0] b);
    return L'((W'(a) + W'(b)) % W'(pmod));
  endfunction

  function automatic logic [L-1:0] submod(logic [L-1:0] a, logic [L-1:0] b);
    return L'((W'(a) + W'(pmod) - W'(b) % W'(pmod)) % W'(pmod));
  endfunction

  function automatic logic [L-1:0] powmod(logic [L-1:0] a, logic [L-1:0] e);
    logic [L-1:0] r = L'(1);
    for (int i = L - 1; i >= 0; i--) begin
      r = mulmod(r, r);
      if (e[i]) r = mulmod(r, a);
    end
    return r;
  endfunction

  function automatic logic [L-1:0] invmod(logic [L-1:0] a);
    return powmod(a, pmod - 2);
  endfunction

  function automatic logic [L-1:0] rnd_below(logic [L-1:0] lim);
    logic [W-1:0] v = '0;
    for (int i = 0; i < W / 32 + 1; i++) v = (v << 32) | W'($urandom);
    return L'(v % W'(lim));
  endfunction

  // Shadow model of one instruction.
  function automatic logic [L-1:0] ref_mod(logic [L-1:0] v, opmod_e m);
    case (m)
      MOD_DBL:  return v << 1;
      MOD_HALF: return v[0] ? L'((W'(v) + W'(pmod)) / 2) : v / 2;
      default:  return v;
    endcase
  endfunction

  function automatic logic [L-1:0] ref_exec(instr_t i);
    logic [L-1:0] x, y, s;
    logic [W-1:0] t;
    x = ref_mod(shadow[i.rx], i.xmod);
    y = shadow[i.ry];
    s = ref_mod(shadow[i.rs], i.smod);
    if (i.op == OP_MALU) begin
      return L'((W'(mulmod(L'((W'(x) * W'(y)) % W'(pmod)), rinv)) + W'(s)) % W'(pmod));
    end
    t = W'(x) + (i.neg ? W'(~CW'(y)) : W'(y)) + W'(s);
    t = t % (W'(1) << CW);
    return L'(t % W'(pmod));
  endfunction

  // --------------------------------------------------------------- host model
  int n_busy_wait = 0, n_store = 0, n_load = 0, n_setn = 0, n_nop = 0;
  int n_malu = 0, n_cp = 0, n_neg = 0, n_xdbl = 0, n_xhalf = 0, n_shalf = 0;
  int n_dummy_m = 0, n_dummy_a = 0, n_add = 0, n_dbl = 0, n_dbl_plain = 0;

  task automatic strobe(cmd_e cmd, logic [7:0] arg);
    if (p3_busy) n_busy_wait++;
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
    shadow[r] = v;
    n_store++;
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
    n_load++;
  endtask

  task automatic check_reg(logic [4:0] r, string what);
    logic [L-1:0] v;
    read_reg(r, v);
    checks++;
    if (v != shadow[r]) begin
      failures++;
      $display("FAIL %s: r%0d = %h, expected %h", what, r, v, shadow[r]);
    end
  endtask

  task automatic exec(instr_t i);
    logic [31:0] w = i;
    for (int k = 0; k < 4; k++) strobe(CMD_IR_IN, w[8*k +: 8]);
    strobe(CMD_EXEC, 8'h00);
    if (i.op != OP_NOP) shadow[i.rd] = ref_exec(i);
    case (i.op)
      OP_MALU: n_malu++;
      OP_CP:   n_cp++;
      default: n_nop++;
    endcase
    if (i.neg && i.op == OP_CP) n_neg++;
    if (i.xmod == MOD_DBL)  n_xdbl++;
    if (i.xmod == MOD_HALF) n_xhalf++;
    if (i.smod == MOD_HALF) n_shalf++;
  endtask

  function automatic instr_t malu_i(logic [4:0] rd, logic [4:0] rx, logic [4:0] ry, logic [4:0] rs,
                                    opmod_e xm = MOD_NONE, opmod_e sm = MOD_NONE);
    instr_t i = '0;
    i.op = OP_MALU; i.xmod = xm; i.smod = sm;
    i.rd = rd; i.rx = rx; i.ry = ry; i.rs = rs;
    return i;
  endfunction

  // CP_N(2N+1, t, 0): negation.
  function automatic instr_t neg_i(logic [4:0] rd, logic [4:0] rt);
    instr_t i = '0;
    i.op = OP_CP; i.neg = 1'b1;
    i.rd = rd; i.rx = NEG; i.ry = rt; i.rs = ZERO;
    return i;
  endfunction

  // --------------------------------------------------- point operation timing
  // Issue times of MALU (1) and CP (2) operations relative to the start of a
  // point operation, recorded by watching the co-processor.
  longint op_t0;
  int     trace_len;
  int     trace_kind [64];
  longint trace_time [64];
  int     ref_len = -1;
  int     ref_kind [64];
  longint ref_time [64];
  longint ref_dur;

  always @(posedge clk) begin
    if ((malu_op || cp_op) && trace_len < 64) begin
      trace_kind[trace_len] = malu_op ? 1 : 2;
      trace_time[trace_len] = cycle - op_t0;
      trace_len             = trace_len + 1;
    end
  end

  task automatic begin_pointop();
    wait_idle();
    op_t0     = cycle;
    trace_len = 0;
  endtask

  // Returns 1 when the pattern equals the reference pattern.
  task automatic end_pointop(string name, bit must_match);
    longint dur;
    bit same;
    wait_idle();
    dur = cycle - op_t0;
    if (ref_len < 0) begin
      ref_len = trace_len;
      ref_dur = dur;
      for (int k = 0; k < trace_len; k++) begin
        ref_kind[k] = trace_kind[k];
        ref_time[k] = trace_time[k];
      end
      return;
    end
    same = (trace_len == ref_len) && (dur == ref_dur);
    for (int k = 0; k < trace_len && same; k++)
      same = (trace_kind[k] == ref_kind[k]) && (trace_time[k] == ref_time[k]);
    checks++;
    if (same != must_match) begin
      failures++;
      $display("FAIL %s: pattern %s the reference (%0d ops, %0d clocks vs %0d ops, %0d clocks)",
               name, same ? "equals" : "differs from", trace_len, dur, ref_len, ref_dur);
    end
  endtask

  // Point addition Q <- P + Q (P in X1,Y1,Z1, Q in X2,Y2,Z2), 21 MALU + 5 CP.
  task automatic point_add();
    begin_pointop();
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
    n_add++;
  endtask

  task automatic dummy_m();
    exec(malu_i(DUMMY, T1, T1, ZERO));
    n_dummy_m++;
  endtask

  task automatic dummy_a();
    exec(neg_i(DUMMY, T1));
    n_dummy_a++;
  endtask

  // Point doubling Q <- 2Q, 15 MALU + 3 CP. With 'balanced' set, 6 dummy MALU
  // and 2 dummy CP are interleaved so that the kinds of operations follow
  // the same order as in point_add (CP in positions 5, 11, 15, 18, 23).
  task automatic point_dbl(bit balanced);
    begin_pointop();
    exec(malu_i(T1,  RX2, RX2, ZERO));                  // X^2
    exec(malu_i(T1,  RX2, RX2, T1, MOD_DBL));           // 3X^2
    exec(malu_i(T2,  RZ2, RZ2, ZERO));                  // Z^2
    exec(malu_i(T2,  T2,  T2,  ZERO));                  // Z^4
    if (balanced) dummy_a();
    exec(malu_i(T2,  CA,  T2,  ZERO));                  // aZ^4
    exec(malu_i(T1,  ONE, T1,  T2));                    // M
    exec(malu_i(T2,  RY2, RY2, ZERO, MOD_DBL));         // 2Y^2
    exec(malu_i(T3,  T2,  T2,  ZERO, MOD_DBL));         // 8Y^4
    exec(malu_i(T2,  RX2, T2,  ZERO, MOD_DBL));         // S = 4XY^2
    if (balanced) exec(neg_i(T3, T3));                  // -8Y^4 (moved up)
    exec(malu_i(T4,  TWO, T2,  ZERO));                  // 2S
    if (balanced) begin dummy_m(); dummy_m(); end
    exec(neg_i (T4,  T4));                              // -2S
    exec(malu_i(RX2, T1,  T1,  T4));                    // X' = M^2 - 2S
    exec(malu_i(T4,  ONE, RX2, ZERO));                  // X'
    exec(neg_i (T4,  T4));                              // -X'
    exec(malu_i(T2,  ONE, T2,  T4));                    // S - X'
    exec(malu_i(RZ2, RZ2, RY2, ZERO, MOD_DBL));         // Z' = 2YZ
    if (!balanced) exec(neg_i(T3, T3));                 // -8Y^4
    exec(malu_i(RY2, T1,  T2,  T3));                    // Y' = M(S - X') - 8Y^4
    if (balanced) begin
      dummy_m(); dummy_a(); dummy_m(); dummy_m(); dummy_m();
      n_dbl++;
    end else begin
      n_dbl_plain++;
    end
  endtask

  // ------------------------------------------------------- affine reference
  logic [L-1:0] ca;   // curve coefficient a
  logic [L-1:0] cb;   // curve coefficient b

  task automatic aff_dbl(inout logic [L-1:0] x, inout logic [L-1:0] y);
    logic [L-1:0] lam, x3;
    lam = mulmod(addmod(mulmod(L'(3), mulmod(x, x)), ca), invmod(addmod(y, y)));
    x3  = submod(mulmod(lam, lam), addmod(x, x));
    y   = submod(mulmod(lam, submod(x, x3)), y);
    x   = x3;
  endtask

  task automatic aff_add(inout logic [L-1:0] x, inout logic [L-1:0] y,
                         input logic [L-1:0] px, input logic [L-1:0] py);
    logic [L-1:0] lam, x3;
    lam = mulmod(submod(y, py), invmod(submod(x, px)));
    x3  = submod(submod(mulmod(lam, lam), x), px);
    y   = submod(mulmod(lam, submod(px, x3)), py);
    x   = x3;
  endtask

  // MtoN on the co-processor: MALU(v, 1, 0) = v * 2^-L.
  task automatic mton(logic [4:0] r, output logic [L-1:0] v);
    exec(malu_i(SCR, r, RAW1, ZERO));
    read_reg(SCR, v);
    checks++;
    if (v != shadow[SCR]) begin
      failures++;
      $display("FAIL MtoN of r%0d: %h, expected %h", r, v, shadow[SCR]);
    end
  endtask

  // Read Q (Montgomery, Jacobian) back, convert on the co-processor to
  // normal form, then to affine coordinates here.
  task automatic read_affine(output logic [L-1:0] x, output logic [L-1:0] y);
    logic [L-1:0] xj, yj, zj, zi;
    mton(RX2, xj);
    mton(RY2, yj);
    mton(RZ2, zj);
    zi = invmod(zj);
    x  = mulmod(xj, mulmod(zi, zi));
    y  = mulmod(yj, mulmod(zi, mulmod(zi, zi)));
  endtask

  task automatic check_point(string what, logic [L-1:0] ex, logic [L-1:0] ey);
    logic [L-1:0] x, y;
    read_affine(x, y);
    checks += 2;
    if (x != ex || y != ey) begin
      failures++;
      $display("FAIL %s: (%h, %h), expected (%h, %h)", what, x, y, ex, ey);
    end
    // On the curve: y^2 = x^3 + a x + b.
    if (mulmod(y, y) != addmod(addmod(mulmod(x, mulmod(x, x)), mulmod(ca, x)), cb)) begin
      failures++;
      $display("FAIL %s: point not on the curve", what);
    end
  endtask

  // ----------------------------------------------------------------- stimulus
  initial begin
    logic [L-1:0] rm, px, py, qx, qy, v;
    logic [K-1:0] scalar;
    instr_t i;

    repeat (4) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    pmod = {{(L - K){1'b0}}, {(K){1'b1}}} - (L'(1) << 31);   // 2^160 - 2^31 - 1
    rm   = L'((W'(1) << L) % W'(pmod));
    rinv = invmod(rm);
    checks++;
    if (mulmod(rm, rinv) != L'(1)) begin
      failures++;
      $display("FAIL reference: 2^L * 2^-L != 1");
    end

    put_buf(pmod);
    strobe(CMD_SETN, 8'h00);
    n_setn++;

    // Constants (Montgomery form where the schedules expect it).
    write_reg(ZERO, '0);
    write_reg(ONE,  rm);
    write_reg(TWO,  addmod(rm, rm));
    write_reg(NEG,  2 * pmod + 1);
    write_reg(RAW1, L'(1));
    write_reg(R2,   mulmod(rm, rm));
    check_reg(NEG, "store/load");

    // ---- 1. directed instructions
    for (int k = 0; k < 4; k++) begin
      write_reg(T1, rnd_below(pmod));
      write_reg(T2, rnd_below(pmod));
      write_reg(T3, rnd_below(pmod));
      exec(malu_i(T4, T1, T2, T3));                     check_reg(T4, "MALU");
      exec(malu_i(T4, T1, T2, T3, MOD_DBL));            check_reg(T4, "MALU 2X");
      exec(malu_i(T4, T1, T2, T3, MOD_HALF, MOD_HALF)); check_reg(T4, "MALU X/2, S/2");
      exec(neg_i(T4, T1));                              check_reg(T4, "CP negate");
      i = '0; i.op = OP_CP; i.rd = T4; i.rx = T1; i.ry = T2; i.rs = T3;
      exec(i);                                          check_reg(T4, "CP add");
      i = '0; i.op = OP_NOP; i.rd = T4;
      exec(i);                                          check_reg(T4, "NOP");
      exec(neg_i(T4, ZERO));                            check_reg(T4, "CP negate 0");
    end

    // ---- 2. curve and base point
    ca = pmod - L'(3);
    px = rnd_below(pmod);
    py = rnd_below(pmod);
    cb = submod(mulmod(py, py), addmod(mulmod(px, mulmod(px, px)), mulmod(ca, px)));
    write_reg(CA, mulmod(ca, rm));
    write_reg(SCR, px);  exec(malu_i(RX1, SCR, R2, ZERO));   // NtoM
    write_reg(SCR, py);  exec(malu_i(RY1, SCR, R2, ZERO));
    write_reg(RZ1, rm);                                       // Z = 1
    check_reg(RX1, "NtoM x");
    check_reg(RY1, "NtoM y");

    // Q <- P
    exec(malu_i(RX2, ONE, RX1, ZERO));
    exec(malu_i(RY2, ONE, RY1, ZERO));
    exec(malu_i(RZ2, ONE, RZ1, ZERO));

    // ---- 3. reference pattern (a point addition), then an unbalanced
    //         doubling that must differ from it.  Q = P + P is not what the
    //         addition formula handles, so first Q <- 2P with a doubling.
    point_dbl(1'b1);
    end_pointop("first doubling", 1'b1);  // sets the reference pattern
    qx = px; qy = py; aff_dbl(qx, qy);
    check_point("2P", qx, qy);
    point_add();
    end_pointop("point addition", 1'b1);
    aff_add(qx, qy, px, py);
    check_point("3P", qx, qy);
    point_dbl(1'b0);
    end_pointop("unbalanced doubling", 1'b0);
    aff_dbl(qx, qy);
    check_point("6P", qx, qy);
    for (int r = int'(RX2); r <= int'(T4); r++) check_reg(5'(r), "registers after doubling");

    // ---- 4. 160-bit scalar multiplication, binary method, balanced
    scalar = K'(rnd_below({1'b1, {(K){1'b0}}}));
    scalar[K-1] = 1'b1;
    exec(malu_i(RX2, ONE, RX1, ZERO));
    exec(malu_i(RY2, ONE, RY1, ZERO));
    exec(malu_i(RZ2, ONE, RZ1, ZERO));
    qx = px; qy = py;
    for (int b = K - 2; b >= 0; b--) begin
      point_dbl(1'b1);
      end_pointop($sformatf("doubling, bit %0d", b), 1'b1);
      aff_dbl(qx, qy);
      if (scalar[b]) begin
        point_add();
        end_pointop($sformatf("addition, bit %0d", b), 1'b1);
        aff_add(qx, qy, px, py);
      end
    end
    check_point("kP", qx, qy);
    for (int r = int'(RX1); r <= int'(T4); r++) check_reg(5'(r), "registers after kP");

    // ---- mechanism coverage
    begin
      int cnt [string];
      cnt["MALU op"]            = n_malu;
      cnt["CP op"]              = n_cp;
      cnt["CP negation"]        = n_neg;
      cnt["X doubled"]          = n_xdbl;
      cnt["X halved"]           = n_xhalf;
      cnt["S halved"]           = n_shalf;
      cnt["NOP"]                = n_nop;
      cnt["STORE"]              = n_store;
      cnt["LOAD"]               = n_load;
      cnt["SETN"]               = n_setn;
      cnt["host waited (busy)"] = n_busy_wait;
      cnt["point addition"]     = n_add;
      cnt["balanced doubling"]  = n_dbl;
      cnt["plain doubling"]     = n_dbl_plain;
      cnt["dummy MALU"]         = n_dummy_m;
      cnt["dummy CP"]           = n_dummy_a;
      foreach (cnt[name]) begin
        $display("mechanism %-20s %0d", name, cnt[name]);
        checks++;
        if (cnt[name] == 0) begin
          failures++;
          $display("FAIL mechanism '%s' never happened", name);
        end
      end
    end
    $display("point operation: %0d operations, %0d clocks (co-processor and port traffic)",
             ref_len, ref_dur);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
