// tb_coproc_ctrl: self-checking test of the instruction decoder / FSM.
//
// The controller runs against a real regfile and simple arithmetic stand-ins
// for the two arithmetic units, so that every result tells which operands
// were fetched: the MALU stand-in returns (S, C0, C1) = (X, Y, S) after
// L/D + 1 clocks, the CP stand-in returns (u + v + w) mod 2^L after 3
// clocks. Expected values are computed here from a shadow copy of the RAM.
// Checks: STORE, LOAD, SETN; MALU and CP results with every operand modifier
// and with negation; NOP leaves the RAM alone; a MALU instruction takes 50
// clocks and a CP instruction 8 from request to idle, for every operand.
module tb_coproc_ctrl;
  import ecc_pkg::*;
  localparam int unsigned CW = L + 2;

  logic           clk = 0, rst_n = 0;
  req_e           req = REQ_NONE;
  logic [RAW-1:0] req_reg = '0;
  logic [L-1:0]   opbuf = '0;
  instr_t         ir = '0;
  logic           ctrl_busy, ld_valid;
  logic [L-1:0]   ld_data;
  logic           rf_we;
  logic [RAW-1:0] rf_waddr, rf_raddr;
  logic [L-1:0]   rf_wdata, rf_rdata;
  logic           malu_start, malu_done;
  logic [L-1:0]   malu_x, malu_y, malu_s, malu_rs, malu_rc0, malu_rc1;
  logic           cp_start, cp_done;
  logic [CW-1:0]  cp_u, cp_v, cp_w;
  logic [L-1:0]   cp_res;
  logic [L-1:0]   n_q;
  logic           malu_issued, cp_issued;
  int             checks = 0, failures = 0;

  coproc_ctrl dut (.*);
  regfile u_rf (.clk, .we (rf_we), .waddr (rf_waddr), .wdata (rf_wdata),
                .raddr (rf_raddr), .rdata (rf_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Arithmetic stand-ins.
  int malu_cnt = -1, cp_cnt = -1;
  always @(posedge clk) begin
    malu_done <= 0;
    cp_done   <= 0;
    if (malu_start) begin
      malu_cnt = L / D;
      malu_rs <= malu_x; malu_rc0 <= malu_y; malu_rc1 <= malu_s;
    end else if (malu_cnt > 0) begin
      malu_cnt--;
      if (malu_cnt == 0) malu_done <= 1;
    end
    if (cp_start) begin
      cp_cnt = 3;
      cp_res <= L'(cp_u + cp_v + cp_w);
    end
    if (cp_cnt > 0) begin
      cp_cnt--;
      if (cp_cnt == 0) cp_done <= 1;
    end
  end

  logic [L-1:0] shadow [NREGS];
  logic [L-1:0] nval;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic logic [L-1:0] rnd();
    logic [L+31:0] r = '0;
    for (int i = 0; i < L / 32 + 1; i++) r = (r << 32) | (L + 32)'($urandom);
    return L'(r) >> 2;
  endfunction

  function automatic logic [L-1:0] pmod(logic [L-1:0] v, opmod_e m);
    case (m)
      MOD_DBL:  return v << 1;
      MOD_HALF: return L'(({1'b0, v} + (v[0] ? {1'b0, nval} : '0)) >> 1);
      default:  return v;
    endcase
  endfunction

  // Issue a request, return the number of clocks until the controller is idle.
  task automatic request(req_e r, logic [RAW-1:0] a, output int clocks);
    req = r; req_reg = a;
    @(negedge clk);
    req = REQ_NONE;
    clocks = 1;
    while (ctrl_busy) begin @(negedge clk); clocks++; end
  endtask

  initial begin
    int clocks;
    instr_t i;
    logic [L-1:0] x, y, s, expv;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    nval = rnd() | L'(1);
    opbuf = nval;
    request(REQ_SETN, '0, clocks);
    chk(n_q == nval, "SETN");
    for (int r = 0; r < int'(NREGS); r++) begin
      opbuf = rnd();
      shadow[r] = opbuf;
      request(REQ_STORE, RAW'(r), clocks);
      chk(clocks == 1, "STORE takes one clock");
    end
    for (int r = 0; r < int'(NREGS); r++) begin
      logic got;
      got = 0;
      req = REQ_LOAD; req_reg = RAW'(r);
      @(negedge clk);
      req = REQ_NONE;
      chk(ld_valid && ld_data == shadow[r], "LOAD data");
      @(negedge clk);
      chk(!ctrl_busy, "LOAD takes two clocks");
    end
    for (int t = 0; t < 300; t++) begin
      i = '0;
      i.op   = (t % 7) == 6 ? OP_NOP : ((t % 2) ? OP_CP : OP_MALU);
      i.neg  = 1'($urandom);
      i.xmod = opmod_e'($urandom_range(2));
      i.smod = opmod_e'($urandom_range(2));
      i.rd   = 5'($urandom_range(NREGS - 1));
      i.rx   = 5'($urandom_range(NREGS - 1));
      i.ry   = 5'($urandom_range(NREGS - 1));
      i.rs   = 5'($urandom_range(NREGS - 1));
      ir = i;
      x = pmod(shadow[i.rx], i.xmod);
      y = shadow[i.ry];
      s = pmod(shadow[i.rs], i.smod);
      if (i.op == OP_MALU) expv = x + y + s;
      else                 expv = L'(CW'(x) + (i.neg ? ~CW'(y) : CW'(y)) + CW'(s));
      request(REQ_EXEC, '0, clocks);
      case (i.op)
        OP_MALU: chk(clocks == 50, $sformatf("MALU takes 50 clocks (%0d)", clocks));
        OP_CP:   chk(clocks == 8, $sformatf("CP takes 8 clocks (%0d)", clocks));
        default: ;
      endcase
      if (i.op != OP_NOP) shadow[i.rd] = expv;
      // Read the destination back through LOAD.
      req = REQ_LOAD; req_reg = RAW'(i.rd);
      @(negedge clk);
      req = REQ_NONE;
      chk(ld_data == shadow[i.rd], $sformatf("result of %s", i.op.name()));
      @(negedge clk);
      // Keep operands small enough for the MALU range (Y < 2^(L-1)).
      if (shadow[i.rd][L-1 -: 3] != '0) begin
        opbuf = rnd();
        shadow[i.rd] = opbuf;
        request(REQ_STORE, RAW'(i.rd), clocks);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
