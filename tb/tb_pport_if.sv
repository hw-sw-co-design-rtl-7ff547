// tb_pport_if: self-checking test of the 8051 port interface.
//
// A controller model answers requests (busy for a few clocks, returns a
// word on LOAD). Checks: bytes shifted in with CMD_BUF_IN assemble the
// operand buffer least significant byte first; CMD_BUF_OUT walks P1 through
// the buffer; CMD_IR_IN assembles the instruction register; STORE, LOAD,
// SETN and EXEC become one-clock requests carrying the register number from
// P0; busy rises the clock after such a strobe and falls when the
// controller is idle; a LOAD result lands in the buffer; unknown commands do
// nothing.
module tb_pport_if;
  import ecc_pkg::*;

  logic          clk = 0, rst_n = 0;
  logic [7:0]    p0_in = '0, p2_in = '0;
  logic          p3_stb = 0;
  logic [7:0]    p1_out;
  logic          p3_busy;
  req_e          req;
  logic [RAW-1:0] req_reg;
  logic [L-1:0]  opbuf;
  instr_t        ir;
  logic          ctrl_busy = 0, ld_valid = 0;
  logic [L-1:0]  ld_data = '0;
  int            checks = 0, failures = 0;
  int            nreq = 0;
  req_e          last_req;
  logic [RAW-1:0] last_reg;

  pport_if dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Controller model: a request keeps it busy for 3 clocks; LOAD returns
  // the word 'ld_word' with ld_valid in its last busy clock.
  logic [L-1:0] ld_word;
  always @(posedge clk) begin
    if (req != REQ_NONE) begin
      nreq++;
      last_req = req;
      last_reg = req_reg;
      fork
        begin
          ctrl_busy <= 1;
          @(posedge clk);
          @(posedge clk);
          if (last_req == REQ_LOAD) begin ld_valid <= 1; ld_data <= ld_word; end
          @(posedge clk);
          ctrl_busy <= 0; ld_valid <= 0;
        end
      join_none
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic strobe(logic [7:0] cmd, logic [7:0] arg);
    while (p3_busy) @(negedge clk);
    p2_in = cmd; p0_in = arg; p3_stb = 1;
    @(negedge clk);
    p3_stb = 0;
  endtask

  function automatic logic [L-1:0] rnd();
    logic [L+31:0] r = '0;
    for (int i = 0; i < L / 32 + 1; i++) r = (r << 32) | (L + 32)'($urandom);
    return L'(r);
  endfunction

  initial begin
    logic [BUF_W-1:0] v;
    logic [31:0] w;
    int n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      // operand in
      v = BUF_W'(rnd());
      for (int k = 0; k < BUF_W / 8; k++) strobe(CMD_BUF_IN, v[8*k +: 8]);
      chk(opbuf == v[L-1:0], "operand buffer assembly");
      chk(!p3_busy, "buffer commands leave busy low");
      // unknown command
      strobe(8'hEE, 8'h55);
      chk(opbuf == v[L-1:0], "unknown command ignored");
      // operand out
      for (int k = 0; k < BUF_W / 8; k++) begin
        chk(p1_out == v[8*k +: 8], "P1 byte sequence");
        strobe(CMD_BUF_OUT, 8'h00);
      end
      // instruction register
      w = $urandom;
      for (int k = 0; k < 4; k++) strobe(CMD_IR_IN, w[8*k +: 8]);
      chk(32'(ir) == w, "instruction register assembly");
      // requests
      for (int c = 0; c < 4; c++) begin
        cmd_e cmd;
        req_e exp;
        logic [7:0] r = 8'($urandom_range(NREGS - 1));
        case (c)
          0: begin cmd = CMD_STORE; exp = REQ_STORE; end
          1: begin cmd = CMD_LOAD;  exp = REQ_LOAD;  end
          2: begin cmd = CMD_SETN;  exp = REQ_SETN;  end
          default: begin cmd = CMD_EXEC; exp = REQ_EXEC; end
        endcase
        ld_word = rnd();
        n0 = nreq;
        strobe(cmd, r);
        chk(p3_busy, "busy in the clock after a request strobe");
        @(negedge clk);
        chk(nreq == n0 + 1 && last_req == exp && last_reg == RAW'(r), "one request with its register");
        while (p3_busy) @(negedge clk);
        chk(nreq == n0 + 1, "request lasts one clock");
        if (cmd == CMD_LOAD) chk(opbuf == ld_word, "LOAD result in the buffer");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
