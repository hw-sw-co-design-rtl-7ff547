// tb_regfile: self-checking test of the co-processor RAM.
//
// Writes a distinct random word to every address, reads them back in a
// random order and compares with a shadow copy; then checks that a read in
// the same clock as a write to that address returns the old word, and that
// read data arrives exactly one clock after the address.
module tb_regfile;
  import ecc_pkg::*;
  localparam int unsigned AW = $clog2(NREGS);

  logic          clk = 0;
  logic          we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [L-1:0]  wdata = '0;
  logic [L-1:0]  rdata;
  logic [L-1:0]  shadow [NREGS];
  int            checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [L-1:0] rnd();
    logic [L+31:0] r = '0;
    for (int i = 0; i < L / 32 + 1; i++) r = (r << 32) | (L + 32)'($urandom);
    return L'(r);
  endfunction

  initial begin
    for (int pass = 0; pass < 4; pass++) begin
      for (int a = 0; a < int'(NREGS); a++) begin
        @(negedge clk);
        we = 1; waddr = AW'(a); wdata = rnd();
        shadow[a] = wdata;
      end
      @(negedge clk) we = 0;
      for (int k = 0; k < 3 * int'(NREGS); k++) begin
        raddr = AW'($urandom_range(NREGS - 1));
        @(negedge clk);
        checks++;
        if (rdata != shadow[raddr]) begin
          failures++;
          $display("FAIL read %0d: %h vs %h", raddr, rdata, shadow[raddr]);
        end
      end
      // Read during write of the same word returns the old contents.
      raddr = AW'(pass); waddr = AW'(pass); wdata = ~shadow[pass]; we = 1;
      @(negedge clk);
      we = 0;
      checks++;
      if (rdata != shadow[pass]) begin
        failures++;
        $display("FAIL read-during-write");
      end
      shadow[pass] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != shadow[pass]) begin
        failures++;
        $display("FAIL read after write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
