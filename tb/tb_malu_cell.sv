// tb_malu_cell: self-checking test of one MALU column (D stacked 5-3 counters).
//
// Random input vectors (plus all-zero and all-one corners). For every level
// the testbench counts the five input bits itself, carrying c0 from level to
// level, and checks that s_out/c0/c1_out encode that count and that m_out is
// the parity of the level without its m_i n_j term.
module tb_malu_cell;
  import ecc_pkg::*;

  logic [D-1:0] x_bits, m_bits, s_in, c1_in;
  logic         y_bit, n_bit, c0_in;
  logic [D-1:0] s_out, c1_out, m_out;
  logic         c0_out;
  int           checks = 0, failures = 0;

  malu_cell dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int c0, total, par;
    #1;
    c0 = int'(c0_in);
    for (int l = 0; l < int'(D); l++) begin
      par   = int'(x_bits[l] & y_bit) + int'(s_in[l]) + c0 + int'(c1_in[l]);
      total = par + int'(m_bits[l] & n_bit);
      checks += 2;
      if (int'(s_out[l]) != total % 2 || int'(c1_out[l]) != total / 4) begin
        failures++;
        $display("FAIL level %0d: total %0d, s=%b c1=%b", l, total, s_out[l], c1_out[l]);
      end
      if (int'(m_out[l]) != par % 2) begin
        failures++;
        $display("FAIL level %0d: m_out %b, parity %0d", l, m_out[l], par % 2);
      end
      c0 = (total / 2) % 2;
    end
    checks++;
    if (int'(c0_out) != c0) begin
      failures++;
      $display("FAIL c0_out %b, expected %0d", c0_out, c0);
    end
  endtask

  initial begin
    x_bits = '0; m_bits = '0; s_in = '0; c1_in = '0; y_bit = 0; n_bit = 0; c0_in = 0;
    check_one();
    x_bits = '1; m_bits = '1; s_in = '1; c1_in = '1; y_bit = 1; n_bit = 1; c0_in = 1;
    check_one();
    for (int k = 0; k < 20000; k++) begin
      x_bits = D'($urandom); m_bits = D'($urandom); s_in = D'($urandom); c1_in = D'($urandom);
      y_bit = 1'($urandom); n_bit = 1'($urandom); c0_in = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
