// tb_mm_cell_right: exhaustive self-checking test of the rightmost cell.
// For all 16 input combinations it checks that q_i makes p_in + a_i*b_0 + q_i*m_0 even
// when m_0 = 1 (odd modulus), that q_i = p_in xor (a_i and b_0), and that the carry equals
// half of that sum.
module tb_mm_cell_right;
  import syst_pkg::*;

  logic   a_i, b_0, m_0, p_in, q_i;
  carry_t cout;
  int     checks = 0, failures = 0;
  logic   clk = 1'b0;

  mm_cell_right dut (.a_i, .b_0, .m_0, .p_in, .q_i, .cout);

  always #5 clk = ~clk;

  function automatic int b2i(logic x);
    return x ? 1 : 0;
  endfunction

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ab, q_exp, total, got;
      {a_i, b_0, m_0, p_in} = 4'(v);
      @(posedge clk);
      ab    = b2i(a_i & b_0);
      q_exp = (b2i(p_in) + ab) % 2;
      total = b2i(p_in) + ab + q_exp * b2i(m_0);
      got   = b2i(cout.c) + 2 * b2i(cout.d);
      checks++;
      if (b2i(q_i) != q_exp) begin
        failures++;
        $display("q mismatch: a=%0d b=%0d m=%0d p=%0d: got %0d want %0d",
                 a_i, b_0, m_0, p_in, q_i, q_exp);
      end
      checks++;
      if (got != total / 2) begin
        failures++;
        $display("carry mismatch: a=%0d b=%0d m=%0d p=%0d: got %0d want %0d",
                 a_i, b_0, m_0, p_in, got, total / 2);
      end
      if (m_0) begin
        checks++;
        if (total % 2 != 0) begin
          failures++;
          $display("odd low digit with odd modulus: a=%0d b=%0d p=%0d", a_i, b_0, p_in);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
