// tb_mm_cell: exhaustive self-checking test of the typical cell.
// Every combination of a_i, b_j, m_j, q_i, p_in and the two carry wires (128 cases) is
// applied; the expected sum bit and carry are computed with integer arithmetic from
// p_in + a_i*b_j + q_i*m_j + c + 2*d. A watchdog ends the run if it stalls.
module tb_mm_cell;
  import syst_pkg::*;

  logic   a_i, b_j, m_j, q_i, p_in, p_out;
  carry_t cin, cout;
  int     checks = 0, failures = 0;
  logic   clk = 1'b0;

  mm_cell dut (.a_i, .b_j, .m_j, .q_i, .p_in, .cin, .p_out, .cout);

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
    for (int v = 0; v < 128; v++) begin
      int total, got;
      {a_i, b_j, m_j, q_i, p_in, cin.d, cin.c} = 7'(v);
      @(posedge clk);
      total = b2i(a_i & b_j) + b2i(q_i & m_j) + b2i(p_in) + b2i(cin.c) + 2 * b2i(cin.d);
      got   = b2i(p_out) + 2 * b2i(cout.c) + 4 * b2i(cout.d);
      checks++;
      if (got != total) begin
        failures++;
        $display("mm_cell mismatch: a=%0d b=%0d m=%0d q=%0d p=%0d cin=%0d: got %0d want %0d",
                 a_i, b_j, m_j, q_i, p_in, 2 * cin.d + cin.c, got, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
