// tb_syst_wide: the Montgomery multiplier array built 16 x 16, with random operands.
// Latches stay open. Each result is compared with the bit-serial reference model, and for
// operands inside the safe range (odd M <= 2^15, B < M, PI = 0) it is also checked to be the
// exact Montgomery product A*B*2^-16 mod M, up to one extra M.
module tb_syst_wide;
  import syst_ref_pkg::*;

  localparam int N  = 16;
  localparam int NL = N * (N - 1);

  logic [NL-1:0] CLB = '1, CLM = '1;
  logic [N-1:0]  AI, BI, MI, PI, POUT;
  int            checks = 0, failures = 0;
  logic          clk = 1'b0;
  u64_t          b_rows[N], m_rows[N];

  syst #(.N(N)) dut (.CLB, .CLM, .AI, .BI, .MI, .PI, .POUT);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 5000; k++) begin
      ref_result_t r;
      bit safe;
      safe = (k % 2 == 0);
      MI = N'($urandom) | N'(1);
      if (safe) MI[N-1] = 1'b0;
      BI = N'($urandom);
      if (safe) BI = N'(u64_t'(BI) % u64_t'(MI));
      AI = N'($urandom);
      PI = safe ? '0 : N'($urandom);
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        b_rows[i] = u64_t'(BI);
        m_rows[i] = u64_t'(MI);
      end
      r = ref_mont(N, u64_t'(AI), b_rows, m_rows, u64_t'(PI));
      checks++;
      if (u64_t'(POUT) != r.p) begin
        failures++;
        $display("A=%0d B=%0d M=%0d P=%0d: POUT=%0d model=%0d", AI, BI, MI, PI, POUT, r.p);
      end
      if (safe) begin
        checks++;
        if (!mont_congruent(N, u64_t'(AI), u64_t'(BI), u64_t'(MI), u64_t'(POUT))
            || u64_t'(POUT) >= 2 * u64_t'(MI)) begin
          failures++;
          $display("not a Montgomery product: A=%0d B=%0d M=%0d POUT=%0d", AI, BI, MI, POUT);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
