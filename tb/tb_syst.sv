// tb_syst: end-to-end self-checking test of the Montgomery multiplier array at its default
// size (3 x 3, no parameter override).
//
//  1. The prototype's recorded vectors: A=7, B=3, M=5 -> 7 and A=6, B=4, M=5 -> 3, and the
//     sequence A = 3,7,0,4,2,6,1,5,3 with B=4, M=5 -> 4,6,0,2,1,3,3,5,4, applied while all
//     latch enables toggle together between 000000 and 111111.
//  2. Every A, B, odd M and PI with all latches open, against the reference model; where
//     B < M, PI = 0 and M <= 2^(N-1) the result is also checked to be the exact Montgomery
//     product (congruent to A*B*2^-N mod M and below 2M).
//  3. Random sequences with random latch enables and operands; a behavioural model of the
//     latch chain gives the B and M that each row sees.
// Mechanisms counted and required at least once: modulus added (q = 1), partial-product
// top bit dropped, latch hold with a stale B or M used by a later row, full latch transparency.
module tb_syst;
  import syst_ref_pkg::*;

  localparam int N  = syst_pkg::SYST_N;
  localparam int NL = N * (N - 1);

  logic [NL-1:0] CLB, CLM;
  logic [N-1:0]  AI, BI, MI, PI, POUT;
  int            checks = 0, failures = 0;
  int            n_q = 0, n_trunc = 0, n_stale = 0, n_open = 0;
  logic          clk = 1'b0;

  syst dut (.CLB, .CLM, .AI, .BI, .MI, .PI, .POUT);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Behavioural copy of the latch chain: b_seen[r] / m_seen[r] is what row r sees.
  u64_t b_seen[N], m_seen[N];

  task automatic update_latch_model();
    b_seen[0] = u64_t'(BI);
    m_seen[0] = u64_t'(MI);
    for (int r = 1; r < N; r++)
      for (int j = 0; j < N; j++) begin
        if (CLB[(r-1)*N+j]) b_seen[r][j] = b_seen[r-1][j];
        if (CLM[(r-1)*N+j]) m_seen[r][j] = m_seen[r-1][j];
      end
  endtask

  // Apply the current inputs, wait, compare POUT with the reference (and optionally with a
  // value given by hand).
  task automatic apply_and_check(input int want, input string tag);
    ref_result_t r;
    update_latch_model();
    @(posedge clk);
    r = ref_mont(N, u64_t'(AI), b_seen, m_seen, u64_t'(PI));
    n_q     += r.q_ones;
    n_trunc += r.truncated;
    for (int k = 1; k < N; k++)
      if (b_seen[k] != u64_t'(BI) || m_seen[k] != u64_t'(MI)) begin
        n_stale++;
        break;
      end
    if (&CLB && &CLM) n_open++;
    checks++;
    if (u64_t'(POUT) != r.p) begin
      failures++;
      $display("%s: A=%0d B=%0d M=%0d P=%0d: POUT=%0d model=%0d", tag, AI, BI, MI, PI, POUT, r.p);
    end
    if (want >= 0) begin
      checks++;
      if (int'(POUT) != want) begin
        failures++;
        $display("%s: A=%0d B=%0d M=%0d: POUT=%0d expected %0d", tag, AI, BI, MI, POUT, want);
      end
    end
  endtask

  initial begin
    static int seq_a[9]   = '{3, 7, 0, 4, 2, 6, 1, 5, 3};
    static int seq_out[9] = '{4, 6, 0, 2, 1, 3, 3, 5, 4};

    // 1. Recorded vectors of the prototype (latches open, P = 0).
    CLB = '1; CLM = '1; PI = '0;
    AI = 3'd7; BI = 3'd3; MI = 3'd5; apply_and_check(7, "vector A");
    AI = 3'd6; BI = 3'd4; MI = 3'd5; apply_and_check(3, "vector B");
    for (int k = 0; k < 9; k++) begin
      AI = 3'(seq_a[k]);
      CLB = (k % 2 == 0) ? '0 : '1;
      CLM = CLB;
      apply_and_check(seq_out[k], "sequence B=4 M=5");
    end

    // 2. Exhaustive sweep, latches open.
    CLB = '1; CLM = '1;
    for (int m = 1; m < (1 << N); m += 2)
      for (int b = 0; b < (1 << N); b++)
        for (int a = 0; a < (1 << N); a++)
          for (int p = 0; p < (1 << N); p++) begin
            AI = N'(a); BI = N'(b); MI = N'(m); PI = N'(p);
            apply_and_check(-1, "sweep");
            if (b < m && p == 0 && m <= (1 << (N - 1))) begin
              checks++;
              if (!mont_congruent(N, u64_t'(a), u64_t'(b), u64_t'(m), u64_t'(POUT)) || int'(POUT) >= 2 * m) begin
                failures++;
                $display("not a Montgomery product: A=%0d B=%0d M=%0d POUT=%0d", a, b, m, POUT);
              end
            end
          end

    // 3. Random latch enables and operands.
    for (int k = 0; k < 4000; k++) begin
      CLB = NL'($urandom);
      CLM = NL'($urandom);
      if ($urandom_range(3) == 0) begin CLB = '1; CLM = '1; end
      AI = N'($urandom); BI = N'($urandom); MI = N'($urandom) | N'(1); PI = N'($urandom);
      apply_and_check(-1, "random latches");
    end

    $display("mechanisms: modulus_added=%0d top_bit_dropped=%0d stale_latch=%0d all_open=%0d",
             n_q, n_trunc, n_stale, n_open);
    checks += 4;
    if (n_q == 0)     begin failures++; $display("modulus addition never exercised"); end
    if (n_trunc == 0) begin failures++; $display("top-bit drop never exercised"); end
    if (n_stale == 0) begin failures++; $display("latch hold never exercised"); end
    if (n_open == 0)  begin failures++; $display("transparent latches never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
