// tb_latch1: self-checking test of the level-sensitive latch.
// Phase 1: with en high, q follows every change of d (transparency). Phase 2: with en low,
// d toggles and q must keep the value present when en fell (hold). Both are repeated with
// random data.
module tb_latch1;
  logic en, d, q;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  latch1 dut (.en, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic want, input string what);
    checks++;
    if (q !== want) begin
      failures++;
      $display("%s: q=%0b want %0b", what, q, want);
    end
  endtask

  initial begin
    en = 1'b1;
    d  = 1'b0;
    for (int n = 0; n < 100; n++) begin
      logic held;
      // transparent phase
      en = 1'b1;
      repeat (3) begin
        d = 1'($urandom);
        #1 expect_q(d, "transparent");
        @(posedge clk);
      end
      // hold phase
      held = d;
      en   = 1'b0;
      #1;
      repeat (3) begin
        d = ~d;
        #1 expect_q(held, "hold");
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
