// Testbench for johnson_counter: walks the 9-bit and 2-bit counters through
// two full cycles and checks the ring pattern and decoded index against an
// independently computed sequence, then checks enable and clear.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The twisted-ring sequence is the standard one the
// document relies on.

`include "tb/tb_check.svh"
module tb_johnson_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [8:0] q9; logic [4:0] idx9;
  logic [1:0] q2; logic [1:0] idx2;
  johnson_counter #(.N(9)) dut9 (.clk, .rst_n, .en, .clr, .q(q9), .idx(idx9));
  johnson_counter #(.N(2)) dut2 (.clk, .rst_n, .en, .clr, .q(q2), .idx(idx2));
  always #50 clk = !clk;
  initial begin #200000; failures++; $display("watchdog"); `FINISH end

  function automatic logic [8:0] expect9(int k);
    // k ones filling from the bottom, then emptying from the bottom
    if (k <= 9) return 9'((1 << k) - 1);
    else        return 9'h1FF & ~9'((1 << (k - 9)) - 1);
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; en = 1;
    for (int k = 0; k < 40; k++) begin
      `CHECK(q9 == expect9(k % 18), $sformatf("ring9 step %0d q=%b", k, q9))
      `CHECK(idx9 == 5'(k % 18), $sformatf("idx9 step %0d idx=%0d", k, idx9))
      `CHECK(idx2 == 2'(k % 4), $sformatf("idx2 step %0d", k))
      @(negedge clk);
    end
    en = 0; @(negedge clk); begin logic [4:0] h; h = idx9; @(negedge clk); `CHECK(idx9 == h, "hold when disabled") end
    clr = 1; @(negedge clk); clr = 0; `CHECK(q9 == 0 && idx9 == 0, "clear")
    `FINISH
  end
endmodule
