// Testbench for piu_fifo: checks that words roll from level 1 to level 3 one
// level per clock, the 1EMP/3FUL/ALLEMP flags, first-in first-out order,
// the refusal of a fourth word and clear, then a random push/pop run against
// a queue model.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The three levels and the 1EMP/3FUL/ALLEMP flags are
// the document's; one level per clock is this design's choice.
`include "tb/tb_check.svh"
module tb_piu_fifo;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0, rd_en = 0;
  logic [15:0] wr_data, rd_data;
  logic emp1, ful3, allemp, overflow;
  piu_fifo dut (.*);
  always #50 clk = !clk;
  initial begin #1000000; failures++; $display("watchdog"); `FINISH end
  logic [15:0] q[$];
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); `CHECK(allemp && emp1 && !ful3, "empty after reset")
    wr_en = 1; wr_data = 16'hA001; @(negedge clk); wr_en = 0;
    `CHECK(!emp1 && !allemp && !ful3, "word in level 1")
    @(negedge clk); `CHECK(emp1 && !ful3, "rolled to level 2")
    @(negedge clk); `CHECK(ful3 && rd_data == 16'hA001, "rolled to level 3")
    wr_en = 1; wr_data = 16'hB002; @(negedge clk);
    wr_data = 16'hC003; @(negedge clk);
    wr_data = 16'hD004; @(negedge clk); wr_en = 0;
    @(negedge clk);
    `CHECK(!emp1, "three words: level 1 occupied")
    wr_en = 1; wr_data = 16'hEEEE; #1; `CHECK(overflow, "fourth word refused"); @(negedge clk); wr_en = 0;
    rd_en = 1; `CHECK(rd_data == 16'hA001, "out 1"); @(negedge clk); rd_en = 0; @(negedge clk);
    rd_en = 1; `CHECK(rd_data == 16'hB002, "out 2"); @(negedge clk); rd_en = 0; @(negedge clk);
    rd_en = 1; `CHECK(rd_data == 16'hC003, "out 3"); @(negedge clk); rd_en = 0;
    @(negedge clk); `CHECK(allemp, "all empty (fourth word was dropped)")
    wr_en = 1; wr_data = 16'h1234; @(negedge clk); wr_en = 0; clear = 1; @(negedge clk); clear = 0;
    `CHECK(allemp, "clear")
    // random traffic
    for (int i = 0; i < 400; i++) begin
      wr_en = ($urandom % 3 == 0) && emp1; wr_data = 16'($urandom);
      rd_en = ful3 && ($urandom % 2 == 0);
      if (rd_en) begin `CHECK(q.size() > 0 && rd_data == q[0], "random order"); if (q.size() > 0) void'(q.pop_front()); end
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
    end
    `FINISH
  end
endmodule
