// Testbench for gypto_logic: first the document's examples for one axis (no
// command keeps the 1:1 binary dither; a commanded positive pulse after a
// negative or positive free pulse; pulses in periods 1 and 3), then random
// D2 words for all three axes against a reference model of the
// ternary-to-binary rule, checking the torque senses at every output strobe
// and the net torque of a frame.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected senses follow the document's ternary rule;
// the D2 bit layout and first free pulse sense are this design's choice.
`include "tb/tb_check.svh"
module tb_gypto_logic;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, decide = 0, strobe = 0;
  logic [1:0] slot = 0;
  word_t d2 = 0;
  logic [2:0] torq_pos, torq_neg;
  gypto_logic dut (.*);
  always #50 clk = !clk;
  initial begin #20000000; failures++; $display("watchdog"); `FINISH end

  logic [2:0] m_last_neg = 3'b111;
  int net [3];
  // one 5 ms period: decision, then strobe; returns senses (+1/-1) per axis
  task automatic period(output int s [3]);
    logic [2:0] exp_neg;
    for (int a = 0; a < 3; a++) begin
      if (d2[a*5 + slot]) exp_neg[a] = d2[a*5 + 4];
      else begin exp_neg[a] = !m_last_neg[a]; m_last_neg[a] = exp_neg[a]; end
    end
    decide = 1; @(negedge clk); decide = 0; repeat (3) @(negedge clk);
    strobe = 1; @(negedge clk); strobe = 0; @(negedge clk);
    for (int a = 0; a < 3; a++) begin
      `CHECK(torq_neg[a] == exp_neg[a] && torq_pos[a] == !exp_neg[a], $sformatf("axis %0d sense", a))
      s[a] = exp_neg[a] ? -1 : 1;
      net[a] += s[a];
    end
    slot++;
  endtask

  int s [3];
  int seq [$];
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    `CHECK(torq_pos == 0 && torq_neg == 0, "no torque before first strobe")
    // example 1: no command -> + - + - ...
    d2 = 0;
    for (int i = 0; i < 8; i++) begin period(s); seq.push_back(s[0]); end
    `CHECK(seq[0] == 1 && seq[1] == -1 && seq[2] == 1 && seq[3] == -1, "binary dither")
    // example 2a: last free pulse negative (seq[7] == -1), positive pulse in period 1
    d2 = 16'h0001; seq.delete();
    for (int i = 0; i < 4; i++) begin period(s); seq.push_back(s[0]); end
    d2 = 0;
    for (int i = 0; i < 4; i++) begin period(s); seq.push_back(s[0]); end
    `CHECK(seq[0] == 1 && seq[1] == 1 && seq[2] == -1 && seq[3] == 1, "commanded + after free -: + + - +")
    // example 3: pulses in periods 1 and 3 repeated: net +2 per frame
    d2 = 16'h0005;
    net[0] = 0;
    for (int i = 0; i < 8; i++) period(s);
    `CHECK(net[0] == 4, $sformatf("two net pulses per frame (%0d)", net[0]))
    // negative sign
    d2 = 16'h001F; net[0] = 0;
    for (int i = 0; i < 4; i++) period(s);
    `CHECK(net[0] == -4, "all-negative pattern")
    // random words on all axes
    for (int f = 0; f < 40; f++) begin
      d2 = 16'($urandom) & 16'h7FFF;
      for (int i = 0; i < 4; i++) period(s);
    end
    `FINISH
  end
endmodule
