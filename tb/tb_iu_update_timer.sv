// Testbench for iu_update_timer with the default 10 MHz periods: with the
// 400 Hz sync line running, decision and output clocks must alternate
// 2.5 ms apart (5 ms each), the 50 pps tick must come every 8 sync pulses
// and the S/D update every second 50 pps tick; the slot number must step
// 0..3 across decisions. Without sync the timer must keep running.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The 400 Hz, 50 pps and 25 per second rates are the
// document's; the 2.5 ms decision-to-strobe spacing is this design's choice.
`include "tb/tb_check.svh"
module tb_iu_update_timer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync_400hz = 0;
  logic gypto_decide, gypto_strobe, tick50, sd_update;
  logic [1:0] slot;
  iu_update_timer dut (.*);
  always #50 clk = !clk;
  initial begin #200ms; failures++; $display("watchdog"); `FINISH end
  longint cyc = 0, last_dec = -1, last_str = -1, last_50 = -1, last_sd = -1;
  int ndec = 0, nstr = 0, n50 = 0, nsd = 0;
  logic [1:0] exp_slot = 0;
  logic sync_on = 1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (sync_on && cyc % 25000 == 0) begin sync_400hz <= 1; end else sync_400hz <= 0;
    if (gypto_decide) begin
      if (last_dec >= 0 && sync_on) `CHECK(cyc - last_dec == 50000, "decision every 5 ms")
      if (last_str >= 0 && sync_on) `CHECK(cyc - last_str == 25000, "decision 2.5 ms after strobe")
      `CHECK(slot == exp_slot, "slot number"); exp_slot++;
      last_dec = cyc; ndec++;
    end
    if (gypto_strobe) begin
      if (last_dec >= 0 && sync_on) `CHECK(cyc - last_dec == 25000, "strobe 2.5 ms after decision")
      last_str = cyc; nstr++;
    end
    if (tick50) begin
      if (last_50 >= 0 && sync_on) `CHECK(cyc - last_50 == 200000, "50 pps")
      last_50 = cyc; n50++;
    end
    if (sd_update) begin
      if (last_sd >= 0 && sync_on) `CHECK(cyc - last_sd == 400000, "S/D update 25 per second")
      `CHECK(tick50, "S/D update on a 50 pps tick")
      last_sd = cyc; nsd++;
    end
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    #60ms;
    `CHECK(n50 >= 2 && nsd >= 1 && ndec >= 11, $sformatf("pulses counted %0d %0d %0d", n50, nsd, ndec))
    sync_on = 0; ndec = 0;
    #20ms;
    `CHECK(ndec >= 3, "free-running without sync")
    `FINISH
  end
endmodule
