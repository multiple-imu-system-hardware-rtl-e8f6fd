// Testbench for piu_timing with short dividers: measures the period of the
// bus phase (18 cells), the spacing of the 900 ns controller ticks (9
// clocks), and the periods of the sync and minor cycle pulses.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The 18-cell word, the 900 ns tick and the divide-by-8
// are the document's; the dividers are shortened here to save time.
`include "tb/tb_check.svh"
module tb_piu_timing;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] phase; logic fsm_tick, sync_400hz, minor_cycle;
  piu_timing #(.DIV_400HZ(50), .DIV_50HZ(8)) dut (.*);
  always #50 clk = !clk;
  initial begin #2000000; failures++; $display("watchdog"); `FINISH end
  int cyc = 0, last_tick = -1, last_sync = -1, last_minor = -1, last_p0 = -1;
  int nsync = 0, nminor = 0, ntick = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fsm_tick) begin
      if (last_tick >= 0) `CHECK(cyc - last_tick == 9, "900 ns tick spacing")
      last_tick = cyc; ntick++;
    end
    if (phase == 0) begin
      if (last_p0 >= 0) `CHECK(cyc - last_p0 == 18, "18-cell word")
      last_p0 = cyc;
    end
    `CHECK(phase < 18, "phase range")
    if (sync_400hz) begin
      if (last_sync >= 0) `CHECK(cyc - last_sync == 50, "sync period")
      last_sync = cyc; nsync++;
    end
    if (minor_cycle) begin
      if (last_minor >= 0) `CHECK(cyc - last_minor == 400, "minor cycle period")
      `CHECK(sync_400hz, "minor cycle coincides with a sync pulse")
      last_minor = cyc; nminor++;
    end
  end
  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (1300) @(posedge clk);
    `CHECK(nminor >= 3 && nsync >= 24 && ntick > 100, "pulses seen")
    `FINISH
  end
endmodule
