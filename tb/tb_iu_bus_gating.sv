// Testbench for iu_bus_gating: drives a transmit clock pair (AMI) with
// message-sync gaps at random places and checks that the phase restarts at 0
// on the first clocked cell after a gap, then counts 0..17 and wraps, and
// that LTIME, DTIME and PTIME decode the phase.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The 18-state word timing is the document's; gap
// positions are random.
`include "tb/tb_check.svh"
module tb_iu_bus_gating;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  bus_dir_t bus_dn = '0;
  logic cell_en, ltime, dtime, ptime, msg_sync, data_bit;
  logic [4:0] phase;
  iu_bus_gating dut (.*);
  always #50 clk = !clk;
  initial begin #5000000; failures++; $display("watchdog"); `FINISH end
  logic pol = 0; int exp_ph = 0; int gaps = 0;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      logic on, d;
      on = ($urandom % 60) != 0;
      d  = $urandom % 2;
      bus_dn.clk.p = on && !pol; bus_dn.clk.n = on && pol; if (on) pol = !pol;
      bus_dn.data.p = d; bus_dn.data.n = 0;
      #1;
      `CHECK(cell_en == on && msg_sync == !on && data_bit == d, "cell decode")
      if (on) begin
        `CHECK(phase == 5'(exp_ph), $sformatf("phase %0d exp %0d", phase, exp_ph))
        `CHECK(ltime == (exp_ph == 0) && ptime == (exp_ph == 17) && dtime == (exp_ph >= 1 && exp_ph <= 16), "gating times")
        exp_ph = (exp_ph + 1) % 18;
      end else begin
        `CHECK(!ltime && !dtime && !ptime, "no gating in a gap")
        exp_ph = 0; gaps++;
      end
      @(negedge clk);
    end
    `CHECK(gaps > 10, "gaps exercised")
    `FINISH
  end
endmodule
