// Testbench for iu_accel: sends asynchronous accelerometer pulses of random
// length (1-25 us) and sign on the three axes, issues sync commands (RAU) at
// random times, and checks that each readout equals the net number of
// pulses since the previous readout, so that no pulse is lost or counted
// twice across the ACLK1-ACLK3 transfer. Also checks busy and 12-bit
// wrap-around of a negative count.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The pulse widths (1-25 us) follow the document's pulse
// specification; rates and sync times are random.
`include "tb/tb_check.svh"
module tb_iu_accel;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rau = 0, busy;
  logic [2:0] dv_pos = 0, dv_neg = 0;
  logic [11:0] acc [3];
  iu_accel dut (.*);
  always #50 clk = !clk;
  initial begin #50000000; failures++; $display("watchdog"); `FINISH end

  // per-axis count of pulses whose leading edge fell in the current window
  int net [3];
  int busy_seen = 0;
  always @(posedge clk) busy_seen += busy;

  for (genvar a = 0; a < 3; a++) begin : g_src
    initial begin
      @(posedge rst_n);
      forever begin
        int len, gap; logic neg;
        gap = 60 + $urandom % 400;     // clocks between pulses (>= 6 us)
        len = 10 + $urandom % 240;     // 1 .. 25 us
        neg = (a == 2) ? ($urandom % 4 != 0) : ($urandom % 3 == 0);
        repeat (gap) @(negedge clk);
        #13;   // not aligned with the clock
        if (neg) begin dv_neg[a] = 1; net[a]--; end else begin dv_pos[a] = 1; net[a]++; end
        #(len * 100);
        dv_neg[a] = 0; dv_pos[a] = 0;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int r = 0; r < 25; r++) begin
      int snap [3];
      repeat (2000 + $urandom % 6000) @(negedge clk);
      rau = 1;
      // pulses whose edges come before the request is accepted are counted;
      // take the reference at the ACLK1 that accepts the request
      @(negedge clk); rau = 0;
      wait (busy); #1;
      // a pulse synchronised within the last few clocks is counted next window
      for (int a = 0; a < 3; a++) snap[a] = net[a];
      wait (!busy);
      @(negedge clk);
      for (int a = 0; a < 3; a++) begin
        // pulses still in the synchroniser at ACLK0 move to the next window
        int got; got = int'($signed(acc[a]));
        `CHECK(got >= snap[a] - 1 && got <= snap[a] + 1, $sformatf("axis %0d read %0d expected %0d", a, got, snap[a]))
        net[a] -= got;
      end
    end
    `CHECK(busy_seen > 0, "transfer sequence ran")
    `CHECK(net[2] > -3 && net[2] < 3, "carried-over pulses are counted later")
    `FINISH
  end
endmodule
