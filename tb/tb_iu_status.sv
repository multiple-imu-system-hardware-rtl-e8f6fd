// Testbench for iu_status: checks that discretes enter the status word only
// when a Read Status B word arrives, the sticky error bits and their clearing
// by an IMU command with Reset Parity Fail, the read-error conditions, and
// that the S/D registers load on an update only while data-ready is high.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The bit assignments are the document's; the read-error
// conditions and reset scope checked here are this design's choices.
`include "tb/tb_check.svh"
module tb_iu_status;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic system_ready = 0, ims_fail = 0, ims_fail_switch = 0, ims_fault = 0, imu_bite = 0, autocal = 0;
  logic b_loaded = 0, read_demand = 0, d1_loaded = 0, parity_err = 0, b_fmt_err = 0, c_fmt_err = 0;
  logic accel_busy = 0, sd_update = 0;
  logic [1:0] read_group = 0;
  word_t b_word = 0, d1_word = 0, status;
  logic [13:0] sd_in [3], sd [3];
  logic [2:0] sd_ready = 0;
  iu_status dut (.*);
  always #50 clk = !clk;
  initial begin #1000000; failures++; $display("watchdog"); `FINISH end
  task automatic pulse(ref logic s); s = 1; @(negedge clk); s = 0; @(negedge clk); endtask
  initial begin
    sd_in[0] = 14'h1111; sd_in[1] = 14'h2222; sd_in[2] = 14'h3333;
    repeat (2) @(negedge clk); rst_n = 1;
    system_ready = 1; imu_bite = 1; @(negedge clk);
    `CHECK(status == 16'h0000, "discretes not sampled before a demand")
    b_word = 16'b10_00_0_1_010_00000_10; pulse(b_loaded);
    `CHECK(status == 16'h9000, $sformatf("status on demand %h", status))
    ims_fail_switch = 1; b_word = 16'b10_00_0_1_100_00000_01; pulse(b_loaded);
    `CHECK(status[14] == 0, "accel demand does not sample discretes")
    b_word = 16'b10_00_0_1_010_00000_10; pulse(b_loaded);
    `CHECK(status == 16'hD000, "fail switch sets IMS Fail")
    pulse(parity_err); `CHECK(status[0], "parity fail bit")
    pulse(b_fmt_err);  `CHECK(status[2], "B format bit")
    pulse(c_fmt_err);  `CHECK(status[3], "C format bit")
    accel_busy = 1; read_group = GRP_ACCEL; pulse(read_demand); accel_busy = 0;
    `CHECK(status[3:0] == 4'hF, "read error bit")
    d1_word = 16'h0000; pulse(d1_loaded); `CHECK(status[3:0] == 4'hF, "errors sticky")
    d1_word = 16'h0200; pulse(d1_loaded); `CHECK(status[3:0] == 4'h0, "reset parity fail command")
    // S/D registers
    sd_ready = 3'b101; pulse(sd_update);
    `CHECK(sd[0] == 14'h1111 && sd[1] == 0 && sd[2] == 14'h3333, "S/D loads where data ready")
    read_group = GRP_SD; pulse(read_demand);
    `CHECK(status[1], "S/D read while an update waits is a read error")
    sd_ready = 3'b111; @(negedge clk); @(negedge clk);
    `CHECK(sd[1] == 14'h2222, "pending S/D update completes on data ready")
    sd_in[0] = 14'h0AAA; @(negedge clk); @(negedge clk);
    `CHECK(sd[0] == 14'h1111, "no load without update request")
    `FINISH
  end
endmodule
