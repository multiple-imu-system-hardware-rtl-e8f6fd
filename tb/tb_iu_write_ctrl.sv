// Testbench for iu_write_ctrl: plays word slots (lead, 16 data bits, parity)
// into the gating inputs and checks the routing of each message type of
// Table 7-1: read demands (B C), IMU and GYPTO commands (B D1 C, B D2 C), the
// sync command (B C), plus B and C format errors, parity errors and a
// message broken by an empty slot.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The routing rules are the document's; the recovery
// after errors is this design's choice.
`include "tb/tb_check.svh"
module tb_iu_write_ctrl;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cell_en = 1, ltime = 0, dtime = 0, ptime = 0, msg_sync = 0, data_bit = 0;
  word_t in_word, b_reg, c_reg, d1_reg, d2_reg;
  logic b_loaded, d1_loaded, d2_loaded, read_demand, rau, parity_err, b_fmt_err, c_fmt_err;
  iu_write_ctrl dut (.*);
  always #50 clk = !clk;
  initial begin #5000000; failures++; $display("watchdog"); `FINISH end

  int n_rd = 0, n_rau = 0, n_d1 = 0, n_d2 = 0, n_b = 0, n_perr = 0, n_bfe = 0, n_cfe = 0;
  always @(posedge clk) begin
    n_rd += read_demand; n_rau += rau; n_d1 += d1_loaded; n_d2 += d2_loaded;
    n_b += b_loaded; n_perr += parity_err; n_bfe += b_fmt_err; n_cfe += c_fmt_err;
  end

  task automatic slot(input logic present, input word_t w, input logic bad_par = 0);
    for (int c = 0; c < 18; c++) begin
      @(negedge clk);
      ltime = (c == 0); ptime = (c == 17); dtime = (c > 0 && c < 17);
      data_bit = (c == 0) ? present : (c == 17) ? (present && (parity_bit(w) ^ bad_par))
                                                 : (present && w[16 - c]);
    end
  endtask

  task automatic idle();
    @(negedge clk); ltime = 0; dtime = 0; ptime = 0; data_bit = 0;
    @(negedge clk);
  endtask

  localparam word_t B_RD_ACC = 16'b10_00_0_1_100_00000_01;
  localparam word_t B_WR_D1  = 16'b10_00_0_0_011_00000_01;
  localparam word_t B_WR_D2  = 16'b10_00_0_0_011_00000_10;
  localparam word_t B_RAU    = 16'b10_00_1_0_010_00000_00;
  localparam word_t C_OK     = 16'h1234 & 16'h3FFF;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    slot(0, 0);
    slot(1, B_RD_ACC); slot(1, C_OK); idle();
    `CHECK(n_rd == 1 && b_reg == B_RD_ACC && c_reg == C_OK, "read demand B C")
    slot(1, B_WR_D1); slot(1, 16'hA5C3); slot(1, C_OK); idle();
    `CHECK(n_d1 == 1 && d1_reg == 16'hA5C3 && n_rd == 1, "IMU command B D1 C")
    slot(1, B_WR_D2); slot(1, 16'h7BCD); slot(1, C_OK); idle();
    `CHECK(n_d2 == 1 && d2_reg == 16'h7BCD && d1_reg == 16'hA5C3, "GYPTO command B D2 C")
    slot(1, B_RAU); slot(1, C_OK); idle();
    `CHECK(n_rau == 1 && n_rd == 1, "sync command B C")
    slot(1, 16'h0001); idle();
    `CHECK(n_bfe == 1 && n_b == 4, $sformatf("B format error %0d %0d", n_bfe, n_b))
    slot(1, B_RD_ACC); slot(1, 16'hC000); idle();
    `CHECK(n_cfe == 1 && n_rd == 1, "C format error, no demand")
    slot(1, B_WR_D1); slot(1, 16'h1111, 1); slot(1, C_OK); idle();
    `CHECK(n_perr == 1 && d1_reg == 16'hA5C3, "parity error drops the D word")
    slot(1, B_WR_D1); slot(0, 0); slot(1, 16'h2222); slot(1, C_OK); idle();
    `CHECK(d1_reg == 16'hA5C3, "empty slot ends the message")
    slot(1, B_RD_ACC); slot(1, C_OK); idle();
    `CHECK(n_rd == 2, "recovers after errors")
    `FINISH
  end
endmodule
