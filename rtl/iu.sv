// Interface unit (Chapter 7, Figure A-3): the bus terminal between one
// KT-70 IMU and the PIU.
//
// The IU decodes the PIU's messages on its data bus (B C demands,
// B D1 C and B D2 C commands, B C sync), keeps the IMU command word (D1,
// driven to the IMU as discretes on imu_cmd) and the GYPTO word (D2, turned
// into three axes of binary gyro torquing), counts accelerometer pulses,
// holds the three gimbal angles from the S/D converters and a status word,
// and answers demands with D words and the echoed C word on its read bus.
// Parts: iu_bus_gating (bit-cell timing), iu_write_ctrl (input register and
// write controller), iu_read_ctrl (reply), iu_status (status and S/D
// registers), iu_accel (accelerometer counters), iu_update_timer and
// gypto_logic. All logic runs on the 10 MHz system clock; bus cells are
// marked by the received transmit clock.
// The partitioning and register set follow the document; the 400 Hz timing
// comes from the PIU's sync line (the later hardware), and the sync message
// only latches the accelerometer counters, which is this design's reading.
module iu
  import imu_bus_pkg::*;
#(
  parameter int unsigned FREE_PERIOD = 26000,
  parameter int unsigned ACLK_CYCLES = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  bus_dir_t    bus_dn,
  output bus_dir_t    bus_up,
  input  logic        sync_400hz,
  // IMU / APS side
  input  logic [2:0]  dv_pos,
  input  logic [2:0]  dv_neg,
  input  logic [13:0] sd_in [3],
  input  logic [2:0]  sd_ready,
  input  logic        system_ready,
  input  logic        ims_fail,
  input  logic        ims_fail_switch,
  input  logic        ims_fault,
  input  logic        imu_bite,
  input  logic        autocal,
  output word_t       imu_cmd,
  output logic [2:0]  torq_pos,
  output logic [2:0]  torq_neg,
  output word_t       status
);
  logic cell_en, ltime, dtime, ptime, msg_sync, data_bit;
  logic [4:0] phase;
  word_t b_reg, c_reg, d2_reg, in_word;
  logic b_loaded, d1_loaded, d2_loaded, read_demand, rau;
  logic parity_err, b_fmt_err, c_fmt_err;
  logic [11:0] acc [3];
  logic [13:0] sd [3];
  logic accel_busy;
  logic gypto_decide, gypto_strobe, tick50, sd_update;
  logic [1:0] slot;

  iu_bus_gating u_gate (
    .clk, .rst_n, .bus_dn, .cell_en, .phase, .ltime, .dtime, .ptime,
    .msg_sync, .data_bit
  );

  iu_write_ctrl u_wr (
    .clk, .rst_n, .cell_en, .ltime, .dtime, .ptime, .msg_sync, .data_bit,
    .in_word, .b_reg, .c_reg, .d1_reg(imu_cmd), .d2_reg,
    .b_loaded, .d1_loaded, .d2_loaded, .read_demand, .rau,
    .parity_err, .b_fmt_err, .c_fmt_err
  );

  iu_status u_stat (
    .clk, .rst_n, .system_ready, .ims_fail, .ims_fail_switch, .ims_fault,
    .imu_bite, .autocal, .b_loaded, .b_word(in_word), .read_demand,
    .read_group(b_reg[1:0]), .d1_loaded, .d1_word(in_word), .parity_err,
    .b_fmt_err, .c_fmt_err, .accel_busy, .sd_update, .sd_in, .sd_ready,
    .sd, .status
  );

  iu_accel #(.ACLK_CYCLES(ACLK_CYCLES)) u_acc (
    .clk, .rst_n, .dv_pos, .dv_neg, .rau, .acc, .busy(accel_busy)
  );

  iu_update_timer #(.FREE_PERIOD(FREE_PERIOD)) u_tim (
    .clk, .rst_n, .sync_400hz, .gypto_decide, .gypto_strobe, .slot,
    .tick50, .sd_update
  );

  gypto_logic u_gypto (
    .clk, .rst_n, .d2(d2_reg), .decide(gypto_decide), .strobe(gypto_strobe),
    .slot, .torq_pos, .torq_neg
  );

  iu_read_ctrl u_rd (
    .clk, .rst_n, .cell_en, .phase, .read_demand, .b_reg, .c_reg,
    .acc, .status, .sd, .bus_up, .busy()
  );
endmodule
