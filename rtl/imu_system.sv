// Redundant IMU system interface (Section 1.2, Figures 1-1, A-1): one PIU
// serving three IUs over three 10 MHz serial data buses.
//
// The computer side (4pi-CP2 parallel ECO/ECI transfers, DOT1 start,
// ABORT, discretes, 50 Hz minor cycle interrupt) and the HP2116B parallel
// bus are brought out as ports, as are the IMU-side signals of each IU
// (accelerometer pulse lines, S/D converter outputs, status discretes, IMU
// command discretes and gyro torquing outputs), indexed by IMU 0..2 for bus
// addresses IMU1..IMU3. The PIU's 400 Hz sync line runs to every IU. The
// parameters only shorten the timers for simulation; defaults are the
// document's rates at 10 MHz.
module imu_system
  import imu_bus_pkg::*;
#(
  parameter int unsigned DIV_400HZ   = 25000,
  parameter int unsigned DIV_50HZ    = 8,
  parameter int unsigned TIMEOUT     = 10000,
  parameter int unsigned FREE_PERIOD = 26000,
  parameter int unsigned ACLK_CYCLES = 5
) (
  input  logic        clk,           // 10 MHz master oscillator
  input  logic        rst_n,
  // 4pi-CP2 computer
  input  logic        abort,
  input  logic        dot1,
  output logic        io_start,
  output logic        io_eci,
  output word_t       io_addr,
  input  logic        io_ack,
  input  word_t       io_dout,
  output word_t       io_din,
  output logic        err_timeout,
  output logic        dint3,
  output logic        ipe2,
  output logic        rx_overrun,
  output logic        minor_cycle,
  output piu_state_e  piu_state,
  // HP2116B
  output logic        hp_flag,
  output word_t       hp_data,
  input  logic        hp_cmd,
  // IMUs
  input  logic [2:0]  dv_pos [3],
  input  logic [2:0]  dv_neg [3],
  input  logic [13:0] sd_in [3][3],
  input  logic [2:0]  sd_ready [3],
  input  logic [2:0]  system_ready,
  input  logic [2:0]  ims_fail,
  input  logic [2:0]  ims_fail_switch,
  input  logic [2:0]  ims_fault,
  input  logic [2:0]  imu_bite,
  input  logic [2:0]  autocal,
  output word_t       imu_cmd [3],
  output logic [2:0]  torq_pos [3],
  output logic [2:0]  torq_neg [3],
  output word_t       iu_status [3]
);
  bus_dir_t bus_dn [3];
  bus_dir_t bus_up [3];
  logic     sync_400hz;

  piu #(.DIV_400HZ(DIV_400HZ), .DIV_50HZ(DIV_50HZ), .TIMEOUT(TIMEOUT)) u_piu (
    .clk, .rst_n, .abort, .dot1, .io_start, .io_eci, .io_addr, .io_ack,
    .io_dout, .io_din, .hp_flag, .hp_data, .hp_cmd, .err_timeout, .dint3,
    .ipe2, .rx_overrun, .sync_400hz, .minor_cycle, .bus_dn, .bus_up,
    .state(piu_state)
  );

  for (genvar i = 0; i < 3; i++) begin : g_iu
    iu #(.FREE_PERIOD(FREE_PERIOD), .ACLK_CYCLES(ACLK_CYCLES)) u_iu (
      .clk, .rst_n, .bus_dn(bus_dn[i]), .bus_up(bus_up[i]), .sync_400hz,
      .dv_pos(dv_pos[i]), .dv_neg(dv_neg[i]), .sd_in(sd_in[i]),
      .sd_ready(sd_ready[i]), .system_ready(system_ready[i]),
      .ims_fail(ims_fail[i]), .ims_fail_switch(ims_fail_switch[i]),
      .ims_fault(ims_fault[i]), .imu_bite(imu_bite[i]), .autocal(autocal[i]),
      .imu_cmd(imu_cmd[i]), .torq_pos(torq_pos[i]), .torq_neg(torq_neg[i]),
      .status(iu_status[i])
    );
  end
endmodule
