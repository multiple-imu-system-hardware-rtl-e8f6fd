// IU status register and synchro-to-digital converter registers
// (Sections 7.6, 7.10, Table 7-4).
//
// Status word (document bit numbers): 16 System Ready, 15 IMS Fail (IMU
// discrete or the front-panel fail switch), 14 IMS Fault, 13 IMU BITE,
// 12 AUTOCAL mode, 11-5 unused (zero), 4 C word format error, 3 B word format
// error, 2 read error (accelerometer or S/D register), 1 parity fail on input.
// The discretes are sampled into the register when a Read Status B word
// arrives, i.e. on demand, one word time before the reply goes out. The four
// error bits are sticky and are cleared by an IMU command (D1) with the
// Reset Parity Fail bit set. A read error is recorded when accelerometer data
// is demanded while the counters are being transferred, or gimbal angles are
// demanded while an S/D update is still waiting for converter data.
//
// The three 14-bit gimbal angle registers (pitch, roll, azimuth) load from
// the converters on sd_update (every second 50 pps tick, 25 per second) as
// soon as the converter's data-ready line is high, so bits are never taken
// while the converter resets its outputs. Clearing all four error bits with
// one command and the read-error conditions are this design's choice.
module iu_status
  import imu_bus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // discretes
  input  logic        system_ready,
  input  logic        ims_fail,
  input  logic        ims_fail_switch,
  input  logic        ims_fault,
  input  logic        imu_bite,
  input  logic        autocal,
  // events from the write controller
  input  logic        b_loaded,
  input  word_t       b_word,      // word being loaded when b_loaded
  input  logic        read_demand,
  input  logic [1:0]  read_group,
  input  logic        d1_loaded,
  input  word_t       d1_word,
  input  logic        parity_err,
  input  logic        b_fmt_err,
  input  logic        c_fmt_err,
  input  logic        accel_busy,
  // S/D converters
  input  logic        sd_update,
  input  logic [13:0] sd_in [3],
  input  logic [2:0]  sd_ready,
  output logic [13:0] sd [3],
  output word_t       status
);
  logic [4:0] disc_q;
  logic [3:0] err;
  logic [2:0] sd_pend;
  logic       rd_err;

  assign status = {disc_q, 7'b0, err};
  assign rd_err = read_demand &&
                  ((read_group == GRP_ACCEL && accel_busy) ||
                   (read_group == GRP_SD && sd_pend != '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disc_q <= '0; err <= '0; sd_pend <= '0;
      for (int i = 0; i < 3; i++) sd[i] <= '0;
    end else begin
      if (b_loaded && b_word[B_READ] && b_word[1:0] == GRP_STATUS)
        disc_q <= {system_ready, ims_fail | ims_fail_switch, ims_fault, imu_bite, autocal};
      if (d1_loaded && d1_word[D1_RESET_PARITY]) err <= '0;
      else begin
        if (c_fmt_err)  err[3] <= 1'b1;
        if (b_fmt_err)  err[2] <= 1'b1;
        if (rd_err)     err[1] <= 1'b1;
        if (parity_err) err[0] <= 1'b1;
      end
      for (int i = 0; i < 3; i++) begin
        if ((sd_update || sd_pend[i]) && sd_ready[i]) begin
          sd[i]      <= sd_in[i];
          sd_pend[i] <= 1'b0;
        end else if (sd_update) begin
          sd_pend[i] <= 1'b1;
        end
      end
    end
  end
endmodule
