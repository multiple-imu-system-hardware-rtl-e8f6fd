// IU reply generator for data demands (Sections 7.3, 7.5, 7.9, 7.10).
//
// A read demand presets the word counter from B bits 10-8 (the number of
// words to send, C included). While the counter is above one, the register
// picked by B bits 2,1 and the word index is sent:
//   01: DAX, DAY, DAZ   12-bit accelerometer counts, right justified
//   10: DSTATUS
//   11: DSD1, DSD2, DSD3 14-bit gimbal angles, left justified
// and the last word is the C word echoed unchanged. Each word sent
// decrements the counter. Words go out back to back through bus_word_tx; the
// first one starts in the cell right after the parity cell of the demand's
// C word, well inside the one-word-time reply limit. The read clock pair
// pulses (alternating polarity) only in cells of the reply. Indices past the
// group's registers send zero; this and the zero fill of unused bits are
// this design's choice.
module iu_read_ctrl
  import imu_bus_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cell_en,
  input  logic [4:0]  phase,
  input  logic        read_demand,
  input  word_t       b_reg,
  input  word_t       c_reg,
  input  logic [11:0] acc [3],
  input  word_t       status,
  input  logic [13:0] sd [3],
  output bus_dir_t    bus_up,
  output logic        busy
);
  logic [2:0] remaining, cnt_now;
  logic [1:0] idx, idx_now;
  word_t      word;
  logic       take, active, clk_pol;

  assign cnt_now = read_demand ? b_reg[B_WC_HI:B_WC_LO] : remaining;
  assign idx_now = read_demand ? 2'd0 : idx;

  always_comb begin
    word = '0;
    if (cnt_now == 3'd1) begin
      word = c_reg;
    end else if (idx_now != 2'd3) begin
      unique case (b_reg[1:0])
        GRP_ACCEL:  word = {4'b0000, acc[idx_now]};
        GRP_STATUS: word = (idx_now == 2'd0) ? status : '0;
        GRP_SD:     word = {sd[idx_now], 2'b00};
        default:    word = '0;
      endcase
    end
  end

  bus_word_tx u_tx (
    .clk, .rst_n, .cell_en, .phase,
    .word_valid(cnt_now != 3'd0), .word, .word_take(take),
    .active, .bit_out(), .line(bus_up.data)
  );

  assign bus_up.clk.p = active && cell_en && !clk_pol;
  assign bus_up.clk.n = active && cell_en &&  clk_pol;
  assign busy         = active || (remaining != 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0; idx <= '0; clk_pol <= 1'b0;
    end else begin
      if (active && cell_en) clk_pol <= !clk_pol;
      if (take) begin
        remaining <= cnt_now - 3'd1;
        idx       <= idx_now + 2'd1;
      end else if (read_demand) begin
        remaining <= cnt_now;
        idx       <= 2'd0;
      end
    end
  end
endmodule
