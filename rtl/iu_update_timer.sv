// IU update timer (Sections 7.1, 7.8, 7.11).
//
// A 400 Hz multivibrator, modelled as a counter on the 10 MHz clock, is
// restarted by each pulse of the 400 Hz sync line from the PIU, so that all
// IUs share one GYPTO time base; with no sync it free-runs at a slightly
// lower rate (FREE_PERIOD, this design's choice, so a present sync always
// wins). Each 400 Hz tick alternately gives the GYPTO decision clock and the
// GYPTO data output clock, two 5 ms trains displaced by 2.5 ms. A divide by 8
// gives the 50 pps train (tick50), whose every second pulse requests the S/D
// register update (sd_update, 25 per second). slot is the decision period
// 0..3 within the 20 ms frame. Outputs are one-cycle pulses except slot.
module iu_update_timer #(
  parameter int unsigned FREE_PERIOD = 26000   // 10 MHz clocks, about 385 Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sync_400hz,
  output logic       gypto_decide,
  output logic       gypto_strobe,
  output logic [1:0] slot,
  output logic       tick50,
  output logic       sd_update
);
  logic [$clog2(FREE_PERIOD)-1:0] mv;
  logic [2:0] div8;
  logic       minor_odd;
  logic       tick400;

  assign tick400 = sync_400hz || (mv == ($clog2(FREE_PERIOD))'(FREE_PERIOD - 1));
  assign slot    = div8[2:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv <= '0; div8 <= '0; minor_odd <= 1'b0;
      gypto_decide <= 1'b0; gypto_strobe <= 1'b0; tick50 <= 1'b0; sd_update <= 1'b0;
    end else begin
      gypto_decide <= 1'b0; gypto_strobe <= 1'b0; tick50 <= 1'b0; sd_update <= 1'b0;
      if (tick400) begin
        mv <= '0;
        // even 400 Hz ticks decide, odd ones strobe the decision out
        if (!div8[0]) gypto_decide <= 1'b1;
        else          gypto_strobe <= 1'b1;
        div8 <= div8 + 3'd1;
        if (div8 == 3'd7) begin
          tick50    <= 1'b1;
          minor_odd <= !minor_odd;
          sd_update <= !minor_odd;
        end
      end else begin
        mv <= mv + 1'b1;
      end
    end
  end
endmodule
