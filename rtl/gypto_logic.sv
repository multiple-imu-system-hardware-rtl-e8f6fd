// GYPTO ternary-to-binary gyro torquing logic, three axes (Sections 7.1, 7.8,
// Figures 7-3, 7-4).
//
// The computer sends one D2 word per 20 ms frame holding, for each axis, a
// four-bit pulse pattern (one bit per 5 ms decision period) and a sign:
// bits 1-4 X pattern, bit 5 X sign; 6-9 Y, 10 Y sign; 11-14 Z, 15 Z sign.
// D2 is not cleared, so the pattern repeats until a new word arrives. At each
// decision (GYPTO clock, 200 per second) each axis picks a torque sense:
//   pattern bit set   -> a commanded pulse of the sign's sense; the
//                        free-pulse memory is left unchanged
//   pattern bit clear -> a free pulse opposite in sense to the last free
//                        pulse, which is remembered
// so free periods keep the 1:1 binary dither and commanded pulses add net
// torque. At the data output clock, 2.5 ms after the decision, the senses are
// strobed out to the IMU as torq_pos/torq_neg levels held for 5 ms.
// slot (0..3) says which pattern bit the decision uses. Slot 0 = bit 1 of the
// field, sign 1 = negative sense and a first free pulse of positive sense
// after reset are this design's choices.
module gypto_logic
  import imu_bus_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  word_t      d2,
  input  logic       decide,
  input  logic       strobe,
  input  logic [1:0] slot,
  output logic [2:0] torq_pos,
  output logic [2:0] torq_neg
);
  logic [2:0] last_free_neg;   // sense of the last free pulse, 1 = negative
  logic [2:0] sense_neg;       // decided sense, waiting for the strobe
  logic [2:0] decided;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_free_neg <= '1;
      sense_neg     <= '0;
      decided       <= '0;
      torq_pos      <= '0;
      torq_neg      <= '0;
    end else begin
      for (int a = 0; a < 3; a++) begin
        if (decide) begin
          decided[a] <= 1'b1;
          if (d2[a*5 + int'(slot)]) begin
            sense_neg[a] <= d2[a*5 + 4];
          end else begin
            sense_neg[a]     <= !last_free_neg[a];
            last_free_neg[a] <= !last_free_neg[a];
          end
        end
        if (strobe && decided[a]) begin
          torq_pos[a] <= !sense_neg[a];
          torq_neg[a] <=  sense_neg[a];
        end
      end
    end
  end
endmodule
