// Data bus word decoder of the PIU read side.
//
// The receiver comparators give two lines per bus pair; their OR restores
// the bit stream (Section 6.4). The read clock is present only while an IU
// replies, so words are framed by counting clocked cells: the first clocked
// cell after a clockless one is a lead bit, then 16 data bits MSB first and a
// parity bit. On the parity cell word_valid pulses for one clock with the
// word, parity_err (odd parity expected) and lead_err (lead bit was zero).
// Framing by the read clock and the error outputs are this design's choice;
// the document gives the word format and the OR decoding.
module bus_word_rx
  import imu_bus_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_dir_t bus,
  output logic     word_valid,
  output word_t    word,
  output logic     parity_err,
  output logic     lead_err
);
  logic       clk_present, data_bit;
  logic [4:0] cnt;
  logic       lead_q;
  word_t      sr;

  assign clk_present = bus.clk.p | bus.clk.n;
  assign data_bit    = bus.data.p | bus.data.n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; sr <= '0; lead_q <= 1'b0;
      word_valid <= 1'b0; word <= '0; parity_err <= 1'b0; lead_err <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (!clk_present) begin
        cnt <= '0;
      end else begin
        if (cnt == 5'(PH_LEAD))        lead_q <= data_bit;
        else if (cnt < 5'(PH_PARITY))  sr     <= {sr[WORD_W-2:0], data_bit};
        if (cnt == 5'(PH_PARITY)) begin
          cnt        <= '0;
          word_valid <= 1'b1;
          word       <= sr;
          parity_err <= (data_bit != parity_bit(sr));
          lead_err   <= !lead_q;
        end else begin
          cnt <= cnt + 5'd1;
        end
      end
    end
  end
endmodule
