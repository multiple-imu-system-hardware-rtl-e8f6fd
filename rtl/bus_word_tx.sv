// Data bus word encoder: serialiser plus alternate-mark-inversion coder.
//
// Words are sent in slots of 18 bit cells timed by an external phase count
// (0 = lead bit, 1..16 = data MSB first, 17 = parity), as the document's
// Johnson-counter bus gating does. In the last cell (phase 17) of a slot the
// encoder takes the next word if word_valid is high (word_take pulses) and
// sends it in the following slot, so consecutive words follow each other with
// no gap. Each "one" goes out on the line of opposite polarity to the one
// before (AMI, Section 6.2); zeros are no pulse. The two outputs are the
// drive lines of the pulse-transformer transmitter (Section 6.3).
//
// cell_en marks a bit cell (tied high in the PIU; in the IU it is the
// received transmit clock). active is high during the cells of a word being
// sent, for gating a clock line. Outputs are combinational from registers.
module bus_word_tx
  import imu_bus_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      cell_en,
  input  logic [4:0] phase,
  input  logic      word_valid,
  input  word_t     word,
  output logic      word_take,
  output logic      active,
  output logic      bit_out,
  output ami_pair_t line
);
  logic [CELLS_PER_WORD-1:0] sr;
  logic                      polarity;   // 1: next mark goes out on n

  assign word_take = cell_en && (phase == 5'(PH_PARITY)) && word_valid;
  assign bit_out   = active && sr[CELLS_PER_WORD-1];
  assign line.p    = bit_out && !polarity;
  assign line.n    = bit_out &&  polarity;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      active   <= 1'b0;
      polarity <= 1'b0;
    end else if (cell_en) begin
      if (bit_out) polarity <= !polarity;
      if (phase == 5'(PH_PARITY)) begin
        active <= word_valid;
        sr     <= word_valid ? {1'b1, word, parity_bit(word)} : '0;
      end else begin
        sr <= {sr[CELLS_PER_WORD-2:0], 1'b0};
      end
    end
  end
endmodule
