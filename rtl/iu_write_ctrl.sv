// IU input shift register and write controller (Sections 7.3-7.5,
// Figure 7-2, Table 7-1).
//
// During DTIME the 16 data bits of a word are shifted in MSB first; the lead
// bit, seen at LTIME, says whether a word occupies the slot. At PTIME the
// parity is checked and the write controller gates the word to one of four
// registers. The controller is a two-flip-flop Johnson counter:
//   W_B  (00) expect a B word: bits 16,15 must be 10 (else B format error);
//             read or sync B words are followed by C, writes to group 01 by
//             D1 and to group 10 by D2 (B bits 2,1), others by C
//   W_D1 (01) load D1 (IMU commands)      -> W_C
//   W_D2 (11) load D2 (GYPTO commands)    -> W_C
//   W_C  (10) load C (bits 16,15 must be 00, else C format error); a read
//             B then gives read_demand, a sync B gives rau; back to W_B
// read_demand and rau are combinational pulses in the PTIME cell of the C
// word, so a reply can start in the very next cell. A missing word, a message
// sync or a parity error drops the message and returns to W_B; a parity error
// also pulses parity_err. Those recovery rules and the state encoding are this
// design's choice; the routing rule is the document's.
module iu_write_ctrl
  import imu_bus_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cell_en,
  input  logic  ltime,
  input  logic  dtime,
  input  logic  ptime,
  input  logic  msg_sync,
  input  logic  data_bit,
  output word_t in_word,     // input shift register contents
  output word_t b_reg,
  output word_t c_reg,
  output word_t d1_reg,
  output word_t d2_reg,
  output logic  b_loaded,
  output logic  d1_loaded,
  output logic  d2_loaded,
  output logic  read_demand,
  output logic  rau,
  output logic  parity_err,
  output logic  b_fmt_err,
  output logic  c_fmt_err
);
  typedef enum logic [1:0] {W_B = 2'b00, W_D1 = 2'b01, W_D2 = 2'b11, W_C = 2'b10} wstate_e;
  wstate_e ws;
  word_t   sr;
  logic    lead_q;
  logic    word_end, good;

  assign in_word  = sr;
  assign word_end = ptime && lead_q;
  assign good     = word_end && (data_bit == parity_bit(sr));

  always_comb begin
    b_loaded = 1'b0; d1_loaded = 1'b0; d2_loaded = 1'b0;
    read_demand = 1'b0; rau = 1'b0; b_fmt_err = 1'b0; c_fmt_err = 1'b0;
    parity_err = word_end && !good;
    if (good) begin
      unique case (ws)
        W_B:  if (sr[B_TAG_HI:B_TAG_LO] == 2'b10) b_loaded = 1'b1;
              else b_fmt_err = 1'b1;
        W_D1: d1_loaded = 1'b1;
        W_D2: d2_loaded = 1'b1;
        W_C:  if (sr[15:14] == 2'b00) begin
                read_demand = b_reg[B_READ];
                rau         = !b_reg[B_READ] && b_reg[B_SYNC];
              end else begin
                c_fmt_err = 1'b1;
              end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= W_B; sr <= '0; lead_q <= 1'b0;
      b_reg <= '0; c_reg <= '0; d1_reg <= '0; d2_reg <= '0;
    end else if (msg_sync) begin
      ws <= W_B;
    end else if (cell_en) begin
      if (ltime) lead_q <= data_bit;
      if (dtime) sr <= {sr[WORD_W-2:0], data_bit};
      if (ptime) begin
        if (!lead_q || !good) begin
          ws <= W_B;              // empty slot or parity error ends the message
        end else begin
          unique case (ws)
            W_B: if (b_loaded) begin
                   b_reg <= sr;
                   if (sr[B_READ] || sr[B_SYNC])        ws <= W_C;
                   else if (sr[1:0] == GRP_ACCEL)       ws <= W_D1;
                   else if (sr[1:0] == GRP_STATUS)      ws <= W_D2;
                   else                                 ws <= W_C;
                 end
            W_D1: begin d1_reg <= sr; ws <= W_C; end
            W_D2: begin d2_reg <= sr; ws <= W_C; end
            W_C:  begin c_reg  <= sr; ws <= W_B; end
          endcase
        end
      end
    end
  end
endmodule
