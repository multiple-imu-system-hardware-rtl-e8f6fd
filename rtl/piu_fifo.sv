// PIU first-in first-out memory (Section 5.1): three 16-bit levels.
//
// A word is written into level 1 and rolls one level per clock toward
// level 3 while the level ahead is empty; level 3 is the output. The
// controller's flags are 1EMP (level 1 empty, a new word may be written),
// 3FUL (level 3 holds a word) and ALLEMP (all levels empty). A write into a
// full level 1 is refused and reported on overflow. clear empties all levels
// (ABORT). Depth 3 and the rolling behaviour are the document's; the
// one-level-per-clock roll is this design's choice.
module piu_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         emp1,      // 1EMP
  output logic         ful3,      // 3FUL
  output logic         allemp,    // ALLEMP
  output logic         overflow
);
  logic [DEPTH-1:0]        full_q, full_d;
  logic [W-1:0]            data_q [DEPTH];
  logic [W-1:0]            data_d [DEPTH];

  assign rd_data = data_q[DEPTH-1];
  assign emp1    = !full_q[0];
  assign ful3    = full_q[DEPTH-1];
  assign allemp  = (full_q == '0);

  always_comb begin
    full_d = full_q;
    for (int i = 0; i < DEPTH; i++) data_d[i] = data_q[i];
    if (rd_en) full_d[DEPTH-1] = 1'b0;
    for (int i = DEPTH - 2; i >= 0; i--) begin
      if (full_q[i] && !full_d[i+1]) begin
        full_d[i+1] = 1'b1;
        data_d[i+1] = data_q[i];
        full_d[i]   = 1'b0;
      end
    end
    overflow = wr_en && full_d[0];
    if (wr_en && !full_d[0]) begin
      full_d[0] = 1'b1;
      data_d[0] = wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      for (int i = 0; i < DEPTH; i++) data_q[i] <= '0;
    end else if (clear) begin
      full_q <= '0;
    end else begin
      full_q <= full_d;
      for (int i = 0; i < DEPTH; i++) data_q[i] <= data_d[i];
    end
  end
endmodule
