// Testbench for iu_read_ctrl: issues read demands for accelerometers,
// status and gimbal angles at the parity cell of a C word and decodes the
// reply on the read pairs: the first lead bit must come in the very next
// cell, the words must be the selected registers (right or left justified),
// followed by the echoed C word, with odd parity, AMI data and a read clock
// present only during the reply.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The reply formats are the document's; the immediate start
// of the reply is this design's choice and is checked as such.
`include "tb/tb_check.svh"
module tb_iu_read_ctrl;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cell_en = 1, read_demand = 0, busy;
  logic [4:0] phase = 0;
  word_t b_reg = 0, c_reg = 0, status = 0;
  logic [11:0] acc [3];
  logic [13:0] sd [3];
  bus_dir_t bus_up;
  iu_read_ctrl dut (.*);
  always #50 clk = !clk;
  initial begin #5000000; failures++; $display("watchdog"); `FINISH end
  always @(posedge clk) phase <= (phase == 17) ? 5'd0 : phase + 5'd1;

  // reply decoder, sampled mid-cell
  word_t got[$]; logic [17:0] sh; int ncell = 0; int clk_cells = 0;
  logic dpol_n; logic have_mark = 0; int first_lead_cell = -1; int cyc = 0;
  always @(negedge clk) begin
    logic on, b;
    cyc++;
    on = bus_up.clk.p | bus_up.clk.n; b = bus_up.data.p | bus_up.data.n;
    if (b) begin
      if (have_mark) `CHECK(bus_up.data.n != dpol_n, "AMI alternation")
      dpol_n = bus_up.data.n; have_mark = 1;
    end
    if (!on) `CHECK(!b, "no data without read clock")
    if (on) begin
      clk_cells++;
      if (first_lead_cell < 0) first_lead_cell = cyc;
      sh = {sh[16:0], b}; ncell++;
      if (ncell == 18) begin
        `CHECK(sh[17] == 1'b1, "lead bit")
        `CHECK(^sh[16:0] == 1'b1, "odd parity")
        got.push_back(sh[16:1]); ncell = 0;
      end
    end else ncell = 0;
  end

  task automatic demand(input word_t b, input int nwords);
    int demand_cyc;
    got.delete(); first_lead_cell = -1;
    b_reg = b;
    @(negedge clk); while (phase != 17) @(negedge clk);
    read_demand = 1; #1 demand_cyc = cyc; @(negedge clk); read_demand = 0;
    repeat (18 * nwords + 10) @(negedge clk);
    `CHECK(first_lead_cell == demand_cyc + 1, $sformatf("reply starts next cell (%0d vs %0d)", first_lead_cell, demand_cyc))
    `CHECK(got.size() == nwords, $sformatf("word count %0d", got.size()))
    `CHECK(!busy, "idle after reply")
  endtask

  initial begin
    acc[0] = 12'h123; acc[1] = 12'hFED; acc[2] = 12'h800;
    sd[0] = 14'h3ABC; sd[1] = 14'h0001; sd[2] = 14'h2000;
    status = 16'hF80F; c_reg = 16'h0ACE;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (40) @(negedge clk);
    `CHECK(clk_cells == 0, "read clock absent when idle")
    demand(16'b10_00_0_1_100_00000_01, 4);
    `CHECK(got[0] == 16'h0123 && got[1] == 16'h0FED && got[2] == 16'h0800 && got[3] == 16'h0ACE, "accel reply")
    demand(16'b10_00_0_1_010_00000_10, 2);
    `CHECK(got[0] == 16'hF80F && got[1] == 16'h0ACE, "status reply")
    c_reg = 16'h0321;
    demand(16'b10_00_0_1_100_00000_11, 4);
    `CHECK(got[0] == 16'hEAF0 && got[1] == 16'h0004 && got[2] == 16'h8000 && got[3] == 16'h0321, "S/D reply, left justified")
    `FINISH
  end
endmodule
