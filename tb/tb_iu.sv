// Testbench for one interface unit at bus level, with a short free-running
// update period. A testbench PIU model drives the transmit pairs (AMI clock
// that runs continuously, one clockless cell before each message, AMI data)
// and decodes the IU's replies from the read pairs. Checks: D1 reaches the
// IMU command lines; a demand for status returns the discretes and the echoed
// C word, starting in the cell after the C word; parity, B-format and
// C-format errors set their status bits and leave D1 unchanged; a D1 with
// Reset Parity Fail clears them; a sync command latches accelerometer counts
// that a later demand returns; gimbal angles are held while the converter is
// not ready; a D2 GYPTO word produces torquing pulses.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected behaviour follows the document's message
// formats and status bits; the error cases and timing of stimuli are this
// testbench's choice.
`include "tb/tb_check.svh"
module tb_iu;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, sync_400hz = 0;
  bus_dir_t bus_dn, bus_up;
  logic [2:0] dv_pos = 0, dv_neg = 0, sd_ready = 3'b111, torq_pos, torq_neg;
  logic [13:0] sd_in [3];
  logic system_ready = 1, ims_fail = 0, ims_fail_switch = 0, ims_fault = 1, imu_bite = 0, autocal = 1;
  word_t imu_cmd, status;
  iu #(.FREE_PERIOD(400), .ACLK_CYCLES(5)) dut (.*);
  always #50 clk = !clk;
  initial begin #50000000; failures++; $display("watchdog"); `FINISH end
  localparam word_t C_W = 16'h0055;

  // transmit side: one cell per clock, driven at negedge
  logic cpol = 0, dpol = 0;
  task automatic put_cell(input logic clk_on, input logic b);
    bus_dn.clk.p = clk_on && !cpol; bus_dn.clk.n = clk_on && cpol;
    if (clk_on) cpol = !cpol;
    bus_dn.data.p = b && !dpol; bus_dn.data.n = b && dpol;
    if (b) dpol = !dpol;
    @(negedge clk);
  endtask
  task automatic idle(int n); repeat (n) put_cell(1, 0); endtask
  int last_c_end;
  task automatic send(input word_t w [$], input int bad_par = -1);
    put_cell(0, 0);                             // message sync
    foreach (w[k]) begin
      logic [17:0] bits = {1'b1, w[k], parity_bit(w[k]) ^ (k == bad_par)};
      for (int c = 17; c >= 0; c--) put_cell(1, bits[c]);
    end
    last_c_end = cyc;
    idle(100);
  endtask

  // reply decoder
  word_t rx [$]; int first_cell = -1, cyc = 0, n = 0; logic [17:0] sh;
  always @(negedge clk) begin
    cyc++;
    if (bus_up.clk.p | bus_up.clk.n) begin
      logic b; b = bus_up.data.p | bus_up.data.n;
      if (n == 0 && first_cell < 0) first_cell = cyc;
      sh = {sh[16:0], b}; n++;
      if (n == 18) begin
        `CHECK(sh[17] && ^sh[16:0], "reply lead and parity")
        rx.push_back(sh[16:1]); n = 0;
      end
    end
  end

  function automatic word_t bw(logic sync, logic rd, int wc, logic [1:0] grp);
    return {2'b10, 2'b00, sync, rd, 3'(wc), 5'b0, grp};
  endfunction
  task automatic demand(logic [1:0] grp, int nrep);
    rx.delete(); first_cell = -1;
    send('{bw(0, 1, nrep + 1, grp), C_W});
    `CHECK(rx.size() == nrep + 1 && rx[nrep] == C_W, $sformatf("reply of %0d words with C echo", nrep + 1))
  endtask

  initial begin
    for (int a = 0; a < 3; a++) sd_in[a] = 14'h0100 * (a + 1) + 14'h7;
    bus_dn = '0; bus_up = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    idle(40);
    // D1 command
    send('{bw(0, 0, 3, GRP_ACCEL), 16'h0123, C_W});
    `CHECK(imu_cmd == 16'h0123, "D1 to IMU command lines")
    // read status: discretes and no errors
    rx.delete(); first_cell = -1;
    send('{bw(0, 1, 2, GRP_STATUS), C_W});
    `CHECK(rx.size() == 2 && rx[0] == 16'hA800 && rx[1] == C_W, $sformatf("status %h", rx.size() ? rx[0] : 0))
    `CHECK(first_cell == last_c_end + 1, "reply starts in the cell after the C word")
    // parity error in D1: command lines unchanged, status bit 1
    send('{bw(0, 0, 3, GRP_ACCEL), 16'h0777, C_W}, 1);
    `CHECK(imu_cmd == 16'h0123, "D1 with bad parity ignored")
    `CHECK(status[0], "parity fail bit")
    // B format error: first word without the B tag
    send('{16'h0777, C_W});
    `CHECK(status[2], "B format error bit")
    // C format error: last word with a tag
    send('{bw(0, 0, 3, GRP_ACCEL), 16'h0124, 16'hC055});
    `CHECK(status[3], "C format error bit")
    demand(GRP_STATUS, 1);
    `CHECK(rx[0][3:0] == 4'b1101, $sformatf("error bits in status %h", rx[0]))
    // reset parity fail
    send('{bw(0, 0, 3, GRP_ACCEL), 16'h0123 | (16'd1 << D1_RESET_PARITY), C_W});
    `CHECK(status[3:0] == 0, "errors cleared by D1")
    // accelerometer: 7 positive X, 3 negative Y, then sync
    for (int i = 0; i < 7; i++) begin dv_pos[0] = 1; repeat (20) @(negedge clk); dv_pos[0] = 0; repeat (20) @(negedge clk); end
    for (int i = 0; i < 3; i++) begin dv_neg[1] = 1; repeat (20) @(negedge clk); dv_neg[1] = 0; repeat (20) @(negedge clk); end
    send('{bw(1, 0, 2, 2'b00), C_W});
    demand(GRP_ACCEL, 3);
    `CHECK(rx[0] == 16'd7 && rx[1] == 16'h0FFD && rx[2] == 0, $sformatf("accel %h %h %h", rx[0], rx[1], rx[2]))
    // gimbal angles with converter 2 not ready
    repeat (8000) @(negedge clk);
    sd_ready = 3'b101; repeat (4000) @(negedge clk);
    for (int a = 0; a < 3; a++) sd_in[a] = sd_in[a] + 14'h10;
    repeat (4000) @(negedge clk);
    demand(GRP_SD, 3);
    `CHECK(rx[0] == {14'h0117, 2'b00} && rx[1] == {14'h0207, 2'b00} && rx[2] == {14'h0317, 2'b00}, $sformatf("S/D held while not ready %h %h %h", rx[0], rx[1], rx[2]))
    `CHECK(status[1], "read error for pending S/D")
    sd_ready = 3'b111; repeat (4000) @(negedge clk);
    demand(GRP_SD, 3);
    `CHECK(rx[1] == {14'h0217, 2'b00}, "S/D updated when ready")
    // GYPTO: X commanded positive in every slot
    send('{bw(0, 0, 3, GRP_STATUS), 16'b0_0000_0_0000_0_1111, C_W});
    begin
      int np = 0;
      @(posedge dut.gypto_strobe);   // decision taken before D2 arrived
      repeat (8) begin @(posedge dut.gypto_strobe); @(negedge clk); @(negedge clk); np += torq_pos[0]; end
      `CHECK(np == 8 && torq_neg[0] == 0, $sformatf("X torqued positive %0d %b", np, torq_neg))
    end
    `FINISH
  end
endmodule
