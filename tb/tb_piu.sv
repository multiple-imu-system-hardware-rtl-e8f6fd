// Testbench for the PIU alone, with short timers. A computer model answers
// ECO/ECI; testbench IU models decode the downlink of each bus (transmit
// clock with its one-cell message sync, AMI data) and, for demands, reply on
// the read pairs. Checks: a command reaches only the addressed bus, preceded
// by exactly one clockless cell, with no gap between words; the clock keeps
// running on the other buses; a sync command goes to all three buses; a
// demand's reply words land in computer memory; a reply with a parity error
// raises IPE2; the 400 Hz and 50 Hz outputs run.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The message form and routing follow the document; the
// clockless sync cell and the reply timing are this design's reading.
`include "tb/tb_check.svh"
module tb_piu;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, abort = 0, dot1 = 0, io_start, io_eci, io_ack = 0;
  word_t io_addr, io_dout = 0, io_din, hp_data;
  logic hp_flag, hp_cmd = 0, err_timeout, dint3, ipe2, rx_overrun, sync_400hz, minor_cycle;
  bus_dir_t bus_dn [3], bus_up [3];
  piu_state_e state;
  piu #(.DIV_400HZ(100), .DIV_50HZ(8), .TIMEOUT(500)) dut (.*);
  always #50 clk = !clk;
  initial begin #20000000; failures++; $display("watchdog"); `FINISH end

  word_t mem [0:63];
  always @(posedge clk) if (io_start) begin
    automatic logic e = io_eci; automatic word_t a = io_addr;
    fork begin
      repeat (40) @(negedge clk);
      if (e) mem[a[5:0]] = io_din; else io_dout = mem[a[5:0]];
      io_ack = 1; @(negedge clk); io_ack = 0;
    end join_none
  end

  // downlink decoders, one per bus, sampled mid-cell
  word_t rxw [3][$]; int gaps [3]; int ncell [3]; logic [17:0] sh [3];
  int word_start_cyc [3][$]; int cyc = 0; int nsync = 0, nminor = 0;
  logic reply_bad = 0; int reply_n = 0; logic reply_go = 0;
  always @(negedge clk) begin
    cyc++;
    nsync += sync_400hz; nminor += minor_cycle;
    for (int i = 0; i < 3; i++) begin
      logic on, b;
      on = bus_dn[i].clk.p | bus_dn[i].clk.n; b = bus_dn[i].data.p | bus_dn[i].data.n;
      if (!on) begin gaps[i]++; ncell[i] = 0; `CHECK(!b, "no data in the sync cell") end
      else begin
        sh[i] = {sh[i][16:0], b};
        if (ncell[i] == 0 && b) word_start_cyc[i].push_back(cyc);
        if (ncell[i] == 0 && !b) ncell[i] = 0;   // idle slot
        else ncell[i]++;
        if (ncell[i] == 18) begin
          `CHECK(^sh[i][16:0] == 1'b1, "downlink parity")
          rxw[i].push_back(sh[i][16:1]); ncell[i] = 0;
          if (i == 0 && rxw[0].size() >= 2 && rxw[0][rxw[0].size()-2][B_READ]) reply_go = 1;
        end
      end
    end
  end

  // IU 1 reply model: words right after the C word of a demand
  logic rpol = 0, dpol = 0;
  initial begin
    for (int i = 0; i < 3; i++) bus_up[i] = '0;
    forever begin
      @(negedge clk);
      if (reply_go) begin
        reply_go = 0;
        for (int w = 0; w < 3; w++) begin
          word_t d; logic [17:0] bits;
          d = (w == 2) ? 16'h0055 : 16'hC0D0 + 16'(w);
          bits = {1'b1, d, parity_bit(d) ^ (reply_bad && w == 1)};
          for (int c = 17; c >= 0; c--) begin
            bus_up[0].clk.p = !rpol; bus_up[0].clk.n = rpol; rpol = !rpol;
            bus_up[0].data.p = bits[c] && !dpol; bus_up[0].data.n = bits[c] && dpol;
            if (bits[c]) dpol = !dpol;
            @(negedge clk);
          end
        end
        bus_up[0] = '0; reply_n++;
      end
    end
  end

  task automatic run(input word_t f, input word_t a);
    int n = 0;
    mem[0] = f; mem[1] = a;
    @(negedge clk); dot1 = 1; @(negedge clk); dot1 = 0;
    while (state == ST_IDLE && n < 50) begin @(negedge clk); n++; end
    while (state != ST_IDLE && n < 50000) begin @(negedge clk); n++; end
    repeat (40) @(negedge clk);
  endtask

  initial begin
    int g0 [3];
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (30) @(negedge clk);
    `CHECK(gaps[0] == 0 && gaps[1] == 0 && gaps[2] == 0, "transmit clocks run while idle")
    // command to IMU2: B D2 C
    mem[8] = 16'b10_00_0_0_011_00000_10; mem[9] = 16'h1234; mem[10] = 16'h0055;
    run({2'b10, 1'b1, 3'b000, 2'b00, 8'(-2)}, 8);
    `CHECK(rxw[1].size() == 3 && rxw[1][0] == mem[8] && rxw[1][1] == 16'h1234 && rxw[1][2] == 16'h0055, "command words on bus 2")
    `CHECK(rxw[0].size() == 0 && rxw[2].size() == 0, "nothing on buses 1 and 3")
    `CHECK(gaps[1] == 1 && gaps[0] == 0 && gaps[2] == 0, "one message sync on bus 2 only")
    `CHECK(word_start_cyc[1].size() == 3 && word_start_cyc[1][1] - word_start_cyc[1][0] == 18
           && word_start_cyc[1][2] - word_start_cyc[1][1] == 18, "words back to back")
    // sync command: broadcast
    mem[8] = 16'b10_00_1_0_010_00000_00; mem[9] = 16'h0055;
    for (int i = 0; i < 3; i++) rxw[i].delete();
    run({2'b01, 1'b1, 1'b0, 1'b1, 3'b000, 8'(-1)}, 8);
    `CHECK(rxw[0].size() == 2 && rxw[1].size() == 2 && rxw[2].size() == 2 && rxw[2][0] == mem[8], "sync command on all buses")
    // demand to IMU1, 3 words back
    for (int i = 0; i < 3; i++) rxw[i].delete();
    mem[8] = 16'b10_00_0_1_011_00000_01; mem[9] = 16'h0055;
    run({2'b01, 1'b0, 3'b000, 2'b00, 8'(-4)}, 8);
    `CHECK(reply_n == 1, "IU model replied")
    `CHECK(mem[10] == 16'hC0D0 && mem[11] == 16'hC0D1 && mem[12] == 16'h0055, "reply words stored by ECI")
    `CHECK(!ipe2, "no parity error")
    // demand with a corrupted reply word
    reply_bad = 1; for (int i = 0; i < 3; i++) rxw[i].delete();
    fork run({2'b01, 1'b0, 3'b000, 2'b00, 8'(-4)}, 8); join_none
    wait (reply_n == 2); repeat (100) @(negedge clk);
    `CHECK(ipe2, "IPE2 on reply parity error")
    abort = 1; @(negedge clk); abort = 0; repeat (50) @(negedge clk);
    `CHECK(state == ST_IDLE, "abort")
    `CHECK(nsync > 10 && nminor > 1, "timing outputs")
    `FINISH
  end
endmodule
