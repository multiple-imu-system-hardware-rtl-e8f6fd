// Testbench for piu_controller with testbench models of the FIFO flags, the
// transmitter, the computer and the HP2116B. For each task it records the
// sequence of states and compares it with the path of Figure 5-1: IMU write,
// IMU read, FIFO test, HP write, HP write with a TIME0 error return, and an
// ABORT. It also checks that state 4 waits while FIFO level 1 is full, that
// transitions only happen on the 900 ns tick, and the ECO/ECI addresses.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected state paths are the document's; flag and
// acknowledge timing of the models is this testbench's choice.
`include "tb/tb_check.svh"
module tb_piu_controller;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fsm_tick = 0, abort = 0, dot1 = 0;
  logic io_start, io_eci, io_ack = 0, fifo_wr, fifo_rd, fifo_clear;
  word_t io_addr, io_dout = 0, io_din, fifo_wdata, fifo_rdata, hp_data, f_reg, a_reg;
  logic emp1 = 1, ful3 = 0, allemp = 1;
  logic tx_start, tx_sync, hp_flag, hp_cmd = 0, err_timeout, dint3;
  logic [1:0] tx_addr;
  piu_state_e state;
  piu_controller #(.TIMEOUT(2000)) dut (.*);
  always #50 clk = !clk;
  initial begin #20000000; failures++; $display("watchdog"); `FINISH end

  // 900 ns tick: one clock in nine, changed between rising edges
  int cyc = 0;
  logic tick_seen = 0;
  always @(negedge clk) begin cyc++; fsm_tick = (cyc % 9 == 0); end
  always @(posedge clk) tick_seen = fsm_tick;

  // path recorder and tick check
  int path [$];
  piu_state_e prev = ST_IDLE;
  always @(negedge clk) begin
    if (state != prev) begin
      path.push_back(int'(state));
      `CHECK(tick_seen, "state change only on the 900 ns tick")
    end
    prev = state;
  end

  // computer model
  word_t mem [0:63];
  word_t eco_addrs [$];
  always @(posedge clk) if (io_start) begin
    automatic logic e = io_eci; automatic word_t a = io_addr;
    if (!e) eco_addrs.push_back(a);
    fork begin
      repeat (30) @(negedge clk);
      if (e) mem[a[5:0]] = io_din; else io_dout = mem[a[5:0]];
      io_ack = 1; @(negedge clk); io_ack = 0;
    end join_none
  end
  // FIFO model (queue), level-1 hold time programmable to force a 1EMP wait
  word_t fq [$]; int hold_l1 = 1; int l1_timer = 0;
  always @(posedge clk) begin
    if (fifo_wr) begin fq.push_back(fifo_wdata); l1_timer = hold_l1; end
    else if (l1_timer > 0) l1_timer--;
    if (fifo_rd && fq.size() > 0) void'(fq.pop_front());
  end
  always @(negedge clk) begin
    emp1 = (l1_timer == 0);
    ful3 = fq.size() > 0 && l1_timer == 0;
    fifo_rdata = fq.size() > 0 ? fq[0] : '0;
    allemp = fq.size() == 0 && !tx_busy;
  end
  // transmitter model: drains the FIFO some time after tx_start, then
  // (for a read) loads reply words
  logic tx_busy = 0; int reply_words = 0;
  always @(posedge clk) if (tx_start) fork begin
    tx_busy = 1;
    repeat (18 * fq.size() + 18) @(negedge clk);
    fq.delete(); tx_busy = 0;
    for (int i = 0; i < reply_words; i++) begin repeat (18) @(negedge clk); fq.push_back(16'hD000 + 16'(i)); end
  end join_none
  // HP model
  logic hp_on = 1; word_t hp_got [$];
  always @(posedge clk) if (hp_flag) begin
    hp_got.push_back(hp_data);
    if (hp_on) fork begin repeat (20) @(negedge clk); hp_cmd = 1; @(negedge clk); hp_cmd = 0; end join_none
  end

  function automatic word_t fw(logic [1:0] a, logic wr, logic test, int wc);
    return {a, wr, test, 1'b0, 3'b0, 8'(-wc)};
  endfunction
  task automatic run(input word_t f, input word_t a);
    int n = 0;
    mem[0] = f; mem[1] = a; path.delete(); eco_addrs.delete();
    @(negedge clk); dot1 = 1; @(negedge clk); dot1 = 0;
    while (state == ST_IDLE && n < 50) begin @(negedge clk); n++; end
    while (state != ST_IDLE && n < 100000) begin @(negedge clk); n++; end
    repeat (5) @(negedge clk);
  endtask
  function automatic string p2s(); string s = ""; foreach (path[i]) s = {s, $sformatf("%0d ", path[i])}; return s; endfunction

  initial begin
    int expw [$], expr [$];
    repeat (3) @(negedge clk); rst_n = 1;
    // IMU write, 3 words
    mem[8] = 16'h8181; mem[9] = 16'h1111; mem[10] = 16'h0055;
    run(fw(2'b01, 1, 0, 2), 8);
    expw = '{14, 11, 12, 2, 6, 4, 6, 4, 6, 16, 0};
    `CHECK(path == expw, {"IMU write path: ", p2s()})
    `CHECK(eco_addrs.size() == 5 && eco_addrs[0] == 0 && eco_addrs[1] == 1 && eco_addrs[2] == 8 && eco_addrs[4] == 10, "ECO addresses")
    `CHECK(tx_addr == 2'b01, "bus address")
    // same with level 1 held full: state 4 must wait for 1EMP
    hold_l1 = 600;
    run(fw(2'b01, 1, 0, 2), 8);
    `CHECK(path == expw, "IMU write path with slow FIFO")
    hold_l1 = 1;
    // IMU read: B C out, 4 words back
    reply_words = 4; mem[8] = 16'h8A01; mem[9] = 16'h0055;
    run(fw(2'b11, 0, 0, 5), 8);
    expr = '{14, 11, 12, 2, 6, 4, 5, 15, 1, 3, 1, 3, 1, 3, 1, 3, 0};
    `CHECK(path == expr, {"IMU read path: ", p2s()})
    `CHECK(mem[10] == 16'hD000 && mem[13] == 16'hD003, "ECI stores reply words at A+2..")
    reply_words = 0;
    // FIFO test
    mem[8] = 16'h1357; mem[9] = 16'h2468; mem[10] = 0; mem[11] = 0;
    run({2'b01, 1'b0, 1'b1, 1'b0, 3'b0, 8'(-3)}, 8);
    expr = '{14, 11, 12, 2, 6, 4, 5, 1, 3, 1, 3, 0};
    `CHECK(path == expr, {"FIFO test path: ", p2s()})
    `CHECK(mem[10] == 16'h1357 && mem[11] == 16'h2468, "FIFO test data")
    // HP write, 3 data words
    hp_got.delete(); mem[20] = 16'hAAA0; mem[21] = 16'hAAA1; mem[22] = 16'hAAA2;
    run(fw(2'b00, 1, 0, 2), 20);
    expw = '{14, 11, 13, 10, 12, 2, 6, 4, 6, 4, 6, 0};
    `CHECK(path == expw, {"HP write path: ", p2s()})
    `CHECK(hp_got.size() == 4 && hp_got[1] == 16'hAAA0 && hp_got[3] == 16'hAAA2, "HP data")
    `CHECK(!err_timeout, "no error")
    // HP not answering: error return from 10
    hp_on = 0;
    run(fw(2'b00, 1, 0, 2), 20);
    expw = '{14, 11, 13, 10, 0};
    `CHECK(path == expw, {"TIME0 path: ", p2s()})
    `CHECK(err_timeout, "TIME0 error discrete")
    hp_on = 1;
    // ABORT
    mem[0] = fw(2'b01, 1, 0, 2); mem[1] = 8;
    @(negedge clk); dot1 = 1; @(negedge clk); dot1 = 0;
    repeat (100) @(negedge clk);
    abort = 1; #1 `CHECK(fifo_clear, "ABORT clears the FIFO"); @(negedge clk); abort = 0;
    `CHECK(state == ST_IDLE && dint3, "ABORT to state 0 with DINT3")
    `FINISH
  end
endmodule
