// End-to-end testbench of imu_system at its default (full-size) parameters.
//
// A behavioural model of the 4pi-CP2 computer answers the PIU's ECO/ECI
// requests from a small memory (addresses relative to 0800 hex) after the
// 16.7 us transfer time and starts each task with DOT1. A model of the
// HP2116B answers each HPFLAG with CMD. The IMU side is modelled by
// accelerometer pulse sources, S/D converter outputs with a data-ready line,
// and status discretes. The test runs every controller path and checks its
// effect: IMU commands (D1) and GYPTO commands (D2) reaching the addressed
// IU, the sync command (RAU) latching accelerometer counts in all IUs,
// demands for accelerometers, status and gimbal angles returning the right
// words, the FIFO self test, an HP downlink, a TIME0 error return, and
// ABORT. Each mechanism is counted; one that never happened is a failure.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected values follow the document's message formats
// and controller paths; the computer, HP and IMU models and their delays are
// this testbench's own.
`include "tb/tb_check.svh"
module tb_imu_system;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic abort = 0, dot1 = 0, io_start, io_eci, io_ack = 0, hp_flag, hp_cmd = 0;
  word_t io_addr, io_dout = 0, io_din, hp_data;
  logic err_timeout, dint3, ipe2, rx_overrun, minor_cycle;
  piu_state_e piu_state;
  logic [2:0] dv_pos [3], dv_neg [3];
  logic [13:0] sd_in [3][3];
  logic [2:0] sd_ready [3];
  logic [2:0] system_ready = 3'b111, ims_fail = 0, ims_fail_switch = 0, ims_fault = 0, imu_bite = 0, autocal = 3'b010;
  word_t imu_cmd [3], iu_status [3];
  logic [2:0] torq_pos [3], torq_neg [3];

  imu_system dut (.*);

  always #50 clk = !clk;   // 10 MHz
  initial begin #400ms; failures++; $display("watchdog"); `FINISH end

  // ---------------- computer model ----------------
  word_t mem [0:255];
  int n_eco = 0, n_eci = 0;
  always @(posedge clk) if (io_start) begin
    automatic logic eci = io_eci;
    automatic word_t a = io_addr;
    fork begin
      repeat (167) @(negedge clk);
      if (eci) begin mem[a[7:0]] = io_din; n_eci++; end
      else     begin io_dout = mem[a[7:0]]; n_eco++; end
      io_ack = 1; @(negedge clk); io_ack = 0;
    end join_none
  end

  // ---------------- HP2116B model ----------------
  logic hp_on = 1;
  word_t hp_rx [$];
  always @(posedge clk) if (hp_flag) begin
    hp_rx.push_back(hp_data);
    if (hp_on) fork begin repeat (40) @(negedge clk); hp_cmd = 1; @(negedge clk); hp_cmd = 0; end join_none
  end

  // ---------------- IMU side models ----------------
  int acc_net [3][3];
  logic pulses_on = 0;
  for (genvar u = 0; u < 3; u++) begin : g_imu
    for (genvar a = 0; a < 3; a++) begin : g_ax
      initial begin
        dv_pos[u][a] = 0; dv_neg[u][a] = 0;
        forever begin
          repeat (300 + $urandom % 1500) @(negedge clk);
          #7;
          if (pulses_on) begin
            if ($urandom % 4 == 0) begin dv_neg[u][a] = 1; acc_net[u][a]--; end
            else begin dv_pos[u][a] = 1; acc_net[u][a]++; end
            #(100 + ($urandom % 24) * 100);
            dv_pos[u][a] = 0; dv_neg[u][a] = 0;
          end
        end
      end
      // S/D converter: angle per IMU and axis; data ready drops while it converts
      assign sd_in[u][a] = 14'(16'h1000 * (u + 1) + 16'h0111 * (a + 1));
    end
    always @(posedge clk) sd_ready[u] <= ((dut.u_piu.u_timing.cnt400 % 25000) > 300) ? 3'b111 : 3'b000;
  end

  // ---------------- mechanism counters ----------------
  int n_msg_sync = 0, n_wait_1emp = 0, n_gypto_cmd = 0, n_time0 = 0, n_abort = 0, n_minor = 0;
  int n_states [0:16];
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) if (!(dut.bus_dn[i].clk.p | dut.bus_dn[i].clk.n)) n_msg_sync++;
    // state 4 left on 1EMP (FIFO level 1 free) toward another ECO
    if (piu_state == ST_INC && dut.u_piu.fsm_tick && dut.u_piu.emp1 && !dut.u_piu.u_ctrl.entered) n_wait_1emp++;
    n_states[piu_state]++;
    n_minor += minor_cycle;
    n_abort += dint3;
  end

  // ---------------- task helpers ----------------
  localparam word_t C_W = 16'h0155;
  function automatic word_t fword(logic [1:0] addr, logic wr, logic test, logic sync, int wc);
    return {addr, wr, test, sync, 3'b000, 8'(-wc)};
  endfunction

  task automatic run_task(input word_t f, input word_t a, input int max_cycles = 200000);
    int n = 0;
    mem[0] = f; mem[1] = a;
    @(negedge clk); dot1 = 1; repeat (3) @(negedge clk); dot1 = 0;
    while (piu_state == ST_IDLE && n < 100) begin @(negedge clk); n++; end
    while (piu_state != ST_IDLE && n < max_cycles) begin @(negedge clk); n++; end
    `CHECK(n < max_cycles, $sformatf("task F=%h finished", f))
    repeat (20) @(negedge clk);
  endtask

  initial begin
    int t0, ticks;
    for (int i = 0; i < 256; i++) mem[i] = '0;
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (50) @(negedge clk);

    // ---- IMU write, D1 command to IMU1 (bus address 01) ----
    mem[16] = 16'b10_00_0_0_011_00000_01; mem[17] = 16'h4A21; mem[18] = C_W;
    run_task(fword(2'b01, 1, 0, 0, 2), 16);
    `CHECK(imu_cmd[0] == 16'h4A21, "D1 reaches IU 1")
    `CHECK(imu_cmd[1] == 0 && imu_cmd[2] == 0, "other IUs untouched")

    // ---- IMU write, D2 (GYPTO) to IMU2: X +pulse in period 1, Z -pulses in 1..4 ----
    mem[16] = 16'b10_00_0_0_011_00000_10; mem[17] = 16'b0_1_1111_0_0000_0_0001; mem[18] = C_W;
    run_task(fword(2'b10, 1, 0, 0, 2), 16);
    begin
      int netx = 0, netz = 0, nstrobe = 0;
      // observe four frames of torque senses on IMU2
      for (int k = 0; k < 16; k++) begin
        @(posedge dut.g_iu[1].u_iu.gypto_strobe); @(negedge clk); @(negedge clk);
        netx += torq_pos[1][0] ? 1 : -1;
        netz += torq_pos[1][2] ? 1 : -1;
        `CHECK(torq_neg[1][2] == 1, "Z commanded negative every period")
        nstrobe++;
      end
      `CHECK(netx >= 3 && netx <= 5, $sformatf("X: one net pulse per frame (%0d)", netx))
      n_gypto_cmd = nstrobe;
    end

    // ---- sync command (RAU), broadcast ----
    pulses_on = 1;
    repeat (40000) @(negedge clk);
    pulses_on = 0;
    repeat (3000) @(negedge clk);     // let the last pulses end
    mem[16] = 16'b10_00_1_0_010_00000_00; mem[17] = C_W;
    run_task(fword(2'b01, 1, 0, 1, 1), 16);
    // ---- read accelerometers of every IMU ----
    for (int u = 0; u < 3; u++) begin
      mem[32] = 16'b10_00_0_1_100_00000_01; mem[33] = C_W;
      run_task(fword(2'(u + 1), 0, 0, 0, 5), 32);
      for (int a = 0; a < 3; a++)
        `CHECK(mem[34 + a] == {4'b0, 12'(acc_net[u][a])},
               $sformatf("IMU%0d accel %0d: %h expected %0d", u + 1, a, mem[34 + a], acc_net[u][a]))
      `CHECK(mem[37] == C_W, "C word echoed after accelerometer data")
    end

    // ---- read status of IMU2 ----
    ims_fail_switch = 3'b010;
    mem[32] = 16'b10_00_0_1_010_00000_10; mem[33] = C_W;
    run_task(fword(2'b10, 0, 0, 0, 3), 32);
    `CHECK(mem[34] == 16'hC800 && mem[35] == C_W, $sformatf("status of IMU2 %h", mem[34]))

    // ---- read gimbal angles of IMU3 ----
    mem[32] = 16'b10_00_0_1_100_00000_11; mem[33] = C_W;
    run_task(fword(2'b11, 0, 0, 0, 5), 32);
    for (int a = 0; a < 3; a++)
      `CHECK(mem[34 + a] == {14'(16'h3000 + 16'h0111 * (a + 1)), 2'b00}, $sformatf("IMU3 S/D %0d", a))

    // ---- FIFO test ----
    mem[48] = 16'hBEEF; mem[49] = 16'h1234;
    run_task(fword(2'b01, 0, 1, 0, 3), 48);
    `CHECK(mem[50] == 16'hBEEF && mem[51] == 16'h1234, "FIFO test returns the words in order")

    // ---- HP write (downlink), 4 words ----
    hp_rx.delete();
    for (int i = 0; i < 4; i++) mem[64 + i] = 16'hA000 + 16'(i);
    run_task(fword(2'b00, 1, 0, 0, 3), 64);
    `CHECK(hp_rx.size() == 5 && hp_rx[0] == fword(2'b00, 1, 0, 0, 3) && hp_rx[4] == 16'hA003, "HP receives F then the data")
    `CHECK(!err_timeout, "no time-out")

    // ---- HP off: TIME0 error return ----
    hp_on = 0;
    run_task(fword(2'b00, 1, 0, 0, 3), 64);
    `CHECK(err_timeout, "TIME0 error return")
    n_time0 += err_timeout;
    hp_on = 1;

    // ---- ABORT during a demand ----
    mem[0] = fword(2'b01, 0, 0, 0, 5); mem[1] = 32;
    @(negedge clk); dot1 = 1; repeat (3) @(negedge clk); dot1 = 0;
    repeat (400) @(negedge clk);
    abort = 1; @(negedge clk); abort = 0; @(negedge clk);
    `CHECK(piu_state == ST_IDLE, "ABORT returns to state 0")
    repeat (2000) @(negedge clk);

    // ---- 50 Hz minor cycle ----
    `CHECK(n_minor >= 2, "minor cycle interrupts")

    // ---- mechanisms ----
    `CHECK(n_msg_sync > 0, "message sync happened")
    `CHECK(n_wait_1emp > 0, "controller passed 1EMP")
    `CHECK(n_gypto_cmd > 0, "GYPTO commands drove torquing")
    `CHECK(n_time0 > 0, "TIME0 happened")
    `CHECK(n_abort > 0, "ABORT happened")
    `CHECK(n_eci > 0 && n_eco > 0, "ECO and ECI transfers")
    foreach (n_states[s]) if (s inside {0,1,2,3,4,5,6,10,11,12,13,14,15,16})
      `CHECK(n_states[s] > 0, $sformatf("state %0d visited", s))
    `CHECK(!ipe2 && !rx_overrun, "no receive errors")
    $display("mechanisms: msg_sync=%0d wait_1emp=%0d gypto=%0d time0=%0d abort=%0d eco=%0d eci=%0d minor=%0d",
             n_msg_sync, n_wait_1emp, n_gypto_cmd, n_time0, n_abort, n_eco, n_eci, n_minor);
    `FINISH
  end
endmodule
