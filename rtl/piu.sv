// Processor interface unit (Chapter 5, Figure A-2).
//
// The PIU sits between the 4pi-CP2 computer's parallel I/O and four bus
// addresses: three IUs on 10 MHz serial data buses and the HP2116B on a
// parallel bus. It holds the master timing (piu_timing), the finite state
// controller with F and A registers (piu_controller), the three-word FIFO
// (piu_fifo) and one data bus terminal that feeds all three buses.
//
// Transmit: when the controller starts a transfer, the terminal waits for
// the last cell of a word slot, suppresses the transmit clock for that one
// cell on the addressed bus (message sync) and then sends the FIFO's words
// back to back (bus_word_tx) until the FIFO is empty. F bits 16,15 pick the
// bus; with the F SYNC bit set the message goes to all three buses (the sync
// command RAU is addressed to every IU). The transmit clock pairs run in
// every other cell. Receive: the addressed bus's read pair feeds bus_word_rx;
// each good word waits in a one-word holding register until FIFO level 1 is
// empty, so a four-word reply fits in FIFO plus holding register. A parity
// or lead-bit error sets the IPE2 discrete until the next DOT1. Broadcasting
// sync messages, the holding register and IPE2 clearing are this design's
// choices.
module piu
  import imu_bus_pkg::*;
#(
  parameter int unsigned DIV_400HZ = 25000,
  parameter int unsigned DIV_50HZ  = 8,
  parameter int unsigned TIMEOUT   = 10000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       abort,
  input  logic       dot1,
  output logic       io_start,
  output logic       io_eci,
  output word_t      io_addr,
  input  logic       io_ack,
  input  word_t      io_dout,
  output word_t      io_din,
  output logic       hp_flag,
  output word_t      hp_data,
  input  logic       hp_cmd,
  output logic       err_timeout,
  output logic       dint3,
  output logic       ipe2,
  output logic       rx_overrun,
  output logic       sync_400hz,
  output logic       minor_cycle,
  output bus_dir_t   bus_dn [3],
  input  bus_dir_t   bus_up [3],
  output piu_state_e state
);
  logic [4:0] phase;
  logic       fsm_tick;
  logic       c_fifo_wr, fifo_rd, fifo_clear, emp1, ful3, fifo_allemp, overflow;
  logic       c_fifo_rd, tx_take;
  word_t      c_fifo_wdata, fifo_rdata;
  logic       tx_start, tx_sync;
  logic [1:0] tx_addr;
  logic       tx_req, tx_run, tx_active, gap_cell, tx_busy;
  logic [1:0] tx_addr_q;
  logic       tx_sync_q;
  ami_pair_t  tx_line;
  logic [2:0] clk_pol;
  word_t      f_reg, a_reg;
  bus_dir_t   rx_bus;
  logic       rx_valid, rx_perr, rx_lerr;
  word_t      rx_word, hold_word;
  logic       hold_full, hold_wr, dot1_q;

  piu_timing #(.DIV_400HZ(DIV_400HZ), .DIV_50HZ(DIV_50HZ)) u_timing (
    .clk, .rst_n, .phase, .fsm_tick, .sync_400hz, .minor_cycle
  );

  piu_controller #(.TIMEOUT(TIMEOUT)) u_ctrl (
    .clk, .rst_n, .fsm_tick, .abort, .dot1,
    .io_start, .io_eci, .io_addr, .io_ack, .io_dout, .io_din,
    .fifo_wr(c_fifo_wr), .fifo_wdata(c_fifo_wdata), .fifo_rd(c_fifo_rd),
    .fifo_clear, .fifo_rdata, .emp1, .ful3, .allemp(fifo_allemp && !tx_busy),
    .tx_start, .tx_addr, .tx_sync, .hp_flag, .hp_data, .hp_cmd,
    .err_timeout, .dint3, .state, .f_reg, .a_reg
  );

  // received words enter the FIFO when the controller is not writing it
  assign hold_wr = hold_full && emp1 && !c_fifo_wr;
  assign fifo_rd = c_fifo_rd || tx_take;

  piu_fifo #(.W(WORD_W), .DEPTH(3)) u_fifo (
    .clk, .rst_n, .clear(fifo_clear),
    .wr_en(c_fifo_wr || hold_wr), .wr_data(c_fifo_wr ? c_fifo_wdata : hold_word),
    .rd_en(fifo_rd), .rd_data(fifo_rdata),
    .emp1, .ful3, .allemp(fifo_allemp), .overflow
  );

  // ---------------- transmit side of the bus terminal ----------------
  assign gap_cell = tx_req && (phase == 5'(PH_PARITY));
  assign tx_busy  = tx_req || tx_run || tx_active;

  bus_word_tx u_tx (
    .clk, .rst_n, .cell_en(1'b1), .phase,
    .word_valid((tx_req || tx_run) && ful3), .word(fifo_rdata),
    .word_take(tx_take), .active(tx_active), .bit_out(), .line(tx_line)
  );

  always_comb begin
    for (int i = 0; i < 3; i++) begin
      logic sel, clk_on;
      sel    = tx_sync_q || (tx_addr_q == 2'(i + 1));
      clk_on = !(gap_cell && sel);
      bus_dn[i].clk.p  = clk_on && !clk_pol[i];
      bus_dn[i].clk.n  = clk_on &&  clk_pol[i];
      bus_dn[i].data.p = sel && tx_line.p;
      bus_dn[i].data.n = sel && tx_line.n;
    end
  end

  // ---------------- receive side of the bus terminal ----------------
  always_comb begin
    rx_bus = '0;
    for (int i = 0; i < 3; i++)
      if (tx_addr == 2'(i + 1)) rx_bus = bus_up[i];
  end

  bus_word_rx u_rx (
    .clk, .rst_n, .bus(rx_bus), .word_valid(rx_valid), .word(rx_word),
    .parity_err(rx_perr), .lead_err(rx_lerr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_req <= 1'b0; tx_run <= 1'b0; tx_addr_q <= '0; tx_sync_q <= 1'b0;
      clk_pol <= '0; hold_full <= 1'b0; hold_word <= '0; ipe2 <= 1'b0;
      rx_overrun <= 1'b0; dot1_q <= 1'b0;
    end else begin
      dot1_q <= dot1;
      for (int i = 0; i < 3; i++)
        if (bus_dn[i].clk.p || bus_dn[i].clk.n) clk_pol[i] <= !clk_pol[i];
      if (tx_start) begin
        tx_req    <= 1'b1;
        tx_addr_q <= tx_addr;
        tx_sync_q <= tx_sync;
      end else if (gap_cell) begin
        tx_req <= 1'b0;
        tx_run <= 1'b1;
      end else if (tx_run && phase == 5'(PH_PARITY) && !ful3) begin
        tx_run <= 1'b0;
      end
      if (hold_wr) hold_full <= 1'b0;
      if (rx_valid) begin
        if (rx_perr || rx_lerr) ipe2 <= 1'b1;
        else if (hold_full && !hold_wr) rx_overrun <= 1'b1;
        else begin
          hold_full <= 1'b1;
          hold_word <= rx_word;
        end
      end
      if (dot1 && !dot1_q) begin ipe2 <= 1'b0; rx_overrun <= 1'b0; end
      if (abort) begin
        tx_req <= 1'b0; tx_run <= 1'b0; hold_full <= 1'b0;
      end
    end
  end
endmodule
