// PIU finite state controller (Section 5.3, Figure 5-1) with the F (function)
// and A (address) registers, the word count and the TIME0 timer.
//
// The controller waits in state 0 for DOT1 from the computer, then moves
// along one of the paths of the document's state space, one transition per
// 900 ns controller tick (fsm_tick):
//   IMU write : 0-14-11-12-2-6-4-6 ... -16-0
//   IMU read  : 0-14-11-12-2-6-4-5-15-1-3-1-3 ... -0
//   FIFO test : as IMU read but 5-1 (no bus transmission), F TEST bit set
//   HP write  : 0-14-11-13-10-12-2-6-4-6 ... -0, TIME0 error returns 10-0, 4-0
// States that move a word between computer and PIU issue one ECO/ECI
// request (io_start, io_eci, io_addr, addresses relative to 0800 hex) on
// entry and leave at the first tick after the computer's ACK (io_ack).
// Other states leave on the tick once their condition holds.
// The word count (F bits 1-8) is two's complement and is incremented toward
// zero in states 4 and 1, as is A. The HP read path, which the document says
// was not built into the delivered unit, is not built here: READ with the HP
// address returns to state 0. ABORT forces state 0 and pulses DINT3.
// TIME0 fires when the HP2116B has not answered HPFLAG with CMD within
// TIMEOUT clocks; the error return raises err_timeout until the next DOT1.
// The F bit positions of TEST and SYNC, the timeout value and the handshake
// (one-cycle start and ACK pulses) are this design's choice.
module piu_controller
  import imu_bus_pkg::*;
#(
  parameter int unsigned TIMEOUT = 10000   // TIME0 after 1 ms at 10 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fsm_tick,
  input  logic        abort,
  input  logic        dot1,
  // computer parallel I/O (ECO: computer -> PIU, ECI: PIU -> computer)
  output logic        io_start,
  output logic        io_eci,
  output word_t       io_addr,
  input  logic        io_ack,
  input  word_t       io_dout,
  output word_t       io_din,
  // FIFO
  output logic        fifo_wr,
  output word_t       fifo_wdata,
  output logic        fifo_rd,
  output logic        fifo_clear,
  input  word_t       fifo_rdata,
  input  logic        emp1,
  input  logic        ful3,
  input  logic        allemp,       // FIFO and transmitter both empty
  // data bus terminal
  output logic        tx_start,
  output logic [1:0]  tx_addr,
  output logic        tx_sync,
  // HP2116B parallel bus
  output logic        hp_flag,
  output word_t       hp_data,
  input  logic        hp_cmd,
  // status
  output logic        err_timeout,
  output logic        dint3,
  output piu_state_e  state,
  output word_t       f_reg,
  output word_t       a_reg
);
  piu_state_e nxt;
  logic       entered, ack_seen, cmd_seen, dot1_q, dot1_seen;
  logic       hp_pending, time0;
  logic [7:0] wc;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;

  logic is_hp, is_write, is_test;
  assign is_hp    = (f_reg[F_ADDR_HI:F_ADDR_LO] == ADDR_HP);
  assign is_write = f_reg[F_WRITE];
  assign is_test  = f_reg[F_TEST];
  assign tx_addr  = f_reg[F_ADDR_HI:F_ADDR_LO];
  assign tx_sync  = f_reg[F_SYNC];
  assign time0    = hp_pending && (tcnt == ($clog2(TIMEOUT+1))'(TIMEOUT));

  // ---- entry actions ----
  always_comb begin
    io_start = 1'b0;
    io_eci   = 1'b0;
    io_addr  = a_reg;
    unique case (state)
      ST_LOAD_F, ST_HP_F: io_addr = 16'd0;
      ST_LOAD_A:          io_addr = 16'd1;
      default:            io_addr = a_reg;
    endcase
    if (entered) begin
      unique case (state)
        ST_LOAD_F, ST_LOAD_A, ST_HP_F, ST_ECO_DATA, ST_ECO_C: io_start = 1'b1;
        ST_ECI: begin io_start = 1'b1; io_eci = 1'b1; end
        default: ;
      endcase
    end
    if (state == ST_ECI) io_eci = 1'b1;
    tx_start = entered && (state == ST_TX_READ || state == ST_TX_WRITE);
    io_din   = fifo_rdata;
  end

  // ---- data movement at ACK ----
  always_comb begin
    fifo_wr    = 1'b0;
    fifo_wdata = io_dout;
    fifo_rd    = 1'b0;
    hp_flag    = 1'b0;
    hp_data    = io_dout;
    if (io_ack) begin
      unique case (state)
        ST_ECO_DATA: if (is_hp) hp_flag = 1'b1; else fifo_wr = 1'b1;
        ST_ECO_C:    fifo_wr = 1'b1;
        ST_HP_F:     begin hp_flag = 1'b1; hp_data = io_dout; end
        ST_ECI:      fifo_rd = 1'b1;
        default: ;
      endcase
    end
  end

  // ---- next state, evaluated on the 900 ns tick ----
  always_comb begin
    nxt = state;
    unique case (state)
      ST_IDLE:     if (dot1_seen) nxt = ST_LOAD_F;
      ST_LOAD_F:   if (ack_seen)  nxt = ST_ADDR;
      ST_ADDR:     nxt = is_hp ? ST_HP_F : ST_LOAD_A;
      ST_HP_F:     if (ack_seen)  nxt = ST_HP_WAIT;
      ST_HP_WAIT:  if (time0) nxt = ST_IDLE; else if (cmd_seen) nxt = ST_LOAD_A;
      ST_LOAD_A:   if (ack_seen)  nxt = ST_DECIDE;
      ST_DECIDE:   nxt = (is_write || !is_hp) ? ST_ECO_DATA : ST_IDLE;
      ST_ECO_DATA: if (ack_seen) begin
                     if (is_hp) nxt = (wc == 8'd0) ? ST_IDLE : ST_INC;
                     else       nxt = (wc == 8'd0) ? ST_TX_WRITE : ST_INC;
                   end
      ST_INC:      if (is_hp) nxt = time0 ? ST_IDLE : ST_ECO_DATA;
                   else if (emp1 && !entered) nxt = is_write ? ST_ECO_DATA : ST_ECO_C;
      ST_ECO_C:    if (ack_seen) nxt = is_test ? ST_RD_WAIT : ST_TX_READ;
      ST_TX_READ:  if (allemp && !entered) nxt = ST_RD_WAIT;
      ST_TX_WRITE: if (allemp && !entered) nxt = ST_IDLE;
      ST_RD_WAIT:  if (ful3) nxt = ST_ECI;
      ST_ECI:      if (ack_seen) nxt = (wc != 8'd0) ? ST_RD_WAIT : ST_IDLE;
      default:     nxt = ST_IDLE;
    endcase
  end

  assign fifo_clear = abort;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE; entered <= 1'b0; ack_seen <= 1'b0; cmd_seen <= 1'b0;
      dot1_q <= 1'b0; dot1_seen <= 1'b0; hp_pending <= 1'b0; tcnt <= '0;
      wc <= '0; f_reg <= '0; a_reg <= '0; err_timeout <= 1'b0; dint3 <= 1'b0;
    end else begin
      dot1_q  <= dot1;
      dint3   <= 1'b0;
      entered <= 1'b0;
      if (dot1 && !dot1_q) dot1_seen <= 1'b1;
      if (io_ack) ack_seen <= 1'b1;
      if (hp_flag) cmd_seen <= 1'b0;
      else if (hp_cmd) cmd_seen <= 1'b1;
      // TIME0 timer: runs while an HPFLAG is unanswered.
      if (hp_flag) begin
        hp_pending <= 1'b1; tcnt <= '0;
      end else if (hp_cmd) begin
        hp_pending <= 1'b0; tcnt <= '0;
      end else if (hp_pending && !time0) begin
        tcnt <= tcnt + 1'b1;
      end
      // register loads at ACK
      if (io_ack && state == ST_LOAD_F) begin
        f_reg <= io_dout;
        wc    <= io_dout[7:0];
      end
      if (io_ack && state == ST_LOAD_A) a_reg <= io_dout;
      // increments on entry to states 4 and 1
      if (entered && (state == ST_INC || state == ST_RD_WAIT)) begin
        wc    <= wc + 8'd1;
        a_reg <= a_reg + 16'd1;
      end
      if (abort) begin
        state <= ST_IDLE; dint3 <= 1'b1; dot1_seen <= 1'b0;
        ack_seen <= 1'b0; cmd_seen <= 1'b0; hp_pending <= 1'b0;
      end else if (fsm_tick && nxt != state) begin
        state    <= nxt;
        entered  <= 1'b1;
        ack_seen <= 1'b0;
        if (state == ST_IDLE) begin
          dot1_seen   <= 1'b0;
          err_timeout <= 1'b0;
        end
        if (nxt == ST_IDLE && time0) err_timeout <= 1'b1;
      end
    end
  end
endmodule
