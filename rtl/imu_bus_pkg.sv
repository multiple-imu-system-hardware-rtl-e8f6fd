// Shared types and constants of the multiple-IMU data bus system.
//
// The PIU (processor interface unit) and the three IUs (interface units)
// talk over a 10 MHz serial bus. Every bus function (transmit clock,
// transmit data, read clock, read data) is a bipolar pair; in this RTL a pair
// is carried as the two logic lines that drive (or come out of) the pulse
// transformer: p = positive-going pulse, n = negative-going pulse. One bit
// cell is one period of the 10 MHz system clock.
//
// A bus word is 18 cells: a lead bit, 16 data bits sent MSB first and a
// parity bit. Word layout follows the document; the lead bit value (always 1)
// and the parity sense (odd over the 16 data bits) are this design's choice.
// Bit numbers in the document run 1 (LSB) to 16 (MSB); bit n is index n-1.
package imu_bus_pkg;

  localparam int unsigned WORD_W         = 16;
  localparam int unsigned CELLS_PER_WORD = 18;   // lead + 16 data + parity
  localparam int unsigned PH_LEAD        = 0;    // LTIME
  localparam int unsigned PH_PARITY      = 17;   // PTIME

  typedef logic [WORD_W-1:0] word_t;

  // One transformer-coupled line as its two drive/comparator signals.
  typedef struct packed {
    logic p;
    logic n;
  } ami_pair_t;

  // One direction of a data bus: clock pair and data pair.
  typedef struct packed {
    ami_pair_t clk;
    ami_pair_t data;
  } bus_dir_t;

  // Odd parity bit over the 16 data bits.
  function automatic logic parity_bit(input word_t d);
    return ~(^d);
  endfunction

  // ---------------- F register (function word from the computer) ----------
  localparam int unsigned F_ADDR_HI = 15;  // bits 16,15: bus address
  localparam int unsigned F_ADDR_LO = 14;
  localparam int unsigned F_WRITE   = 13;  // bit 14: 1 = WRITE, 0 = READ
  localparam int unsigned F_TEST    = 12;  // bit 13: PIU TEST (assumed position)
  localparam int unsigned F_SYNC    = 11;  // bit 12: SYNC    (assumed position)
  // bits 1-8 (index 7:0): word count, two's complement, counted up to zero

  // Bus addresses in F bits 16,15.
  localparam logic [1:0] ADDR_HP = 2'b00;

  // ---------------- B word (function word to an IU), Table 7-1 ------------
  localparam int unsigned B_TAG_HI = 15;   // bits 16,15 = 10: this is a B word
  localparam int unsigned B_TAG_LO = 14;
  localparam int unsigned B_SYNC   = 11;   // bit 12: sync (RAU)
  localparam int unsigned B_READ   = 10;   // bit 11: 1 = read demand
  localparam int unsigned B_WC_HI  = 9;    // bits 10-8: word count incl. C
  localparam int unsigned B_WC_LO  = 7;
  // bits 2,1 (index 1:0): register group address

  localparam logic [1:0] GRP_ACCEL  = 2'b01;  // read: DAX DAY DAZ / write: D1
  localparam logic [1:0] GRP_STATUS = 2'b10;  // read: DSTATUS     / write: D2
  localparam logic [1:0] GRP_SD     = 2'b11;  // read: DSD1 DSD2 DSD3

  // ---------------- D1 register (IMU commands), Table 7-5 -----------------
  localparam int unsigned D1_RESET_FAIL   = 10;  // bit 11
  localparam int unsigned D1_RESET_PARITY = 9;   // bit 10

  // ---------------- PIU controller states (Figure 5-1 numbering) ----------
  typedef enum logic [4:0] {
    ST_IDLE     = 5'd0,
    ST_RD_WAIT  = 5'd1,   // increment, wait 3FUL
    ST_DECIDE   = 5'd2,   // examine F bit 14
    ST_ECI      = 5'd3,   // ECI to address A
    ST_INC      = 5'd4,   // increment word count and A
    ST_ECO_C    = 5'd5,   // ECO C word into FIFO
    ST_ECO_DATA = 5'd6,   // ECO at address A
    ST_HP_WAIT  = 5'd10,  // wait HPCMD
    ST_ADDR     = 5'd11,  // examine bus address
    ST_LOAD_A   = 5'd12,  // ECO to A register
    ST_HP_F     = 5'd13,  // send F word to the HP2116B
    ST_LOAD_F   = 5'd14,  // ECO to F register
    ST_TX_READ  = 5'd15,  // transmit demand, then go to 1
    ST_TX_WRITE = 5'd16   // transmit command, then go to 0
  } piu_state_e;

endpackage
