// IU bus gating time generator (Section 7.11, Figure 7-6).
//
// The transmit clock from the PIU is always present except for a missing
// cell, the message sync, just before the first word of a message. Each
// clocked cell advances a 9-bit Johnson counter (18 states, one 1.8 us word);
// a clockless cell resets it so that the next clocked cell is state 0. The
// states give LTIME (state 0, lead bit), DTIME (states 1-16, data bits MSB
// first) and PTIME (state 17, parity). The receiver OR of the data pair gives
// data_bit. Outputs are combinational from the counter and the bus lines and
// are valid in the cell they describe.
// The counter, its three decoded times and the clockless message sync follow
// the document; treating a clock mark on either line of the pair as a cell
// and sampling everything on the 10 MHz system clock are this design's choice.
module iu_bus_gating
  import imu_bus_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_dir_t bus_dn,
  output logic     cell_en,    // a transmit clock pulse is present
  output logic [4:0] phase,
  output logic     ltime,
  output logic     dtime,
  output logic     ptime,
  output logic     msg_sync,   // clockless cell
  output logic     data_bit
);
  logic [8:0] ring;

  assign cell_en  = bus_dn.clk.p | bus_dn.clk.n;
  assign msg_sync = !cell_en;
  assign data_bit = bus_dn.data.p | bus_dn.data.n;

  johnson_counter #(.N(9)) u_ring (
    .clk, .rst_n, .en(cell_en), .clr(msg_sync), .q(ring), .idx(phase)
  );

  assign ltime = cell_en && (phase == 5'(PH_LEAD));
  assign ptime = cell_en && (phase == 5'(PH_PARITY));
  assign dtime = cell_en && !ltime && !ptime;
endmodule
