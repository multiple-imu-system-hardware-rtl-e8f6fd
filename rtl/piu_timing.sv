// PIU master timing (Section 5.1).
//
// The 10 MHz master oscillator is the clock input. A 9-bit Johnson counter
// gives the 18 bit-cell phases of a 1.8 us bus word. The finite state
// controller's 900 ns clock is a one-cycle tick at phases 0 and 9. A
// countdown chain divides the 10 MHz clock to the 400 Hz system sync line
// that times every IU's GYPTO logic, and that by 8 to the 50 Hz minor cycle
// interrupt of the computer. Using enables on the one 10 MHz clock instead
// of separate clocks is this design's choice.
//
// Outputs are one-cycle pulses except phase.
module piu_timing #(
  parameter int unsigned DIV_400HZ = 25000,  // 10 MHz / 400 Hz
  parameter int unsigned DIV_50HZ  = 8       // 400 Hz / 50 Hz
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [4:0] phase,       // bus cell 0..17
  output logic       fsm_tick,    // 900 ns controller clock
  output logic       sync_400hz,  // GYPTO sync line to the IUs
  output logic       minor_cycle  // 50 Hz minor cycle to the computer / SSCMS
);
  logic [8:0] ring;
  logic [$clog2(DIV_400HZ)-1:0] cnt400;
  logic [$clog2(DIV_50HZ+1)-1:0] cnt50;

  johnson_counter #(.N(9)) u_ring (
    .clk, .rst_n, .en(1'b1), .clr(1'b0), .q(ring), .idx(phase)
  );

  assign fsm_tick = (phase == 5'd0) || (phase == 5'd9);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt400 <= '0; cnt50 <= '0; sync_400hz <= 1'b0; minor_cycle <= 1'b0;
    end else begin
      sync_400hz  <= 1'b0;
      minor_cycle <= 1'b0;
      if (cnt400 == ($clog2(DIV_400HZ))'(DIV_400HZ - 1)) begin
        cnt400     <= '0;
        sync_400hz <= 1'b1;
        if (cnt50 == ($clog2(DIV_50HZ+1))'(DIV_50HZ - 1)) begin
          cnt50       <= '0;
          minor_cycle <= 1'b1;
        end else begin
          cnt50 <= cnt50 + 1'b1;
        end
      end else begin
        cnt400 <= cnt400 + 1'b1;
      end
    end
  end
endmodule
