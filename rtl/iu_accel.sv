// IU accelerometer pulse processing, three axes (Sections 7.9, 7.11,
// Figure 7-5).
//
// Each axis has separate positive and negative CAPRI pulse lines carrying
// asynchronous pulses (1-25 us long, at most 10^4 per second). A two-flop
// synchroniser and edge detector marks a pending up or down pulse. A
// four-phase clock ACLK0-ACLK3, each phase ACLK_CYCLES long (0.5 us), is
// generated from the system clock. At ACLK0 pending pulses are counted into
// a 12-bit up/down counter. A sync command (RAU) raises an update request;
// at the next ACLK1 it is accepted (busy), at ACLK2 the counters are copied
// to the output registers DAX, DAY, DAZ, and at ACLK3 the counters are
// cleared and busy drops. Pulses arriving during that sequence stay pending
// and are counted at the following ACLK0, so none is lost. The document's
// free-running multivibrator is replaced by a divider of the system clock,
// which is this design's choice.
module iu_accel #(
  parameter int unsigned CNT_W       = 12,
  parameter int unsigned ACLK_CYCLES = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       dv_pos,    // asynchronous CAPRI pulse lines
  input  logic [2:0]       dv_neg,
  input  logic             rau,
  output logic [CNT_W-1:0] acc [3],   // output registers DAX, DAY, DAZ
  output logic             busy
);
  logic [$clog2(ACLK_CYCLES)-1:0] div;
  logic [1:0] ph;
  logic       aclk [4];
  logic [2:0] sp1, sp2, sp3, sn1, sn2, sn3;
  logic [2:0] pend_up, pend_dn;
  logic [CNT_W-1:0] cnt [3];
  logic       req;

  // one-cycle ACLKn strobes at the start of each phase
  always_comb
    for (int i = 0; i < 4; i++) aclk[i] = (div == '0) && (ph == 2'(i));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; ph <= '0; req <= 1'b0; busy <= 1'b0;
      sp1 <= '0; sp2 <= '0; sp3 <= '0; sn1 <= '0; sn2 <= '0; sn3 <= '0;
      pend_up <= '0; pend_dn <= '0;
      for (int a = 0; a < 3; a++) begin cnt[a] <= '0; acc[a] <= '0; end
    end else begin
      if (div == ($clog2(ACLK_CYCLES))'(ACLK_CYCLES - 1)) begin
        div <= '0;
        ph  <= ph + 2'd1;
      end else begin
        div <= div + 1'b1;
      end
      sp1 <= dv_pos; sp2 <= sp1; sp3 <= sp2;
      sn1 <= dv_neg; sn2 <= sn1; sn3 <= sn2;
      if (rau) req <= 1'b1;
      for (int a = 0; a < 3; a++) begin
        if (aclk[0]) begin
          cnt[a] <= cnt[a] + CNT_W'(pend_up[a]) - CNT_W'(pend_dn[a]);
          pend_up[a] <= sp2[a] && !sp3[a];
          pend_dn[a] <= sn2[a] && !sn3[a];
        end else begin
          if (sp2[a] && !sp3[a]) pend_up[a] <= 1'b1;
          if (sn2[a] && !sn3[a]) pend_dn[a] <= 1'b1;
        end
        if (aclk[2] && busy) acc[a] <= cnt[a];
        if (aclk[3] && busy) cnt[a] <= '0;
      end
      if (aclk[1] && req) begin busy <= 1'b1; req <= rau; end
      if (aclk[3] && busy) busy <= 1'b0;
    end
  end
endmodule
