// Johnson (twisted-ring) counter with N flip-flops and 2N states.
//
// The PIU drives a 9-bit one from the 10 MHz clock to get the 18 bit cells of
// a bus word (Sections 5.1, 7.11 of the design description); the IU has an
// identical one that is reset by the message sync. Each enabled clock shifts
// the register left and feeds back the inverted MSB. The state index
// 0 .. 2N-1 is decoded from the pattern (all zeros = 0, all ones = N).
// A synchronous clear returns to state 0. An illegal pattern (not reachable
// from reset) is replaced by state 0 at the next enabled clock, which is this
// design's choice.
//
// Ports: en advances one state per clock; clr forces state 0 (priority);
// q is the raw ring, idx the decoded state. idx is combinational from q.
module johnson_counter #(
  parameter int unsigned N = 9
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         clr,
  output logic [N-1:0]                 q,
  output logic [$clog2(2*N)-1:0]       idx
);
  logic [$clog2(N+1)-1:0] ones;
  logic                   legal;

  always_comb begin
    ones  = '0;
    for (int i = 0; i < N; i++) ones += q[i];
    // Legal Johnson patterns are a block of ones at the low end (filling)
    // or a block of ones at the high end (emptying).
    legal = 1'b0;
    for (int k = 0; k <= N; k++) begin
      if (q == N'((1 << k) - 1))           legal = 1'b1;
      if (q == N'(~((1 << k) - 1)))        legal = 1'b1;
    end
    if (q[0] || q == '0) idx = ($clog2(2*N))'(ones);
    else                 idx = ($clog2(2*N))'(2*N - ones);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (en)     q <= legal ? {q[N-2:0], ~q[N-1]} : '0;
  end
endmodule
