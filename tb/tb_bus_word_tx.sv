// Testbench for bus_word_tx: queues words, runs an 18-cell phase count and
// decodes the two output lines independently: every mark must alternate in
// polarity (AMI), each slot must hold a lead one, the word MSB first and an
// odd parity bit, queued words must go out in consecutive slots, and the
// lines must stay quiet when nothing is queued.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected format (lead one, MSB first, odd parity,
// AMI, no gap between words) is the document's; word values are random.
`include "tb/tb_check.svh"
module tb_bus_word_tx;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [4:0] phase = 0;
  logic word_valid = 0, word_take, active, bit_out;
  word_t word;
  ami_pair_t line;
  word_t q[$], sent[$];
  bus_word_tx dut (.clk, .rst_n, .cell_en(1'b1), .phase, .word_valid, .word,
                   .word_take, .active, .bit_out, .line);
  always #50 clk = !clk;
  initial begin #3000000; failures++; $display("watchdog"); `FINISH end
  // queue head presented to the encoder, refreshed between clock edges
  always @(negedge clk) begin
    word_valid = q.size() > 0;
    word       = q.size() > 0 ? q[0] : '0;
  end

  logic last_pol_n; logic seen_mark = 0;
  logic [17:0] slot_bits; int slots_with_word = 0; int quiet_slots = 0;
  always @(posedge clk) if (rst_n) begin
    phase <= (phase == 17) ? 5'd0 : phase + 5'd1;
    if (word_take) begin sent.push_back(q[0]); void'(q.pop_front()); end
  end
  always @(negedge clk) if (rst_n) begin
    `CHECK(!(line.p && line.n), "both lines at once")
    if (line.p || line.n) begin
      if (seen_mark) `CHECK(line.n != last_pol_n, "AMI alternation")
      last_pol_n = line.n; seen_mark = 1;
    end
    slot_bits = {slot_bits[16:0], line.p | line.n};
    if (phase == 17) begin
      logic [17:0] b; b = slot_bits;
      if (b[17]) begin
        word_t exp;
        `CHECK(sent.size() > 0, "a word was taken for this slot")
        exp = sent.size() > 0 ? sent.pop_front() : '0;
        `CHECK(b[16:1] == exp, $sformatf("word %h expected %h", b[16:1], exp))
        `CHECK(^b[16:0] == 1'b1, "odd parity")
        slots_with_word++;
      end else begin
        `CHECK(b == 0, "quiet slot")
        quiet_slots++;
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    q.push_back(16'hFFFF); q.push_back(16'h0000); q.push_back(16'h8001);
    wait (q.size() == 0);
    // the three words must be in consecutive slots: wait a slot then check count
    repeat (3 * 18 + 20) @(posedge clk);
    `CHECK(slots_with_word == 3, "three words, three slots")
    for (int i = 0; i < 20; i++) q.push_back(16'($urandom));
    wait (q.size() == 0);
    repeat (60) @(posedge clk);
    `CHECK(slots_with_word == 23, "all words sent")
    `CHECK(quiet_slots >= 2, "quiet when idle")
    `FINISH
  end
endmodule
