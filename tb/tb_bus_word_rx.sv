// Testbench for bus_word_rx: an independent encoder in the testbench sends
// words on the read pair with a read clock (AMI on both pairs), back to back
// and with idle cells between, some with a corrupted parity bit or lead bit;
// the decoder's words and error flags are compared with what was sent.
// No ports: it drives a 10 MHz clock itself, has a watchdog, and prints one
// TB_RESULT line. The expected words and the error flags follow the
// document's word format (lead, 16 bits MSB first, odd parity); the error
// patterns are this testbench's choice.
`include "tb/tb_check.svh"
module tb_bus_word_rx;
  import imu_bus_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  bus_dir_t bus = '0;
  logic word_valid, parity_err, lead_err;
  word_t word;
  bus_word_rx dut (.*);
  always #50 clk = !clk;
  initial begin #5000000; failures++; $display("watchdog"); `FINISH end

  typedef struct { word_t w; logic bad_par; logic bad_lead; } exp_t;
  exp_t exp_q[$];
  logic cpol = 0, dpol = 0;
  task automatic put_cell(input logic clk_on, input logic b);
    @(negedge clk);
    bus.clk.p  = clk_on && !cpol; bus.clk.n = clk_on && cpol; if (clk_on) cpol = !cpol;
    bus.data.p = b && !dpol;      bus.data.n = b && dpol;     if (b) dpol = !dpol;
  endtask
  task automatic send(input word_t w, input logic bad_par, input logic bad_lead);
    exp_q.push_back('{w, bad_par, bad_lead});
    put_cell(1, !bad_lead);
    for (int i = 15; i >= 0; i--) put_cell(1, w[i]);
    put_cell(1, parity_bit(w) ^ bad_par);
  endtask

  int got = 0;
  always @(posedge clk) if (word_valid) begin
    exp_t e; #1;
    `CHECK(exp_q.size() > 0, "unexpected word")
    if (exp_q.size() > 0) begin
      e = exp_q.pop_front();
      `CHECK(word == e.w, $sformatf("word %h exp %h", word, e.w))
      `CHECK(parity_err == e.bad_par, "parity flag")
      `CHECK(lead_err == e.bad_lead, "lead flag")
    end
    got++;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    put_cell(0, 0); put_cell(0, 0);
    send(16'h1234, 0, 0); send(16'hFFFF, 0, 0); send(16'h0000, 0, 0);
    put_cell(0, 0); put_cell(0, 0); put_cell(0, 0);
    for (int i = 0; i < 30; i++) begin
      send(16'($urandom), ($urandom % 5) == 0, ($urandom % 7) == 0);
      if ($urandom % 2) repeat (1 + $urandom % 4) put_cell(0, 0);
    end
    put_cell(0, 0); put_cell(0, 0); put_cell(0, 0);
    `CHECK(got == 33 && exp_q.size() == 0, $sformatf("all words decoded (%0d)", got))
    `FINISH
  end
endmodule
