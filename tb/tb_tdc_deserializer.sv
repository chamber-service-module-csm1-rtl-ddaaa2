// tb_tdc_deserializer: sends framed words (start bit, 32 bits MSB first)
// with random gaps, random idle-cycle holes in bit_valid and back-to-back
// words, and checks every word, its parity and that word_valid rises exactly
// one cycle after the last data bit.
module tb_tdc_deserializer;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1;
  logic bit_i = 1'b0, bit_valid = 1'b0;
  logic [31:0] word_o;
  logic parity_o, word_valid;
  logic [31:0] exp_q [$];
  int last_bit_cycle = 0, cycle = 0, nwords = 0;

  tdc_deserializer dut (.*);

  always #12.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Stimulus schedule: one {valid, bit} pair per clock cycle.
  logic [1:0] sched [$];

  function automatic void add_bit(input bit b);
    while ($urandom_range(0, 7) == 0) sched.push_back({1'b0, 1'($urandom_range(0, 1))});
    sched.push_back({1'b1, b});
  endfunction

  function automatic void add_word(input logic [31:0] w);
    exp_q.push_back(w);
    add_bit(1'b1);
    for (int i = 31; i >= 0; i--) add_bit(w[i]);
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (word_valid) begin
      logic [31:0] e;
      e = exp_q.pop_front();
      check(word_o == e, $sformatf("word %h expected %h", word_o, e));
      check(parity_o == ^e, "parity");
      check(cycle == last_bit_cycle + 1, $sformatf("latency: out at %0d, last bit %0d", cycle, last_bit_cycle));
      nwords++;
    end
    if (bit_valid) last_bit_cycle <= cycle;
  end

  initial begin
    add_word(32'h0000_0000);
    add_word(32'hFFFF_FFFF);
    add_word(32'h8000_0001);
    for (int n = 0; n < 40; n++) begin
      int gap;
      gap = $urandom_range(0, 3);
      repeat (gap) add_bit(1'b0);
      add_word($urandom);
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (sched.size() != 0) begin
      {bit_valid, bit_i} <= sched.pop_front();
      @(posedge clk);
    end
    bit_valid <= 1'b0;
    repeat (5) @(posedge clk);
    check(nwords == 43, $sformatf("words received %0d", nwords));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
