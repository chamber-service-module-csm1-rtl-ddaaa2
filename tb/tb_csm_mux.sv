// tb_csm_mux: the multiplexer with 18 TDC FIFOs modelled as queues that are
// filled at random. A reference model in the testbench predicts, cycle by
// cycle, the FIFO pops and the output word: TDC 0..17 in turn, the FIFO
// head or an empty word, then the spacer with the frame's parity bits. The
// test checks the output stream one word per cycle (a spacer every 19
// cycles), the per-TDC enable and stopping and restarting with run.
module tb_csm_mux;
  import csm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 18;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b1, run = 1'b0;
  logic [N-1:0] tdc_enable = '1;
  fifo_entry_t [N-1:0] fifo_rdata;
  logic [N-1:0] fifo_empty, fifo_rd_en;
  logic [31:0] tx_data;
  logic tx_en, tx_er;

  csm_mux dut (.*);

  always #20 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  fifo_entry_t q [N][$];
  int fill_pct = 5;

  always_comb
    for (int i = 0; i < N; i++) begin
      fifo_empty[i] = (q[i].size() == 0);
      fifo_rdata[i] = fifo_empty[i] ? fifo_entry_t'('0) : q[i][0];
    end

  // Reference model
  int ref_slot = 0;
  logic [N-1:0] ref_par = '0, exp_rd, pop_mask = '0;
  logic [31:0] exp_word = EMPTY_WORD;
  logic exp_en = 1'b0;
  int n_spacer = 0, n_empty = 0, n_data = 0, n_disabled = 0, last_spacer = -1, cycle = 0;

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      check(tx_data == exp_word, $sformatf("cycle %0d: tx_data %h expected %h", cycle, tx_data, exp_word));
      check(tx_en == exp_en, "tx_en");
      check(tx_er == 1'b0, "tx_er");
      if (exp_en) begin
        if (exp_word[31:18] == SPACER_TAG) begin
          n_spacer++;
          if (last_spacer >= 0) check(cycle - last_spacer == N + 1, "spacer period");
          last_spacer = cycle;
        end
      end
      exp_rd = '0;
      exp_en = run;
      if (!run) begin
        exp_word = EMPTY_WORD;
        ref_slot = 0;
        last_spacer = -1;
      end else if (ref_slot == N) begin
        exp_word = {SPACER_TAG, ref_par};
        ref_slot = 0;
      end else begin
        if (tdc_enable[ref_slot] && q[ref_slot].size() != 0) begin
          exp_word = q[ref_slot][0].word;
          ref_par[ref_slot] = q[ref_slot][0].parity;
          exp_rd[ref_slot] = 1'b1;
          n_data++;
        end else begin
          exp_word = EMPTY_WORD;
          ref_par[ref_slot] = 1'b0;
          n_empty++;
          if (!tdc_enable[ref_slot] && q[ref_slot].size() != 0) n_disabled++;
        end
        ref_slot++;
      end
      check(fifo_rd_en == exp_rd, $sformatf("rd_en %h expected %h", fifo_rd_en, exp_rd));
      pop_mask = fifo_rd_en;
    end
  end

  // FIFO models: pop what was read, push new entries, away from the edge.
  always @(negedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (pop_mask[i]) void'(q[i].pop_front());
      if (q[i].size() < 8 && $urandom_range(0, 99) < fill_pct)
        q[i].push_back('{parity: 1'($urandom), word: $urandom | 32'h1});
    end
    pop_mask = '0;
  end

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    @(negedge clk);
    run = 1'b1;
    repeat (40 * (N + 1)) @(negedge clk);
    fill_pct = 60;                       // heavy load: most slots carry data
    repeat (40 * (N + 1)) @(negedge clk);
    tdc_enable = 18'h2AAAA;               // every other TDC disabled
    repeat (20 * (N + 1)) @(negedge clk);
    run = 1'b0;                          // stop mid-frame
    repeat (25) @(negedge clk);
    check(tx_en == 1'b0, "stopped");
    tdc_enable = '1;
    run = 1'b1;
    repeat (20 * (N + 1)) @(negedge clk);
    check(n_spacer > 100, $sformatf("spacers %0d", n_spacer));
    check(n_empty > 100 && n_data > 500 && n_disabled > 50,
          $sformatf("empty %0d data %0d disabled %0d", n_empty, n_data, n_disabled));
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
