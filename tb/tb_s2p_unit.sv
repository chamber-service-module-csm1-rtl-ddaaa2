// tb_s2p_unit: four TDC channels with different strobe phases feed the
// serial-to-parallel unit; words are read out on a 25 MHz clock. Every word
// read must equal the next word sent on that channel, with the right parity
// bit. The selected phases are checked, and with one channel's reads stopped
// its FIFO must overflow while the others do not.
module tb_s2p_unit;
  import csm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = 4;
  localparam int unsigned OFFS [N] = '{3000, 9000, 15000, 21000};
  int checks = 0, failures = 0;
  logic clkin = 1'b0, rclk = 1'b0, rst_n = 1'b1;
  logic clk0, clk90, clk180, clk270, dlock;
  logic [N-1:0] strobe, sdata, rd_en, empty, overflow, locked;
  fifo_entry_t [N-1:0] rdata;
  logic [N-1:0][1:0] phase;
  logic [N-1:0] rd_allow = '1;
  logic [31:0] exp_q [N][$];
  int nread [N];

  always #12.5 clkin = ~clkin;
  always #20   rclk  = ~rclk;

  dcm_model u_dcm (.clkin, .rst(!rst_n), .clk0, .clk90, .clk180, .clk270, .locked(dlock));

  s2p_unit #(.N(N)) dut (
    .clk0, .clk90, .clk180, .clk270, .rst_n, .rclk, .rrst_n(rst_n),
    .strobe, .sdata, .rd_en, .rdata, .empty, .overflow, .locked, .phase
  );

  for (genvar c = 0; c < N; c++) begin : g
    tdc_tx_model #(.OFFSET_PS(OFFS[c])) u_tdc (.clk_ref(clkin), .strobe(strobe[c]), .sdata(sdata[c]));
  end

  assign rd_en = ~empty & rd_allow;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge rclk) begin
    for (int c = 0; c < N; c++) begin
      if (rd_en[c] && rst_n) begin
        logic [31:0] e;
        e = exp_q[c].pop_front();
        check(rdata[c].word == e, $sformatf("ch%0d word %h expected %h", c, rdata[c].word, e));
        check(rdata[c].parity == ^e, $sformatf("ch%0d parity", c));
        nread[c]++;
      end
    end
  end

  task automatic send(input int c, input logic [31:0] w);
    exp_q[c].push_back(w);
    case (c)
      0: g[0].u_tdc.push_word(w);
      1: g[1].u_tdc.push_word(w);
      2: g[2].u_tdc.push_word(w);
      default: g[3].u_tdc.push_word(w);
    endcase
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    // idle line while the phases lock
    repeat (30) @(posedge clk0);
    for (int c = 0; c < N; c++) begin
      check(locked[c], $sformatf("ch%0d locked", c));
      check(phase[c] == 2'((OFFS[c] + 6249) / 6250), $sformatf("ch%0d phase %0d", c, phase[c]));
    end
    // full-rate back-to-back words on every channel
    for (int n = 0; n < 20; n++)
      for (int c = 0; c < N; c++) send(c, $urandom);
    repeat (20 * 33 + 100) @(posedge clk0);
    for (int c = 0; c < N; c++) begin
      check(nread[c] == 20, $sformatf("ch%0d read %0d words", c, nread[c]));
      check(!overflow[c], $sformatf("ch%0d no overflow", c));
    end
    // stop reading channel 3: its FIFO fills and overflows
    rd_allow = 4'b0111;
    for (int n = 0; n < 12; n++)
      for (int c = 0; c < N; c++) send(c, $urandom);
    repeat (12 * 33 + 100) @(posedge clk0);
    check(overflow == 4'b1000, $sformatf("overflow flags %b", overflow));
    check(nread[0] == 32 && nread[1] == 32 && nread[2] == 32, "other channels unaffected");
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
