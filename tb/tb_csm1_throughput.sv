// tb_csm1_throughput: the module's main workload, 18 TDCs all sending
// back-to-back words (start bit + 32 bits, i.e. one word per 33 strobe
// periods at 40 MHz, 1.21 M words/s each) for WORDS words each, at the
// default size and parameters. The link offers each TDC one slot per
// 19-word frame at 25 MHz (1.316 M words/s), so every word must arrive, in
// order, with no FIFO overflow. The test also measures the link: 25 words per
// microsecond (800 Mbit/s) and the share of TDC slots that carry data, which
// must approach 1.21/1.316 = 92 %.
module tb_csm1_throughput;
  import csm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int N = N_TDC;
  localparam int CW = N + 1, SW = 4 * N + 2;

  int checks = 0, failures = 0;
  logic clk40 = 1'b0, clk25 = 1'b0, rst_n = 1'b1;
  logic [N-1:0] tdc_strobe, tdc_data;
  logic tck = 1'b0, sel1 = 0, sel2 = 0, capture = 0, shift = 0, update = 0, tdi = 0;
  logic tdo1, tdo2, gol_clk, gol_tx_en, gol_tx_er;
  logic [31:0] gol_data;

  always #12.5 clk40 = ~clk40;
  always #20   clk25 = ~clk25;
  always #50   tck   = ~tck;

  csm1_top dut (
    .clk40_in(clk40), .clk25_in(clk25), .rst_n,
    .tdc_strobe, .tdc_data,
    .jtag_tck(tck), .jtag_sel1(sel1), .jtag_sel2(sel2), .jtag_capture(capture),
    .jtag_shift(shift), .jtag_update(update), .jtag_tdi(tdi),
    .jtag_tdo1(tdo1), .jtag_tdo2(tdo2),
    .gol_clk, .gol_data, .gol_tx_en, .gol_tx_er
  );

  function automatic int unsigned offs(input int i);
    return 1000 + 1333 * i;   // 1.0 .. 23.7 ns
  endfunction

  for (genvar c = 0; c < N; c++) begin : g
    tdc_tx_model #(.OFFSET_PS(offs(c))) u_tdc (.clk_ref(clk40), .strobe(tdc_strobe[c]), .sdata(tdc_data[c]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- TDCs
  logic [31:0] exp_q [N][$];
  logic [N-1:0] track = '1;   // TDCs whose words must come out

  // Queue a word on TDC c, after `gap` idle bit periods.
  task automatic send(input int c, input logic [31:0] w, input int gap = 0);
    if (track[c]) exp_q[c].push_back(w);
    case (c)
      0: begin repeat (gap) g[0].u_tdc.push_bit(1'b0); g[0].u_tdc.push_word(w); end
      1: begin repeat (gap) g[1].u_tdc.push_bit(1'b0); g[1].u_tdc.push_word(w); end
      2: begin repeat (gap) g[2].u_tdc.push_bit(1'b0); g[2].u_tdc.push_word(w); end
      3: begin repeat (gap) g[3].u_tdc.push_bit(1'b0); g[3].u_tdc.push_word(w); end
      4: begin repeat (gap) g[4].u_tdc.push_bit(1'b0); g[4].u_tdc.push_word(w); end
      5: begin repeat (gap) g[5].u_tdc.push_bit(1'b0); g[5].u_tdc.push_word(w); end
      6: begin repeat (gap) g[6].u_tdc.push_bit(1'b0); g[6].u_tdc.push_word(w); end
      7: begin repeat (gap) g[7].u_tdc.push_bit(1'b0); g[7].u_tdc.push_word(w); end
      8: begin repeat (gap) g[8].u_tdc.push_bit(1'b0); g[8].u_tdc.push_word(w); end
      9: begin repeat (gap) g[9].u_tdc.push_bit(1'b0); g[9].u_tdc.push_word(w); end
      10: begin repeat (gap) g[10].u_tdc.push_bit(1'b0); g[10].u_tdc.push_word(w); end
      11: begin repeat (gap) g[11].u_tdc.push_bit(1'b0); g[11].u_tdc.push_word(w); end
      12: begin repeat (gap) g[12].u_tdc.push_bit(1'b0); g[12].u_tdc.push_word(w); end
      13: begin repeat (gap) g[13].u_tdc.push_bit(1'b0); g[13].u_tdc.push_word(w); end
      14: begin repeat (gap) g[14].u_tdc.push_bit(1'b0); g[14].u_tdc.push_word(w); end
      15: begin repeat (gap) g[15].u_tdc.push_bit(1'b0); g[15].u_tdc.push_word(w); end
      16: begin repeat (gap) g[16].u_tdc.push_bit(1'b0); g[16].u_tdc.push_word(w); end
      default: begin repeat (gap) g[17].u_tdc.push_bit(1'b0); g[17].u_tdc.push_word(w); end
    endcase
  endtask

  function automatic logic [31:0] tdc_word();
    return {4'h3, 28'($urandom)};   // never the empty word nor a spacer
  endfunction

  // ------------------------------------------------------- link monitor
  int slot = 0, n_spacer = 0, n_empty = 0, n_data = 0, n_stop = 0, n_full_frames = 0;
  int frame_data = 0;
  logic [N-1:0] par = '0;
  logic was_en = 1'b0;

  always @(posedge gol_clk) begin
    check(gol_tx_er == 1'b0, "tx_er low");
    if (!gol_tx_en) begin
      if (was_en) n_stop++;
      slot = 0;
    end else if (gol_data[31:18] == SPACER_TAG) begin
      check(slot == N, $sformatf("spacer after %0d slots", slot));
      check(gol_data[N-1:0] == par, $sformatf("spacer parity %h expected %h", gol_data[N-1:0], par));
      n_spacer++;
      if (frame_data == N) n_full_frames++;
      slot = 0; frame_data = 0;
    end else begin
      check(slot < N, "word in spacer slot");
      if (gol_data == EMPTY_WORD) begin
        n_empty++;
        par[slot] = 1'b0;
      end else begin
        logic [31:0] e;
        check(exp_q[slot].size() != 0, $sformatf("unexpected word %h in slot %0d", gol_data, slot));
        e = exp_q[slot].pop_front();
        check(gol_data == e, $sformatf("slot %0d: %h expected %h", slot, gol_data, e));
        par[slot] = ^gol_data;
        n_data++; frame_data++;
      end
      slot++;
    end
    was_en = gol_tx_en;
  end

  // ---------------------------------------------------------------- JTAG
  task automatic scan(input int which, input int len, input logic [127:0] din,
                      output logic [127:0] dout);
    @(negedge tck);
    sel1 = (which == 1); sel2 = (which == 2);
    capture = 1'b1;
    @(negedge tck);
    capture = 1'b0; shift = 1'b1;
    dout = '0;
    for (int i = 0; i < len; i++) begin
      tdi = din[i];
      dout[i] = (which == 1) ? tdo1 : tdo2;
      @(negedge tck);
    end
    shift = 1'b0; update = 1'b1;
    @(negedge tck);
    update = 1'b0; sel1 = 1'b0; sel2 = 1'b0;
  endtask

  logic [SW-1:0] stat;
  task automatic read_status();
    logic [127:0] o;
    scan(2, SW, '0, o);
    stat = o[SW-1:0];
  endtask

  task automatic write_ctrl(input logic run, input logic [N-1:0] en);
    logic [127:0] o;
    scan(1, CW, 128'({run, en}), o);
  endtask

  function automatic bit all_drained();
    for (int c = 0; c < N; c++) if (exp_q[c].size() != 0) return 1'b0;
    return 1'b1;
  endfunction

  // ------------------------------------------------------------ sequence
  localparam int WORDS = 100;
  int slots_start = 0, data_start = 0, spacer_start = 0;
  realtime t0, t1;

  initial begin
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    repeat (40) @(posedge clk40);
    for (int n = 0; n < WORDS; n++)
      for (int c = 0; c < N; c++) send(c, tdc_word());
    // steady state: measure between words 20 and 80 of the stream
    repeat (20 * 33) @(posedge clk40);
    t0 = $realtime; slots_start = n_empty + n_data; data_start = n_data; spacer_start = n_spacer;
    repeat (60 * 33) @(posedge clk40);
    t1 = $realtime;
    begin
      real us, share, words_per_us;
      us = (t1 - t0) / 1000.0;
      words_per_us = (n_empty + n_data - slots_start + n_spacer - spacer_start) / us;
      share = real'(n_data - data_start) / real'(n_empty + n_data - slots_start);
      $display("link: %0.2f words/us, TDC slots with data: %0.1f %%", words_per_us, share * 100.0);
      check(words_per_us > 24.5 && words_per_us < 25.5, "link carries 25 words per microsecond");
      check(share > 0.88 && share < 0.97, "data share of TDC slots near 92 %");
    end
    repeat (20 * 33 + 300) @(posedge clk40);
    check(all_drained(), "every word delivered");
    read_status();
    check(stat[N-1:0] == '0, $sformatf("no FIFO overflow: %h", stat[N-1:0]));
    check(n_data == N * WORDS, $sformatf("data words %0d", n_data));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
