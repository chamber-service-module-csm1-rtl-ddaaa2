// tb_csm1_top: end-to-end test of the chamber service module logic at its
// default size, 18 TDC inputs, with every parameter at its default.
//
// 18 TDC models, each with its own strobe phase spread over the 25 ns period,
// send framed 32-bit words. The link output is decoded frame by frame: slot i
// of a frame must carry either the empty word or the next word TDC i sent,
// and the spacer after slot 17 must carry the parity of each slot's word.
// A JTAG master reads and writes the two user registers. The test goes
// through: phase locking (all four phases must be chosen by some input),
// light traffic (empty words), all 18 TDCs sending back to back at full
// rate (nothing may be lost), a TDC disabled through JTAG until its FIFO
// overflows (seen in the status register), and the link stopped and
// restarted through the run bit. Each of these mechanisms is counted, and
// one that never happened counts as a failure.
module tb_csm1_top;
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
  int phases_seen [4];

  initial begin
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    repeat (40) @(posedge clk40);

    // 1. phase selection, read through the status register
    read_status();
    check(stat[4*N] && stat[4*N+1], "both DCMs locked");
    for (int c = 0; c < N; c++) begin
      logic [1:0] ph;
      ph = stat[2*N + 2*c +: 2];
      check(stat[N + c], $sformatf("TDC %0d phase locked", c));
      check(ph == 2'((offs(c) + 6249) / 6250), $sformatf("TDC %0d phase %0d", c, ph));
      check(!stat[c], $sformatf("TDC %0d no overflow", c));
      phases_seen[ph]++;
    end

    // 2. light traffic: a few words per TDC, random gaps
    for (int n = 0; n < 4; n++)
      for (int c = 0; c < N; c++) begin
        send(c, tdc_word(), $urandom_range(0, 40));
      end
    while (!all_drained()) @(posedge clk40);
    repeat (100) @(posedge clk40);

    // 3. all TDCs back to back at full rate: nothing may be lost
    for (int n = 0; n < 30; n++)
      for (int c = 0; c < N; c++) send(c, tdc_word());
    repeat (30 * 33 + 200) @(posedge clk40);
    check(all_drained(), "full-rate words all delivered");
    read_status();
    check(stat[N-1:0] == '0, $sformatf("no overflow at full rate: %h", stat[N-1:0]));

    // 4. TDC 5 disabled: its slot is empty and its FIFO overflows
    write_ctrl(1'b1, ~(N'(1) << 5));
    track[5] = 1'b0;
    for (int n = 0; n < 12; n++) begin
      send(5, tdc_word());
      send(7, tdc_word());
    end
    repeat (12 * 33 + 200) @(posedge clk40);
    read_status();
    check(stat[N-1:0] == (N'(1) << 5), $sformatf("overflow flags %h", stat[N-1:0]));

    // 5. link stopped and restarted through the run bit
    write_ctrl(1'b0, ~(N'(1) << 5));
    repeat (10) @(posedge gol_clk);
    check(!gol_tx_en, "link stopped");
    for (int c = 0; c < N; c++) if (c != 5) send(c, tdc_word());
    repeat (200) @(posedge clk40);
    write_ctrl(1'b1, ~(N'(1) << 5));
    repeat (400) @(posedge clk40);
    check(all_drained(), "words held while stopped are delivered after restart");

    // mechanisms
    for (int p = 0; p < 4; p++) check(phases_seen[p] > 0, $sformatf("phase %0d chosen", p));
    check(n_empty > 0, "empty words sent");
    check(n_spacer > 0, "spacer words sent");
    check(n_full_frames > 0, "frames with all 18 slots full");
    check(n_stop > 0, "link stopped");
    $display("mechanisms: phases %0d/%0d/%0d/%0d, data %0d, empty %0d, spacers %0d, full frames %0d, stops %0d",
             phases_seen[0], phases_seen[1], phases_seen[2], phases_seen[3],
             n_data, n_empty, n_spacer, n_full_frames, n_stop);
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
