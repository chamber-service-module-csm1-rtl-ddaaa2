// tb_phase_sampler: eight TDC strobes with phases spread over the 25 ns
// period are sampled on the four clock phases. For each the selected phase
// must be the first phase after the strobe's rising edge, ceil(offset/6.25ns)
// mod 4, and the recovered bit stream must equal the transmitted random bit
// sequence (at some fixed delay) without a single error. Then one strobe
// moves by half a period: the sampler must keep its phase for a few cycles,
// re-lock to the new one and recover the stream again.
module tb_phase_sampler;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int NCH = 8;
  localparam int NBITS = 400;
  localparam int unsigned OFFS [NCH] = '{1000, 4000, 7000, 10000, 13000, 16000, 19000, 22000};

  int checks = 0, failures = 0;
  logic clkin = 1'b0, rst_n = 1'b1;
  logic clk0, clk90, clk180, clk270, dlock;
  bit   sent [NBITS];

  always #12.5 clkin = ~clkin;

  dcm_model u_dcm (.clkin, .rst(!rst_n), .clk0, .clk90, .clk180, .clk270, .locked(dlock));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [NCH-1:0]      strobe, sdata, bit_o, bit_valid, locked;
  logic [NCH-1:0][1:0] phase;
  bit                  rec [NCH][$];

  for (genvar c = 0; c < NCH; c++) begin : g
    tdc_tx_model #(.OFFSET_PS(OFFS[c])) u_tdc (.clk_ref(clkin), .strobe(strobe[c]), .sdata(sdata[c]));
    phase_sampler u_dut (
      .clk0, .clk90, .clk180, .clk270, .rst_n,
      .strobe(strobe[c]), .sdata(sdata[c]),
      .bit_o(bit_o[c]), .bit_valid(bit_valid[c]), .phase_o(phase[c]), .locked(locked[c])
    );
    always @(posedge clk0) if (bit_valid[c]) rec[c].push_back(bit_o[c]);
  end

  initial begin
    logic [15:0] lfsr = 16'hACE1;
    for (int i = 0; i < NBITS; i++) begin
      sent[i] = lfsr[0];
      lfsr = {lfsr[0] ^ lfsr[2] ^ lfsr[3] ^ lfsr[5], lfsr[15:1]};
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clkin);
    rst_n = 1'b1;
    for (int i = 0; i < NBITS; i++) begin
      g[0].u_tdc.push_bit(sent[i]); g[1].u_tdc.push_bit(sent[i]);
      g[2].u_tdc.push_bit(sent[i]); g[3].u_tdc.push_bit(sent[i]);
      g[4].u_tdc.push_bit(sent[i]); g[5].u_tdc.push_bit(sent[i]);
      g[6].u_tdc.push_bit(sent[i]); g[7].u_tdc.push_bit(sent[i]);
    end
    // Lock must happen within 20 cycles.
    repeat (20) @(posedge clk0);
    #1;
    for (int c = 0; c < NCH; c++) begin
      check(locked[c], $sformatf("ch%0d locked", c));
      check(phase[c] == 2'((OFFS[c] + 6249) / 6250), $sformatf("ch%0d phase %0d", c, phase[c]));
    end
    repeat (NBITS + 10) @(posedge clk0);
    for (int c = 0; c < NCH; c++) begin
      int best;
      best = -1;
      for (int o = 0; o < 60 && best < 0; o++) begin
        bit ok;
        ok = 1'b1;
        for (int j = 0; j < 300; j++) if (rec[c][j] != sent[o + j]) ok = 1'b0;
        if (ok) best = o;
      end
      check(best >= 0, $sformatf("ch%0d bit stream recovered", c));
    end
    // Re-lock: channel 0's strobe moves from 1 ns to 14 ns (phase 1 -> 3).
    g[0].u_tdc.set_offset(14000);
    repeat (3) @(posedge clk0);
    #1 check(phase[0] == 2'd1, "ch0 keeps its phase until the new edge is stable");
    repeat (20) @(posedge clk0);
    #1 check(phase[0] == 2'd3, $sformatf("ch0 re-locked to phase %0d", phase[0]));
    rec[0].delete();
    for (int i = 0; i < 200; i++) g[0].u_tdc.push_bit(sent[i]);
    repeat (220) @(posedge clk0);
    begin
      int best;
      best = -1;
      for (int o = 0; o < 40 && best < 0; o++) begin
        bit ok;
        ok = 1'b1;
        for (int j = 0; j < 150; j++) if (rec[0][o + j] != sent[j]) ok = 1'b0;
        if (ok) best = o;
      end
      check(best >= 0, "ch0 bit stream recovered after re-lock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
