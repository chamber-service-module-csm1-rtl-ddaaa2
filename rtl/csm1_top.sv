// csm1_top: FPGA logic of the CSM1 chamber service module.
//
// The module reads the serial outputs of up to N TDC cards (18 by default),
// each arriving with its own 40 MHz strobe of unknown phase, and sends all of
// them over one optical link as a single stream of 32-bit words. The blocks,
// as in the specification:
//   - two clock managers (dcm_model): one makes 0/90/180/270 degree phases
//     of the local 40 MHz clock, one is a DLL on the 25 MHz transmission
//     oscillator whose output clocks the multiplexer and the link chip;
//   - the serial-to-parallel unit (s2p_unit): per TDC, best-phase sampling,
//     word extraction and a small FIFO into the transmission clock domain;
//   - the multiplexer (csm_mux): TDC 0..N-1 in turn, a word or an empty
//     word each, then a spacer word with the frame's parity bits;
//   - the JTAG user registers (jtag_user_regs): control (run, TDC enables)
//     and status (FIFO overflows, chosen phases, phase lock, DCM lock).
// The link serializer chip, the optical transmitter and the boundary-scan
// primitive are outside this module: their signals are its ports.
//
// Clock domains: clk40 phases (input side), tx clock (multiplexer, GOL bus),
// TCK (JTAG). Control bits are synchronized into the tx domain, status bits
// into TCK. rst_n is an asynchronous reset for all domains; it should be
// held until the clocks run. The gol_* outputs change on the rising edge of
// gol_clk.
module csm1_top
  import csm_pkg::*;
#(
  parameter int unsigned N           = N_TDC,
  parameter int unsigned FIFO_DEPTH  = 8,
  parameter int unsigned CLK40_PS    = 25000,
  parameter int unsigned CLK25_PS    = 40000
) (
  input  logic              clk40_in,
  input  logic              clk25_in,
  input  logic              rst_n,
  input  logic [N-1:0]      tdc_strobe,
  input  logic [N-1:0]      tdc_data,
  input  logic              jtag_tck,
  input  logic              jtag_sel1,
  input  logic              jtag_sel2,
  input  logic              jtag_capture,
  input  logic              jtag_shift,
  input  logic              jtag_update,
  input  logic              jtag_tdi,
  output logic              jtag_tdo1,
  output logic              jtag_tdo2,
  output logic              gol_clk,
  output logic [WORD_W-1:0] gol_data,
  output logic              gol_tx_en,
  output logic              gol_tx_er
);
  // Clocks
  logic clk0, clk90, clk180, clk270, lock40;
  logic txclk, lock25;
  logic unused_90, unused_180, unused_270;

  dcm_model #(.CLKIN_PERIOD_PS(CLK40_PS)) u_dcm40 (
    .clkin(clk40_in), .rst(!rst_n),
    .clk0, .clk90, .clk180, .clk270, .locked(lock40)
  );

  dcm_model #(.CLKIN_PERIOD_PS(CLK25_PS)) u_dll25 (
    .clkin(clk25_in), .rst(!rst_n),
    .clk0(txclk), .clk90(unused_90), .clk180(unused_180), .clk270(unused_270),
    .locked(lock25)
  );

  assign gol_clk = txclk;

  // Control from JTAG, synchronized into the tx domain
  localparam int unsigned CW = N + 1;
  localparam int unsigned SW = 4*N + 2;
  logic [CW-1:0] ctrl_tck, ctrl_tx;
  logic [SW-1:0] status;

  bit_sync #(.W(CW), .RESET_VAL('1)) u_ctrl_sync (
    .clk(txclk), .rst_n, .d(ctrl_tck), .q(ctrl_tx)
  );

  // Input side
  fifo_entry_t [N-1:0] rdata;
  logic [N-1:0]        empty, rd_en, overflow, locked;
  logic [N-1:0][1:0]   phase;

  s2p_unit #(.N(N), .FIFO_DEPTH(FIFO_DEPTH)) u_s2p (
    .clk0, .clk90, .clk180, .clk270, .rst_n,
    .rclk(txclk), .rrst_n(rst_n),
    .strobe(tdc_strobe), .sdata(tdc_data),
    .rd_en, .rdata, .empty, .overflow, .locked, .phase
  );

  // Multiplexer; it runs once the DLL has locked and JTAG allows it
  csm_mux #(.N(N)) u_mux (
    .clk(txclk), .rst_n,
    .run(ctrl_tx[N] & lock25),
    .tdc_enable(ctrl_tx[N-1:0]),
    .fifo_rdata(rdata), .fifo_empty(empty), .fifo_rd_en(rd_en),
    .tx_data(gol_data), .tx_en(gol_tx_en), .tx_er(gol_tx_er)
  );

  // JTAG user registers
  assign status = {lock25, lock40, phase, locked, overflow};

  jtag_user_regs #(.CW(CW), .SW(SW)) u_jtag (
    .tck(jtag_tck), .rst_n,
    .sel1(jtag_sel1), .sel2(jtag_sel2),
    .capture(jtag_capture), .shift(jtag_shift), .update(jtag_update),
    .tdi(jtag_tdi), .tdo1(jtag_tdo1), .tdo2(jtag_tdo2),
    .status, .ctrl(ctrl_tck)
  );
endmodule
