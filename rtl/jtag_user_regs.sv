// jtag_user_regs: the two JTAG user registers reached through the FPGA's
// boundary-scan access primitive (BSCAN), by which the outside world talks to
// the module over the JTAG chain.
//
// The specification says the design uses the primitive's two user registers
// for JTAG communication in both directions, but not what they hold. Here:
//   USER1 (sel1, read/write, CTRL_W bits) = {mux_run, tdc_enable[N-1:0]}
//   USER2 (sel2, read only,  STAT_W bits) = {dcm_locked[1:0],
//                                            phase[N-1:0][1:0],
//                                            phase_locked[N-1:0],
//                                            fifo_overflow[N-1:0]}
// USER1 resets to all ones, so that the module runs with all TDCs enabled
// without any JTAG access.
//
// How it works: standard data-register behaviour on TCK. In Capture-DR the
// selected shift register loads the current control value (USER1) or the
// status (USER2); in Shift-DR it shifts towards bit 0 with tdi entering at the
// top, and tdo shows bit 0, so registers are shifted least significant bit
// first. In Update-DR USER1's shift register is copied into the control
// register. The status input is synchronized into TCK with two flops; the
// control output is in the TCK domain and must be synchronized by its user.
// The capture/shift/update inputs are levels sampled on the rising edge of
// TCK, standing in for the primitive's gated DRCK clocks.
module jtag_user_regs
  import csm_pkg::*;
#(
  parameter int unsigned CW = CTRL_W,
  parameter int unsigned SW = STAT_W
) (
  input  logic          tck,
  input  logic          rst_n,
  input  logic          sel1,
  input  logic          sel2,
  input  logic          capture,
  input  logic          shift,
  input  logic          update,
  input  logic          tdi,
  output logic          tdo1,
  output logic          tdo2,
  input  logic [SW-1:0] status,
  output logic [CW-1:0] ctrl
);
  logic [CW-1:0] sr1;
  logic [SW-1:0] sr2;
  logic [SW-1:0] status_s;

  bit_sync #(.W(SW)) u_sync (.clk(tck), .rst_n, .d(status), .q(status_s));

  always_ff @(posedge tck or negedge rst_n) begin
    if (!rst_n) begin
      sr1  <= '1;
      sr2  <= '0;
      ctrl <= '1;
    end else begin
      if (sel1) begin
        if (capture)     sr1  <= ctrl;
        else if (shift)  sr1  <= {tdi, sr1[CW-1:1]};
        else if (update) ctrl <= sr1;
      end
      if (sel2) begin
        if (capture)     sr2 <= status_s;
        else if (shift)  sr2 <= {tdi, sr2[SW-1:1]};
      end
    end
  end

  assign tdo1 = sr1[0];
  assign tdo2 = sr2[0];
endmodule
