// dcm_model: behavioural model of the FPGA's digital clock manager (DCM).
// This is not synthesizable logic: it stands in for the Virtex-II DCM
// primitive, a process-specific block of the FPGA.
//
// The DCM is used twice in the module. On the 40 MHz clock it supplies the
// clock shifted by 0, 90, 180 and 270 degrees, so that every TDC stream can be
// sampled on the phase that suits it best. On the 25 MHz transmission
// oscillator it acts as a delay locked loop whose clk0 output clocks the
// multiplexer and the link interface. Both uses follow the specification.
//
// The model delays the input by a quarter of the period given by
// CLKIN_PERIOD_PS (the real primitive also takes the input period as an
// attribute) to make clk90; clk180 and clk270 are the inversions of clk0 and
// clk90, which assumes a 50 % duty cycle at the input. clk0 is the input
// itself, i.e. a perfectly deskewed DLL. LOCKED rises after LOCK_CYCLES input rising edges following
// reset; the lock time is this model's choice.
module dcm_model #(
  parameter int unsigned CLKIN_PERIOD_PS = 25000,
  parameter int unsigned LOCK_CYCLES     = 4
) (
  input  logic clkin,
  input  logic rst,
  output logic clk0,
  output logic clk90,
  output logic clk180,
  output logic clk270,
  output logic locked
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime Q = CLKIN_PERIOD_PS * 1ps / 4;

  int unsigned edges;

  assign clk0 = clkin;
  // clk90 is the input delayed by a quarter period; the quarter period is
  // shorter than half a period, so every edge is reproduced. clk180 and
  // clk270 are the inversions of clk0 and clk90 (the real part also outputs a
  // 50 % duty cycle).
  logic level;
  initial clk90 = 1'b0;
  always @(clkin) begin
    level = clkin;
    #(Q) clk90 = level;
  end
  assign clk180 = ~clk0;
  assign clk270 = ~clk90;

  always @(posedge clkin or posedge rst) begin
    if (rst) begin
      edges  <= 0;
      locked <= 1'b0;
    end else if (edges < LOCK_CYCLES) begin
      edges  <= edges + 1;
    end else begin
      locked <= 1'b1;
    end
  end
endmodule
