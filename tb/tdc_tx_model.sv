// tdc_tx_model: behavioural model of one TDC card's serial output, for
// testbenches only.
//
// The strobe is the reference clock delayed by OFFSET_PS, i.e. the same
// frequency with an arbitrary phase, as a strobe returned over a cable.
// Data bits are launched on the strobe's falling edge, so each bit is stable
// around the strobe's rising edge. Bits are taken from a queue that the
// testbench fills with push_bit() or push_word(); when the queue is empty the
// line is low. set_offset() moves the strobe phase during a test. push_word() sends a '1' start bit and then the 32-bit word,
// most significant bit first.
module tdc_tx_model #(
  parameter int unsigned OFFSET_PS = 0
) (
  input  logic clk_ref,
  output logic strobe,
  output logic sdata
);
  timeunit 1ns;
  timeprecision 1ps;

  bit q[$];

  // Transport delay of the reference clock (every edge kept).
  initial strobe = 1'b0;
  int unsigned offset_ps = OFFSET_PS;
  always @(posedge clk_ref) fork #(offset_ps * 1ps) strobe = 1'b1; join_none
  always @(negedge clk_ref) fork #(offset_ps * 1ps) strobe = 1'b0; join_none

  initial sdata = 1'b0;
  always @(negedge strobe) sdata <= (q.size() != 0) ? q.pop_front() : 1'b0;

  function automatic void push_bit(input bit b);
    q.push_back(b);
  endfunction

  function automatic void push_word(input logic [31:0] w);
    q.push_back(1'b1);
    for (int i = 31; i >= 0; i--) q.push_back(w[i]);
  endfunction

  // Move the strobe to a new phase, as after a change of cable.
  function automatic void set_offset(input int unsigned ps);
    offset_ps = ps;
  endfunction

  function automatic int pending();
    return q.size();
  endfunction
endmodule
