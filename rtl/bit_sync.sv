// bit_sync: two-flop synchronizer for a vector of independent, slowly
// changing level signals (status flags, configuration bits) entering a clock
// domain. Each bit is synchronized on its own; the vector is not guaranteed
// to change as a whole, which is acceptable for independent flags.
// Latency: two clk cycles. Reset value: RESET_VAL.
module bit_sync #(
  parameter int unsigned W         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
