// s2p_unit: the serial-to-parallel unit, one channel per TDC card.
//
// Every channel is a phase_sampler, which reads the TDC stream on the best
// of the four DCM clock phases, a tdc_deserializer, which frames 32-bit words
// and their parity, and an async_fifo, which holds the words until the
// multiplexer, running on the transmission clock, takes them. The structure
// (phase selection, word extraction, small FIFO per TDC) follows the
// specification; the inner workings of each part are this design's own.
//
// Interface: strobe/sdata are the raw TDC inputs. rd_en/rdata/empty form a
// show-ahead read port per TDC in the rclk domain. overflow, locked and
// phase are status in the clk0 domain.
module s2p_unit
  import csm_pkg::*;
#(
  parameter int unsigned N          = N_TDC,
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                clk0,
  input  logic                clk90,
  input  logic                clk180,
  input  logic                clk270,
  input  logic                rst_n,
  input  logic                rclk,
  input  logic                rrst_n,
  input  logic [N-1:0]        strobe,
  input  logic [N-1:0]        sdata,
  input  logic [N-1:0]        rd_en,
  output fifo_entry_t [N-1:0] rdata,
  output logic [N-1:0]        empty,
  output logic [N-1:0]        overflow,
  output logic [N-1:0]        locked,
  output logic [N-1:0][1:0]   phase
);
  for (genvar i = 0; i < N; i++) begin : g_ch
    logic              bit_s, bit_v;
    logic [WORD_W-1:0] word;
    logic              par, word_v, full;

    phase_sampler u_ps (
      .clk0, .clk90, .clk180, .clk270, .rst_n,
      .strobe    (strobe[i]),
      .sdata     (sdata[i]),
      .bit_o     (bit_s),
      .bit_valid (bit_v),
      .phase_o   (phase[i]),
      .locked    (locked[i])
    );

    tdc_deserializer #(.WORD_W(WORD_W)) u_des (
      .clk        (clk0),
      .rst_n,
      .bit_i      (bit_s),
      .bit_valid  (bit_v),
      .word_o     (word),
      .parity_o   (par),
      .word_valid (word_v)
    );

    async_fifo #(.WIDTH(ENTRY_W), .DEPTH(FIFO_DEPTH)) u_fifo (
      .wclk     (clk0),
      .wrst_n   (rst_n),
      .wr_en    (word_v),
      .wdata    ({par, word}),
      .full     (full),
      .overflow (overflow[i]),
      .rclk,
      .rrst_n,
      .rd_en    (rd_en[i]),
      .rdata    (rdata[i]),
      .empty    (empty[i])
    );
  end
endmodule
