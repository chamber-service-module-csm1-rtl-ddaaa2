// csm_mux: the multiplexer that builds the single output stream.
//
// Following the specification, the multiplexer visits the TDCs in turn,
// TDC 0 to TDC N-1, one output word per visit. If the TDC's FIFO holds a word
// it is sent; otherwise an empty word is sent. After the last TDC a spacer
// word closes the frame; it carries one parity bit per TDC, taken from the
// word that TDC sent in this frame (0 for an empty word). The output stream
// is therefore
//   TDC0, TDC1, ..., TDC(N-1), spacer, TDC0, ...
// one word per transmission clock cycle, a frame of N+1 cycles.
//
// This design's own choices: the empty and spacer encodings (csm_pkg), the
// per-TDC enable (a disabled TDC's slot always carries an empty word and its
// FIFO is not read), and the run input, which when low stops the rotation
// and drives tx_en low. Every frame starts at TDC 0 when run rises.
//
// Interface: fifo_rdata/fifo_empty/fifo_rd_en is a show-ahead read port per
// TDC. tx_data/tx_en/tx_er go to the serializer's parallel input and are
// registered: the word chosen in a slot appears on tx_data one cycle later.
// tx_er is always 0.
module csm_mux
  import csm_pkg::*;
#(
  parameter int unsigned N = N_TDC
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic [N-1:0]        tdc_enable,
  input  fifo_entry_t [N-1:0] fifo_rdata,
  input  logic [N-1:0]        fifo_empty,
  output logic [N-1:0]        fifo_rd_en,
  output logic [WORD_W-1:0]   tx_data,
  output logic                tx_en,
  output logic                tx_er
);
  localparam int unsigned SW = $clog2(N + 1);

  logic [SW-1:0] slot;      // 0..N-1: TDC slots, N: spacer
  logic [N-1:0]  par;       // parity bits collected in this frame
  logic          take;      // current TDC slot has a word to send
  logic [WORD_W-1:0] word;

  always_comb begin
    fifo_rd_en = '0;
    take       = 1'b0;
    word       = EMPTY_WORD;
    if (run) begin
      if (slot == SW'(N)) begin
        word = spacer_word(N_TDC'(par));
      end else begin
        take = tdc_enable[slot] & ~fifo_empty[slot];
        fifo_rd_en[slot] = take;
        if (take) word = fifo_rdata[slot].word;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot    <= '0;
      par     <= '0;
      tx_data <= EMPTY_WORD;
      tx_en   <= 1'b0;
    end else begin
      tx_data <= word;
      tx_en   <= run;
      if (!run) begin
        slot <= '0;
      end else if (slot == SW'(N)) begin
        slot <= '0;
      end else begin
        par[slot] <= take & fifo_rdata[slot].parity;
        slot      <= slot + SW'(1);
      end
    end
  end

  assign tx_er = 1'b0;

  initial assert (N <= N_TDC) else $error("csm_mux: the spacer holds at most %0d parity bits", N_TDC);

  // A FIFO is only read in its own slot, and only when it holds a word.
  a_rd_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(fifo_rd_en));
  a_rd_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                  (fifo_rd_en & fifo_empty) == '0);
endmodule
