// tdc_deserializer: turns one TDC's bit stream into 32-bit words.
//
// The specification says only that each TDC's data arrive serially and that
// the extracted parallel word goes into a small FIFO. The framing is this
// design's assumption: the line idles low, a word starts with a '1' start bit
// and is followed by WORD_W data bits, most significant bit first. A new start
// bit may follow the last data bit immediately, so a word takes at least
// WORD_W+1 bit periods.
//
// Besides the word, the block delivers its parity bit, the XOR of all of its
// bits; the multiplexer collects these into its spacer word.
//
// Interface: bit_i is taken on clk cycles where bit_valid is high. word_o and
// parity_o are valid for the single cycle word_valid is high, one cycle after
// the last data bit was taken.
module tdc_deserializer #(
  parameter int unsigned WORD_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              bit_i,
  input  logic              bit_valid,
  output logic [WORD_W-1:0] word_o,
  output logic              parity_o,
  output logic              word_valid
);
  localparam int unsigned CW = $clog2(WORD_W + 1);

  typedef enum logic {IDLE, DATA} state_t;
  state_t            state;
  logic [CW-1:0]     count;   // data bits still to come
  logic [WORD_W-2:0] shreg;   // bits received so far
  logic              par;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      count      <= '0;
      shreg      <= '0;
      par        <= 1'b0;
      word_o     <= '0;
      parity_o   <= 1'b0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        unique case (state)
          IDLE: if (bit_i) begin
            state <= DATA;
            count <= CW'(WORD_W);
            par   <= 1'b0;
          end
          DATA: begin
            shreg <= {shreg[WORD_W-3:0], bit_i};
            par   <= par ^ bit_i;
            count <= count - CW'(1);
            if (count == CW'(1)) begin
              state      <= IDLE;
              word_o     <= {shreg, bit_i};
              parity_o   <= par ^ bit_i;
              word_valid <= 1'b1;
            end
          end
        endcase
      end
    end
  end
endmodule
