// async_fifo: the small per-TDC FIFO between the 40 MHz input side and the
// transmission clock of the multiplexer.
//
// The specification places a small FIFO after each serial-to-parallel
// channel. Its depth and clocking are not given; here it is DEPTH entries
// deep and crosses clock domains, because the words are written at 40 MHz and
// read at the transmission clock (25 MHz oscillator through a DLL).
//
// How it works: binary read and write pointers one bit wider than the
// address, converted to Gray code and passed through two-flop synchronizers
// into the other domain. Full and empty are computed from the Gray pointers
// in the usual way, so they are conservative: the writer may see "full" and
// the reader "empty" for two cycles longer than strictly needed.
//
// Interface: a write with wr_en while full is dropped and sets the sticky
// overflow flag, cleared only by reset. The read side is show-ahead: rdata is
// the oldest entry while empty is low, and rd_en removes it.
module async_fifo #(
  parameter int unsigned WIDTH = 33,
  parameter int unsigned DEPTH = 8   // power of two
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wdata,
  output logic             full,
  output logic             overflow,
  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rdata,
  output logic             empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] wgray_r1, wgray_r2;  // write pointer seen by the reader
  logic [AW:0] rgray_w1, rgray_w2;  // read pointer seen by the writer

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // Write side
  logic [AW:0] wbin_next;
  assign wbin_next = wbin + (AW+1)'(1);
  assign full = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk) begin
    if (wr_en && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      overflow <= 1'b0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      {rgray_w2, rgray_w1} <= {rgray_w1, rgray};
      if (wr_en) begin
        if (full) begin
          overflow <= 1'b1;
        end else begin
          wbin  <= wbin_next;
          wgray <= bin2gray(wbin_next);
        end
      end
    end
  end

  // Read side
  logic [AW:0] rbin_next;
  assign rbin_next = rbin + (AW+1)'(1);
  assign empty = (rgray == wgray_r2);
  assign rdata = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      {wgray_r2, wgray_r1} <= {wgray_r1, wgray};
      if (rd_en && !empty) begin
        rbin  <= rbin_next;
        rgray <= bin2gray(rbin_next);
      end
    end
  end

  initial assert (DEPTH >= 4 && (DEPTH & (DEPTH - 1)) == 0)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");
endmodule
