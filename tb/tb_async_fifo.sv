// tb_async_fifo: the FIFO written at 40 MHz and read at 25 MHz.
// Phase 1: random writes and reads; every word read must be the next word
// written (scoreboard), none lost while not full. Phase 2: reader stopped,
// writes until full: exactly DEPTH words fit, the next write sets the sticky
// overflow flag and is dropped, and the DEPTH stored words read back in order.
module tb_async_fifo;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int W = 33, D = 8;
  int checks = 0, failures = 0;
  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b1, rrst_n = 1'b1;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, overflow, empty;
  logic [W-1:0] sb [$];
  int nread = 0, nwritten = 0;
  bit rd_random = 1'b1, wr_random = 1'b1;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #12.5 wclk = ~wclk;
  always #20   rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Writer
  always @(posedge wclk) begin
    if (wr_en && !full) begin
      sb.push_back(wdata);
      nwritten++;
    end
    if (wr_random && wrst_n) begin
      wr_en <= ($urandom_range(0, 3) == 0);
      wdata <= {$urandom, 1'($urandom)};
    end
  end

  // Reader
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      logic [W-1:0] e;
      e = sb.pop_front();
      check(rdata == e, $sformatf("read %h expected %h", rdata, e));
      nread++;
    end
    if (rd_random && rrst_n) rd_en <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    #1 {wrst_n, rrst_n} = 2'b00;
    #100 {wrst_n, rrst_n} = 2'b11;
    check(empty && !full && !overflow, "empty after reset");
    #20us;
    // drain
    wr_random = 1'b0; wr_en <= 1'b0;
    #2us;
    check(empty, "empty after drain");
    check(nread == nwritten && nread > 100, $sformatf("read %0d of %0d", nread, nwritten));
    check(!overflow, "no overflow while reading");
    // fill with the reader stopped
    rd_random = 1'b0; rd_en <= 1'b0;
    @(posedge wclk);
    for (int i = 0; i < D + 3; i++) begin
      wr_en <= 1'b1; wdata <= W'(i + 100);
      @(posedge wclk);
    end
    wr_en <= 1'b0;
    @(posedge wclk);
    check(full, "full after DEPTH writes");
    check(overflow, "overflow set by write into full FIFO");
    check(sb.size() == D, $sformatf("stored %0d, expected %0d", sb.size(), D));
    #1us;
    rd_en <= 1'b1;
    #2us;
    check(empty, "drained");
    check(sb.size() == 0, "all stored words read");
    check(overflow, "overflow sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
