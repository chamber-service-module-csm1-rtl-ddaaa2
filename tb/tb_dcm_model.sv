// tb_dcm_model: checks the clock manager model. For a 40 MHz input the
// 90/180/270 degree outputs must rise 6.25, 12.5 and 18.75 ns after clk0,
// clk0 must equal the input, and LOCKED must rise after the lock count.
module tb_dcm_model;
  timeunit 1ns;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clkin = 1'b0, rst = 1'b1;
  logic clk0, clk90, clk180, clk270, locked;
  realtime t0, t90, t180, t270;
  int edges = 0;

  dcm_model #(.CLKIN_PERIOD_PS(25000), .LOCK_CYCLES(4)) dut (.*);

  always #12.5 clkin = ~clkin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk0)   begin t0 = $realtime; edges++; end
  always @(posedge clk90)  t90  = $realtime;
  always @(posedge clk180) t180 = $realtime;
  always @(posedge clk270) t270 = $realtime;

  function automatic bit near(input realtime a, input realtime b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  initial begin
    #1 check(locked == 1'b0, "locked low in reset");
    #30 rst = 1'b0;
    repeat (2) @(posedge clkin);
    #0.1 check(locked == 1'b0, "locked low before lock count");
    repeat (10) @(posedge clkin);
    check(locked == 1'b1, "locked after lock count");
    repeat (5) begin
      @(posedge clkin);
      #1 check(clk0 == clkin, "clk0 follows input");
      @(posedge clk270);
      check(near(t90 - t0, 6.25),  $sformatf("clk90 offset %0t", t90 - t0));
      check(near(t180 - t0, 12.5), $sformatf("clk180 offset %0t", t180 - t0));
      check(near($realtime - t0, 18.75), $sformatf("clk270 offset %0t", $realtime - t0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
