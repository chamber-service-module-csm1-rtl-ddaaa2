// tb_jtag_user_regs: drives the boundary-scan user-register signals as a
// JTAG master would. Checks the USER1 reset value read back through
// capture/shift, writes random control values and reads them back, checks
// that the control output only changes on update, and reads the status
// register (USER2) after the status input changes.
module tb_jtag_user_regs;
  import csm_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int CW = CTRL_W, SW = STAT_W;
  int checks = 0, failures = 0;
  logic tck = 1'b0, rst_n = 1'b1;
  logic sel1 = 0, sel2 = 0, capture = 0, shift = 0, update = 0, tdi = 0;
  logic tdo1, tdo2;
  logic [SW-1:0] status = '0;
  logic [CW-1:0] ctrl;

  jtag_user_regs dut (.*);

  always #50 tck = ~tck;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One DR scan of `len` bits through USER1 (which=1) or USER2 (which=2):
  // Capture-DR, len x Shift-DR, Update-DR. Returns the bits shifted out.
  task automatic scan(input int which, input int len, input logic [127:0] din,
                      output logic [127:0] dout);
    @(negedge tck);
    sel1 = (which == 1); sel2 = (which == 2);
    capture = 1'b1;
    @(negedge tck);
    capture = 1'b0; shift = 1'b1;
    dout = '0;
    for (int i = 0; i < len; i++) begin
      tdi = din[i];
      dout[i] = (which == 1) ? tdo1 : tdo2;
      @(negedge tck);
    end
    shift = 1'b0; update = 1'b1;
    @(negedge tck);
    update = 1'b0; sel1 = 1'b0; sel2 = 1'b0;
  endtask

  initial begin
    logic [127:0] out;
    logic [CW-1:0] v, prev;
    logic [SW-1:0] st;
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    check(ctrl == '1, "control resets to all ones");
    scan(1, CW, 128'(19'h12345), out);
    check(out[CW-1:0] == '1, $sformatf("USER1 read of reset value %h", out[CW-1:0]));
    check(ctrl == 19'h12345, $sformatf("control after update %h", ctrl));
    prev = 19'h12345;
    for (int n = 0; n < 10; n++) begin
      v = CW'($urandom);
      // during shifting the control output must hold
      fork
        scan(1, CW, 128'(v), out);
        begin
          repeat (CW) begin
            @(posedge tck);
            if (shift) check(ctrl == prev, "control holds while shifting");
          end
        end
      join
      check(out[CW-1:0] == prev, $sformatf("USER1 readback %h expected %h", out[CW-1:0], prev));
      check(ctrl == v, $sformatf("control %h expected %h", ctrl, v));
      prev = v;
    end
    for (int n = 0; n < 5; n++) begin
      st = {$urandom, $urandom, $urandom};
      status = st;
      repeat (3) @(posedge tck);
      scan(2, SW, '0, out);
      check(out[SW-1:0] == st, $sformatf("USER2 read %h expected %h", out[SW-1:0], st));
      check(ctrl == prev, "USER2 scan leaves control alone");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
