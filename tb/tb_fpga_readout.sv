// tb_fpga_readout: in normal mode D must equal the pixel word present just
// before each rising PCLK edge, stable until the next one, and DCLK must
// follow PCLK; in test mode D must alternate 0, 2047, 0, ... on successive
// PCLK cycles and return to pixel data when test mode is cleared.
module tb_fpga_readout;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  logic pclk = 0, testmode = 0;
  logic [PIX_W-1:0] pix_data = '0, d;
  logic dclk;
  int checks = 0, failures = 0;

  fpga_readout dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  initial begin
    logic [PIX_W-1:0] v, last;
    for (int i = 0; i < 40; i++) begin
      v = PIX_W'($urandom);
      pix_data = v;
      #5 pclk = 1;
      #1 pix_data = PIX_W'($urandom);   // chain shifts right after the edge
      check(d == v, "captures word before the shift");
      check(dclk == 1, "DCLK follows PCLK");
      #4 pclk = 0;
      #1 check(d == v && dclk == 0, "D stable through the falling edge");
    end
    testmode = 1;
    #5;
    for (int i = 0; i < 20; i++) begin
      #5 pclk = 1; #1;
      if (i > 0) check(d == ((i % 2 == 1) ? 11'd2047 : 11'd0), $sformatf("test pattern %0d: %0d", i, d));
      #4 pclk = 0;
    end
    testmode = 0;
    v = PIX_W'($urandom); pix_data = v;
    #5 pclk = 1; #1 check(d == v, "back to pixel data");
    #4 pclk = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
