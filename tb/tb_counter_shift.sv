// tb_counter_shift: counts random numbers of trigger pulses (including a
// wrap past 1023), checks global reset, and checks that in readout mode the
// register loads din on every PCLK edge and ignores triggers.
module tb_counter_shift;
  timeunit 1ns; timeprecision 1ps;

  localparam int CNT_W = 10;
  logic cnt_trig = 0, pclk = 0, read_en = 0, global_reset = 0;
  logic [CNT_W-1:0] din = '0, q;
  int checks = 0, failures = 0;

  counter_shift #(.CNT_W(CNT_W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  initial begin
    #1 global_reset = 1; #5 global_reset = 0; #5;
    check(q == 0, "reset value");
    for (int rep = 0; rep < 6; rep++) begin
      int n;
      n = (rep == 5) ? 1030 : $urandom % 700;
      global_reset = 1; #2 global_reset = 0; #2;
      repeat (n) begin cnt_trig = 1; #0.3 cnt_trig = 0; #0.5; end
      #1;
      check(q == CNT_W'(n), $sformatf("count %0d", n));
      read_en = 1; #2;
      for (int s = 0; s < 5; s++) begin
        logic [CNT_W-1:0] v;
        v = CNT_W'($urandom);
        din = v;
        cnt_trig = 1; #1 cnt_trig = 0; #1;
        pclk = 1; #5 pclk = 0; #5;
        check(q == v, "shift loads din");
      end
      read_en = 0; #2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
