// tb_pulse_gen: checks that every comparator edge gives one pulse of the
// fixed width (0.3 ns), that an edge during the pulse's reset phase is
// ignored, and that the clear input forces the output low.
module tb_pulse_gen;
  timeunit 1ns; timeprecision 1ps;

  logic comp = 0, clr = 1, pulse;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;
  int n_pulses = 0;

  pulse_gen dut (.comp(comp), .clr(clr), .pulse(pulse));

  always @(posedge pulse) begin t_rise = $realtime; n_pulses++; end
  always @(negedge pulse) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  initial begin
    #5 clr = 0;
    #5;
    check(pulse == 0, "idle low after clear");
    for (int i = 0; i < 20; i++) begin
      realtime t_edge;
      #(1.0 + ($urandom % 100) * 0.05);
      t_edge = $realtime;
      comp = 1;
      #0.01;
      check(pulse == 1, "pulse high right after the comparator edge");
      #0.05 comp = 0;
      #1.0;
      check(pulse == 0, "pulse ended");
      check(t_rise - t_edge < 0.002, "rise at the comparator edge");
      check((t_fall - t_rise) > 0.299 && (t_fall - t_rise) < 0.301, "width 0.3 ns");
    end
    check(n_pulses == 20, "one pulse per edge");
    // an edge 0.4 ns after a trigger (pulse already ended, its delayed reset
    // still high until 0.6 ns) is ignored
    comp = 1; #0.05 comp = 0;
    #0.35 comp = 1; #0.05 comp = 0;
    #2.0;
    check(n_pulses == 21, "edge during the reset phase ignored");
    // clear forces the output low
    comp = 1; #0.1;
    clr = 1; #0.01;
    check(pulse == 0, "clear");
    clr = 0; comp = 0;
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
