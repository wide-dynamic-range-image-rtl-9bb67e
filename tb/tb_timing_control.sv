// tb_timing_control: runs several LCLK frames with random T1 counts and
// checks, in HCLK cycles: the global reset width (1 cycle) and its delay after
// LCLK rises (at most 3 cycles); INT_CLK exactly t1_count cycles after global
// reset falls, one cycle wide, once per frame; RD_EN rising within 4 cycles
// of LCLK falling and low during integration; PCLK toggling only while RD_EN
// is high, one PCLK pulse per HCLK cycle.
module tb_timing_control;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  logic hclk = 0, lclk = 0, rst = 0;
  logic [T1CNT_W-1:0] t1_count = 5;
  logic global_reset, int_clk, rd_en, pclk;
  int checks = 0, failures = 0;

  timing_control dut (.*);

  always #5 hclk = ~hclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  // cycle bookkeeping at each rising HCLK edge (sampled just after it)
  int cyc = 0, c_lrise = -1, c_lfall = -1, c_grst_rise = -1, c_grst_fall = -1;
  int c_int = -1, grst_w = 0, int_w = 0, n_int = 0, n_pclk = 0, n_rd_cyc = 0;
  logic lclk_q = 0, grst_q = 0, int_q = 0, rd_q = 0;
  bit run_mon = 0;

  always @(posedge pclk) n_pclk++;

  always @(posedge hclk) begin
    #1;
    cyc++;
    if (run_mon) begin
      if (lclk && !lclk_q) c_lrise = cyc;
      if (!lclk && lclk_q) c_lfall = cyc;
      if (global_reset && !grst_q) begin
        c_grst_rise = cyc;
        check(cyc - c_lrise <= 3, "global reset within 3 cycles of LCLK rise");
        grst_w = 0; n_int = 0;
      end
      if (global_reset) grst_w++;
      if (!global_reset && grst_q) begin
        c_grst_fall = cyc;
        check(grst_w == 1, $sformatf("global reset width %0d", grst_w));
      end
      if (int_clk && !int_q) begin
        n_int++;
        check(cyc - c_grst_fall == int'(t1_count),
              $sformatf("INT_CLK after %0d cycles, t1_count %0d", cyc - c_grst_fall, t1_count));
        int_w = 0;
      end
      if (int_clk) int_w++;
      if (!int_clk && int_q) check(int_w == 1, "INT_CLK one cycle wide");
      if (rd_en && !rd_q) begin
        check(cyc - c_lfall <= 4, "RD_EN within 4 cycles of LCLK fall");
        check(n_int == 1, "one INT_CLK per frame before readout");
      end
      if (rd_en) n_rd_cyc++;

    end
    lclk_q = lclk; grst_q = global_reset; int_q = int_clk; rd_q = rd_en;
  end

  always @(negedge hclk) begin
    #1;
    check(pclk == 1'b0, "PCLK low while HCLK low");
    if (run_mon) check(!(rd_en && global_reset), "no readout during reset");
  end

  initial begin
    #2 rst = 1;
    #21 rst = 0;
    #1000 run_mon = 1;
    for (int f = 0; f < 6; f++) begin
      t1_count = T1CNT_W'(1 + $urandom % 30);
      n_pclk = 0; n_rd_cyc = 0;
      #(3 + $urandom % 7) lclk = 1;
      #800 lclk = 0;
      #600;
      check(n_pclk > 0 && n_pclk >= n_rd_cyc - 1 && n_pclk <= n_rd_cyc + 1,
            $sformatf("PCLK pulses %0d for %0d readout cycles", n_pclk, n_rd_cyc));
      check(rd_en == 1, "still in readout while LCLK low");
    end
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
