// tb_pixel_array: a 3 x 4 array whose comparator inputs are driven directly.
// Some pixels trip before INT_CLK (they must stop at T1 with the window flag
// set and ignore later trips), the others only after it (they must keep
// counting). The readout must deliver word j from the pixel at row j/NCOLS,
// column NCOLS-1-j%NCOLS, one word per PCLK cycle, and zeros after the last.
module tb_pixel_array;
  timeunit 1ns; timeprecision 1ps;
  import droic_pkg::*;

  localparam int NROWS = 3, NCOLS = 4, NPIX = NROWS * NCOLS;

  logic comp [NPIX];
  logic fd_rst [NPIX];
  logic global_reset = 0, int_clk = 0, read_en = 0, pclk = 0;
  pix_word_t dout;
  int checks = 0, failures = 0;
  int n_early [NPIX], n_late [NPIX];

  pixel_array #(.NROWS(NROWS), .NCOLS(NCOLS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $realtime); end
  endtask

  task automatic trips(input int p, input int n);
    repeat (n) begin comp[p] = 1; #0.2 comp[p] = 0; #1.3; end
  endtask

  initial begin
    foreach (comp[p]) comp[p] = 0;
    for (int rep = 0; rep < 3; rep++) begin
      #1 global_reset = 1; #5 global_reset = 0; #5;
      foreach (n_early[p]) begin
        n_early[p] = ($urandom % 3 == 0) ? 0 : 1 + $urandom % 40;
        n_late[p]  = 1 + $urandom % 40;
      end
      for (int p = 0; p < NPIX; p++) trips(p, n_early[p]);
      int_clk = 1; #5 int_clk = 0; #5;
      for (int p = 0; p < NPIX; p++) begin
        check(fd_rst[p] == (n_early[p] > 0), "stopped pixels hold their front end in reset");
        trips(p, n_late[p]);
      end
      read_en = 1; #5;
      for (int j = 0; j < NPIX + 2; j++) begin
        pix_word_t exp;
        if (j < NPIX) begin
          int r, c, p;
          r = j / NCOLS; c = NCOLS - 1 - j % NCOLS; p = r * NCOLS + c;
          exp.win_t1 = (n_early[p] > 0);
          exp.cnt    = CNT_W'(n_early[p] > 0 ? n_early[p] : n_late[p]);
        end else exp = '0;
        check(dout == exp, $sformatf("word %0d: got %0d/%0d exp %0d/%0d", j,
                                     dout.win_t1, dout.cnt, exp.win_t1, exp.cnt));
        #5 pclk = 1; #5 pclk = 0;
      end
      read_en = 0;
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
