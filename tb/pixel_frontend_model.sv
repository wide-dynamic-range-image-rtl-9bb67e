// pixel_frontend_model: behavioural model of one pixel's analog front end,
// for simulation only.
//
// The photocurrent `iph` (amperes) charges the integration node while fd_rst
// is low. When the collected charge reaches qtrip (integration capacitance
// times comparator trip voltage) the comparator output `comp` goes high; it
// goes low again as soon as fd_rst resets the node, and charging restarts
// when fd_rst is released. `tdly` (ns) is the loop delay between the node
// reaching the trip point and the comparator output rising (comparator, level
// shifting); the charge collected meanwhile is lost at the reset. A current of
// I therefore trips every qtrip/I + tdly plus the time fd_rst is held. The
// model is event driven: it schedules the next trip instead of stepping time.
// A qtrip of 15.5 fC gives about 7.75 pA for one count in a 2 ms window; a
// tdly near 1 ns bends the top of the transfer curve the way a real
// comparator loop does (at 20 uA the period is 0.78 ns of charging plus the
// delays). A change of iph takes effect at the next reset of the node.
module pixel_frontend_model (
  input  logic fd_rst,
  input  real  qtrip,     // charge to trip (C), e.g. 15.5e-15
  input  real  iph,
  input  real  tdly,      // comparator loop delay (ns)
  output logic comp
);
  timeunit 1ns; timeprecision 1ps;

  int unsigned gen = 0;      // counts resets, to discard a trip scheduled before one
  int unsigned g;

  initial comp = 1'b0;

  always @(posedge fd_rst) begin
    gen++;
    comp = 1'b0;
  end

  always begin
    if (fd_rst) @(negedge fd_rst);
    g = gen;
    wait (iph > 0.0 || g != gen);
    if (g == gen) begin
      fork
        #((qtrip / iph) * 1.0e9 + tdly);
        @(posedge fd_rst);
      join_any
      disable fork;
      if (g == gen && !fd_rst) begin
        comp = 1'b1;
        wait (fd_rst);
      end
    end
    #0;
  end
endmodule
