// One cell of the response collector: a flip-flop with a data multiplexer
// and a clock multiplexer.
//
// sel = 0 (count): D = ~Q and the cell is clocked by b, so it toggles on
// every rising edge of b. sel = 1 (shift): D = a and the cell is clocked by
// m (the shift clock). Ports a, b, m, p(sel), c(Q) follow the cell drawing
// of the collector. rst_n is an added asynchronous clear.
module rc_cell (
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic m,
  input  logic sel,
  output logic c
);
  timeunit 1ns;
  timeprecision 1ps;

  logic d, clk;

  assign d   = sel ? a : ~c;
  assign clk = sel ? m : b;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) c <= 1'b0;
    else        c <= d;
endmodule
