// The 4-stage example pipeline (module pipe4 of the example design):
// four single-register stages pipe0..pipe3 in a row, i -> r5 -> r6 -> r7
// -> r8 -> o. The output is the input of four ticks earlier. This is the
// hardware description that the network runs as software: the four
// registers become four PicoBlaze registers and one tick becomes one pass
// through a six-instruction loop. The structure follows the example; the
// tick enable en and the reset are this design's additions.
//
// Ports: clk, rst (synchronous, clears all stages), en (one tick),
// i[7:0], o[7:0]. Latency 4 ticks.
module pipe4
  import picnet_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  byte_t i,
  output byte_t o
);

  byte_t a, b, c, d, e, f, g, h;

  // Wiring of the example: a = i; b = e; c = f; d = g; o = h.
  assign a = i;
  assign b = e;
  assign c = f;
  assign d = g;
  assign o = h;

  pipe_stage u_pipe0 (.clk, .rst, .en, .a(a), .b(e));
  pipe_stage u_pipe1 (.clk, .rst, .en, .a(b), .b(f));
  pipe_stage u_pipe2 (.clk, .rst, .en, .a(c), .b(g));
  pipe_stage u_pipe3 (.clk, .rst, .en, .a(d), .b(h));

endmodule
