// One stage of the 4-stage example pipeline: an 8-bit register r with
// next value a and output b = r (module pipe0 of the example design). The
// register advances when en is high; en stands for one tick of the
// example's own clock, which the network emulates over many real cycles.
// The enable and the synchronous reset to zero are this design's additions.
module pipe_stage
  import picnet_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  byte_t a,
  output byte_t b
);

  byte_t r;

  always_ff @(posedge clk) begin
    if (rst)     r <= '0;
    else if (en) r <= a;
  end

  assign b = r;

endmodule
