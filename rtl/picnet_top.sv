// Top level: the PicoBlaze crossbar network beside the example pipeline.
//
// The network (pico_network) is the hardware that runs the cycle-based
// description as parallel software. The PicoBlaze cores are a vendor soft
// processor and are not part of this RTL. Each core's I/O bus therefore
// comes out as ports: a core drives core_bus[c] and reads core_in[c]. The
// new-data inputs and the output bars are ports too.
//
// pipe4 is the 4-stage pipeline used as the worked example of the mapping.
// It sits beside the network as its own design with its own ports. It is
// the hardware form of the program that one core runs (out s3; load
// s3,s2; load s2,s1; load s1,s0; input s0; jump), so both can be compared.
// pipe_en gives pipe4 one tick of its own clock.
//
// Parameters: NET_DELAY, the network delay of the output bars in clocks
// (even); SHARED_ROM, 0 for one S-box ROM per core, 1 for one dual-port
// ROM per pair of cores.
module picnet_top
  import picnet_pkg::*;
#(
  parameter int unsigned NET_DELAY  = 0,
  parameter bit          SHARED_ROM = 0
)(
  input  logic      clk,
  input  logic      rst,
  // network
  input  core_bus_t core_bus [N_CORES],
  output byte_t     core_in  [N_CORES],
  input  byte_t     new_data [N_CORES],
  output byte_t     out_data [N_CORES],
  output logic      out_valid[N_CORES],
  // example pipeline
  input  logic      pipe_en,
  input  byte_t     pipe_in,
  output byte_t     pipe_out
);

  pico_network #(.NET_DELAY(NET_DELAY), .SHARED_ROM(SHARED_ROM)) u_net (
    .clk, .rst, .core_bus, .core_in, .new_data, .out_data, .out_valid
  );

  pipe4 u_pipe4 (
    .clk, .rst, .en(pipe_en), .i(pipe_in), .o(pipe_out)
  );

endmodule
