// Input multiplexer of one core of the crossbar network (8:1).
//
// Core CORE reads one of eight sources: the four S-box ROM outputs, the
// output bars of the three other cores, or its own new-data input. The
// select is the low three bits of the port number of the core's INPUT
// instruction (see picnet_pkg for the code). Peer k (k = 1..3) is the core
// CORE+k modulo 4, so every core runs the same select codes relative to
// itself. Purely combinational: a value put on a bar in one cycle is read
// in the same cycle.
//
// The 8:1 size and its mix of four ROM, three core and one new-data input
// follow the published network; the code order is this design's choice.
module xbar_mux
  import picnet_pkg::*;
#(
  parameter int unsigned CORE = 0          // index of the core this mux feeds
)(
  input  xsel_e sel,
  input  byte_t rom_bar [N_CORES],         // S-box ROM outputs of all cores
  input  byte_t out_bar [N_CORES],         // output bars of all cores
  input  byte_t new_data,                  // this core's new-data input
  output byte_t dout
);

  always_comb begin
    unique case (sel)
      SEL_ROM0:  dout = rom_bar[0];
      SEL_ROM1:  dout = rom_bar[1];
      SEL_ROM2:  dout = rom_bar[2];
      SEL_ROM3:  dout = rom_bar[3];
      SEL_PEER1: dout = out_bar[(CORE + 1) % N_CORES];
      SEL_PEER2: dout = out_bar[(CORE + 2) % N_CORES];
      SEL_PEER3: dout = out_bar[(CORE + 3) % N_CORES];
      default:   dout = new_data;
    endcase
  end

endmodule
