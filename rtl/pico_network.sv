// Crossbar network of four PicoBlaze cores, each with an S-box ROM.
//
// Each core slot has three parts. Every OUTPUT of the core drives its
// output bar and also the address of its own S-box ROM. The ROM is read on
// the write strobe, so the ROM byte is ready one clock later. An 8:1
// multiplexer picks what the core's INPUT reads: one of the four ROM
// outputs, one of the other three output bars, or the core's new-data
// input. ROM outputs can go to any core, so an AES ShiftRows move costs
// nothing beyond the S-box lookup.
//
// There is no handshake. The programs are scheduled statically: while one
// core executes OUTPUT, the core that receives the byte executes INPUT.
// A PicoBlaze instruction takes two clocks, so the bars can carry a network
// delay of NET_DELAY clocks only if NET_DELAY is even. With delay 2n, the
// receiver's INPUT comes n instructions after the sender's OUTPUT. The
// delay line delays the bar data and the write strobe together. An
// assertion checks the static schedule: when a core reads a peer's bar, that
// peer's (delayed) strobe must be high.
//
// SHARED_ROM selects the ROM arrangement. With 0 (default) each core owns
// a single-port S-box block RAM. With 1, cores 0/1 and cores 2/3 each share
// one dual-port block RAM, which halves the ROM count. The cores see no
// difference: ROM select code k still returns the last lookup made by core
// k.
//
// Core bus timing (PicoBlaze): port_id and out_port are valid for both
// clocks of an I/O instruction. write_strobe / read_strobe are high in the
// second clock. in_port is taken at the end of that second clock.
//
// From the published network: four cores, an S-box block RAM per core or
// shared by two cores, the 8:1 mux, the strobe-free static schedule and the
// even delay. This design's own choices: reading the ROM on the OUTPUT
// strobe, the select coding, which cores share a ROM, and the delay line as
// a shift register. The published design does not say whether the outside
// sees the bars; here they are brought out as out_data / out_valid.
module pico_network
  import picnet_pkg::*;
#(
  parameter int unsigned NET_DELAY  = 0, // network delay of the output bars, clocks (even)
  parameter bit          SHARED_ROM = 0  // 1: one dual-port S-box ROM per pair of cores
)(
  input  logic      clk,
  input  logic      rst,
  input  core_bus_t core_bus [N_CORES],  // I/O bus of each core
  output byte_t     core_in  [N_CORES],  // in_port of each core
  input  byte_t     new_data [N_CORES],  // new-data input of each core
  output byte_t     out_data [N_CORES],  // output bars as seen after the network delay
  output logic      out_valid[N_CORES]   // write strobe carried with out_data
);

  if (NET_DELAY % 2 != 0) begin : g_bad_delay
    $error("NET_DELAY must be a multiple of two clocks");
  end

  byte_t rom_bar [N_CORES];

  if (SHARED_ROM) begin : g_rom_pairs
    for (genvar p = 0; p < N_CORES / 2; p++) begin : g_pair
      sbox_rom_dp u_rom (
        .clk    (clk),
        .en_a   (core_bus[2*p].write_strobe),
        .addr_a (core_bus[2*p].out_port),
        .dout_a (rom_bar[2*p]),
        .en_b   (core_bus[2*p+1].write_strobe),
        .addr_b (core_bus[2*p+1].out_port),
        .dout_b (rom_bar[2*p+1])
      );
    end
  end else begin : g_rom_each
    for (genvar c = 0; c < N_CORES; c++) begin : g_one
      sbox_rom u_rom (
        .clk  (clk),
        .en   (core_bus[c].write_strobe),
        .addr (core_bus[c].out_port),
        .dout (rom_bar[c])
      );
    end
  end

  for (genvar c = 0; c < N_CORES; c++) begin : g_core

    if (NET_DELAY == 0) begin : g_direct
      assign out_data[c]  = core_bus[c].out_port;
      assign out_valid[c] = core_bus[c].write_strobe;
    end else begin : g_delay
      byte_t dly_d [NET_DELAY];
      logic  dly_v [NET_DELAY];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int s = 0; s < NET_DELAY; s++) begin
            dly_d[s] <= '0;
            dly_v[s] <= 1'b0;
          end
        end else begin
          dly_d[0] <= core_bus[c].out_port;
          dly_v[0] <= core_bus[c].write_strobe;
          for (int s = 1; s < NET_DELAY; s++) begin
            dly_d[s] <= dly_d[s-1];
            dly_v[s] <= dly_v[s-1];
          end
        end
      end
      assign out_data[c]  = dly_d[NET_DELAY-1];
      assign out_valid[c] = dly_v[NET_DELAY-1];
    end

    xsel_e sel;
    assign sel = xsel_e'(core_bus[c].port_id[SEL_W-1:0]);

    xbar_mux #(.CORE(c)) u_mux (
      .sel      (sel),
      .rom_bar  (rom_bar),
      .out_bar  (out_data),
      .new_data (new_data[c]),
      .dout     (core_in[c])
    );

    // Static schedule: a peer read must meet that peer's OUTPUT on the bar.
    a_peer_sync : assert property (@(posedge clk) disable iff (rst)
      (core_bus[c].read_strobe && sel inside {SEL_PEER1, SEL_PEER2, SEL_PEER3})
        |-> out_valid[(c + 32'(sel) - 32'(SEL_PEER1) + 1) % N_CORES])
      else $error("core %0d reads a peer bar with no OUTPUT on it", c);
  end

endmodule
