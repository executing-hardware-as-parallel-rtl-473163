// Shared types and constants of the PicoBlaze crossbar network.
//
// The network joins four 8-bit PicoBlaze cores. Each core owns one BlockRAM
// that holds the AES S-box, and each core reads through an 8:1 input
// multiplexer. The select code of that multiplexer is the low three bits of
// the port number of the core's INPUT instruction:
//   0..3  output of the S-box ROM of core 0..3 (the "blockram bars")
//   4..6  output bar of the core 1, 2 or 3 places further on (modulo 4)
//   7     the core's own new-data input
// The four-core size, the 8:1 multiplexer, its input mix and the S-box ROMs
// follow the published network; the select-code order and the
// relative numbering of the peer cores are this design's own choice.
//
// sbox_value() computes the AES S-box entry (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1, followed by the affine transform with
// constant 0x63), so the ROM contents need no data file.
package picnet_pkg;

  localparam int unsigned N_CORES = 4;   // PicoBlaze cores in the network
  localparam int unsigned DATA_W  = 8;   // PicoBlaze data width
  localparam int unsigned N_SEL   = 8;   // inputs of each core's multiplexer
  localparam int unsigned SEL_W   = $clog2(N_SEL);

  typedef logic [DATA_W-1:0] byte_t;

  typedef enum logic [SEL_W-1:0] {
    SEL_ROM0  = 3'd0,
    SEL_ROM1  = 3'd1,
    SEL_ROM2  = 3'd2,
    SEL_ROM3  = 3'd3,
    SEL_PEER1 = 3'd4,
    SEL_PEER2 = 3'd5,
    SEL_PEER3 = 3'd6,
    SEL_NEW   = 3'd7
  } xsel_e;

  // I/O bus of one PicoBlaze core as the network sees it.
  typedef struct packed {
    byte_t port_id;       // port number of INPUT / OUTPUT
    byte_t out_port;      // data of OUTPUT
    logic  write_strobe;  // second cycle of OUTPUT
    logic  read_strobe;   // second cycle of INPUT
  } core_bus_t;

  // Multiply in GF(2^8) with the AES polynomial.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p;
    byte_t x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = x[7] ? byte_t'({x[6:0], 1'b0} ^ 8'h1b) : byte_t'({x[6:0], 1'b0});
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 maps to 0), by square-and-multiply:
  // 254 = 0b11111110.
  function automatic byte_t gf_inv(byte_t a);
    byte_t r;
    r = 8'h01;
    for (int i = 7; i >= 0; i--) begin
      r = gf_mul(r, r);
      if (i != 0) r = gf_mul(r, a);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t v, int unsigned n);
    return byte_t'((v << n) | (v >> (8 - n)));
  endfunction

  function automatic byte_t sbox_value(byte_t a);
    byte_t b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

endpackage
