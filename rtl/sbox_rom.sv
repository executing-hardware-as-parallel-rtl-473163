// AES S-box in one synchronous block RAM used as a 256 x 8 ROM.
//
// Each core of the network owns one of these. The core's OUTPUT instruction
// drives the address and pulses en (the core's write strobe); the byte
// S(addr) appears on dout one clock later and is held until the next
// enabled read, so a following INPUT instruction of any core can take it
// through its multiplexer. 256 bytes of S-box in block RAM, synchronous
// read, follow the published network; the read enable tied to the
// OUTPUT strobe is this design's own choice. The contents are computed at
// elaboration with picnet_pkg::sbox_value(), so no data file is needed.
//
// Ports: clk, en (read enable), addr[7:0], dout[7:0]. Latency 1 clock.
module sbox_rom
  import picnet_pkg::*;
(
  input  logic  clk,
  input  logic  en,
  input  byte_t addr,
  output byte_t dout
);

  byte_t rom [256];

  initial begin
    for (int i = 0; i < 256; i++) rom[i] = sbox_value(byte_t'(i));
  end

  always_ff @(posedge clk) begin
    if (en) dout <= rom[addr];
  end

endmodule
