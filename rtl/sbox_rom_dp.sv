// AES S-box in one dual-port block RAM shared by two cores.
//
// This is the alternative ROM arrangement: instead of one block RAM per
// core, a pair of cores shares one block RAM through its two ports. Each
// port behaves like sbox_rom: its core's OUTPUT strobe (en_a / en_b) reads
// S(addr) into that port's output register, ready one clock later and held
// until the next enabled read. The two ports are independent, so both
// cores may look up a byte in the same clock. Sharing a ROM between two
// cores through a dual-port block RAM follows the published network; the
// port behaviour is the same choice as in sbox_rom.
//
// Ports: clk; port A en_a, addr_a[7:0], dout_a[7:0]; port B likewise.
module sbox_rom_dp
  import picnet_pkg::*;
(
  input  logic  clk,
  input  logic  en_a,
  input  byte_t addr_a,
  output byte_t dout_a,
  input  logic  en_b,
  input  byte_t addr_b,
  output byte_t dout_b
);

  byte_t rom [256];

  initial begin
    for (int i = 0; i < 256; i++) rom[i] = sbox_value(byte_t'(i));
  end

  always_ff @(posedge clk) begin
    if (en_a) dout_a <= rom[addr_a];
  end

  always_ff @(posedge clk) begin
    if (en_b) dout_b <= rom[addr_b];
  end

endmodule
