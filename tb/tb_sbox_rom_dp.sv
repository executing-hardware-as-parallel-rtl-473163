// Self-checking test of sbox_rom_dp: both ports read all 256 entries at the
// same time, port B in reverse order, and each result is compared with an
// S-box computed here a different way (brute-force inverse, bitwise affine
// map). Then each port is disabled in turn: its output must hold while the
// other port keeps reading, with one clock of latency.
module tb_sbox_rom_dp;
  import picnet_pkg::byte_t;

  logic  clk = 1'b0;
  logic  en_a, en_b;
  byte_t addr_a, addr_b, dout_a, dout_b;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox_rom_dp dut (.clk, .en_a, .addr_a, .dout_a, .en_b, .addr_b, .dout_b);

  function automatic byte_t xtime(byte_t a);
    return a[7] ? byte_t'({a[6:0], 1'b0} ^ 8'h1b) : byte_t'({a[6:0], 1'b0});
  endfunction
  function automatic byte_t mul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 7; i >= 0; i--) begin p = xtime(p); if (b[i]) p ^= a; end
    return p;
  endfunction
  function automatic byte_t ref_sbox(byte_t a);
    byte_t inv = 0, r;
    for (int c = 1; c < 256; c++) if (mul(a, byte_t'(c)) == 8'h01) inv = byte_t'(c);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ 1'(8'h63 >> i);
    return r;
  endfunction

  task automatic check(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_a = 1'b0; en_b = 1'b0; addr_a = '0; addr_b = '0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      en_a = 1'b1; addr_a = byte_t'(a);
      en_b = 1'b1; addr_b = byte_t'(255 - a);
      @(negedge clk);
      check(dout_a, ref_sbox(byte_t'(a)), $sformatf("A S(%02h)", a));
      check(dout_b, ref_sbox(byte_t'(255 - a)), $sformatf("B S(%02h)", 255 - a));
    end
    // port A holds while B reads
    en_a = 1'b0; addr_a = 8'h00; en_b = 1'b1; addr_b = 8'h53;
    @(negedge clk);
    check(dout_a, 8'h16, "A holds S(ff)");
    check(dout_b, 8'hed, "B S(53)");
    // port B holds while A reads
    en_a = 1'b1; addr_a = 8'h01; en_b = 1'b0; addr_b = 8'h00;
    @(negedge clk);
    check(dout_a, 8'h7c, "A S(01)");
    check(dout_b, 8'hed, "B holds S(53)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
