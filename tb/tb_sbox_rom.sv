// Self-checking test of sbox_rom: reads all 256 entries through the
// enabled synchronous port and compares each with an S-box computed here
// by brute-force search for the GF(2^8) inverse and the affine transform
// written bit by bit. Also checks four published S-box values, the
// one-clock latency and that dout holds while en is low.
module tb_sbox_rom;
  import picnet_pkg::byte_t;

  logic  clk = 1'b0;
  logic  en;
  byte_t addr, dout;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  sbox_rom dut (.clk, .en, .addr, .dout);

  function automatic byte_t xtime(byte_t a);
    return a[7] ? byte_t'({a[6:0], 1'b0} ^ 8'h1b) : byte_t'({a[6:0], 1'b0});
  endfunction

  function automatic byte_t mul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 7; i >= 0; i--) begin
      p = xtime(p);
      if (b[i]) p ^= a;
    end
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
    en = 1'b0; addr = '0;
    @(negedge clk);
    for (int a = 0; a < 256; a++) begin
      en = 1'b1; addr = byte_t'(a);
      @(negedge clk);
      check(dout, ref_sbox(byte_t'(a)), $sformatf("S(%02h)", a));
    end
    // published values
    en = 1'b1; addr = 8'h00; @(negedge clk); check(dout, 8'h63, "S(00) FIPS-197");
    addr = 8'h53; @(negedge clk); check(dout, 8'hed, "S(53) FIPS-197");
    addr = 8'hff; @(negedge clk); check(dout, 8'h16, "S(ff) FIPS-197");
    addr = 8'h01; @(negedge clk); check(dout, 8'h7c, "S(01) FIPS-197");
    // hold while disabled
    en = 1'b0; addr = 8'h53;
    repeat (3) @(negedge clk);
    check(dout, 8'h7c, "hold with en low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
