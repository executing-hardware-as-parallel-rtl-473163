// Self-checking test of pico_network (network delay 0). The four core
// buses are driven directly with PicoBlaze I/O timing: one instruction =
// two clocks, strobes in the second clock, in_port sampled at its end. In
// each instruction slot every core randomly executes OUTPUT (a random
// byte) or INPUT from a random source: an S-box ROM that has been
// addressed before, a peer core that is executing OUTPUT in the same slot,
// or the core's new-data input. Expected values come from a scoreboard
// with its own S-box (brute-force inverse + affine transform). Also checks
// the external output bars and counts every kind of transfer. A second
// network with shared dual-port ROMs (SHARED_ROM=1) gets the same stimulus
// and must return the same bytes.
module tb_pico_network;
  import picnet_pkg::*;

  logic      clk = 1'b0, rst;
  core_bus_t core_bus [N_CORES];
  byte_t     core_in  [N_CORES];
  byte_t     new_data [N_CORES];
  byte_t     out_data [N_CORES];
  logic      out_valid[N_CORES];
  int        checks = 0, failures = 0;
  int        n_rom_own = 0, n_rom_other = 0, n_peer = 0, n_new = 0, n_out = 0;

  always #5 clk = ~clk;

  pico_network dut (.clk, .rst, .core_bus, .core_in, .new_data, .out_data, .out_valid);

  // Same stimulus into the arrangement with one dual-port ROM per core pair.
  byte_t core_in_sh  [N_CORES];
  byte_t out_data_sh [N_CORES];
  logic  out_valid_sh[N_CORES];
  pico_network #(.SHARED_ROM(1)) dut_sh (
    .clk, .rst, .core_bus, .core_in(core_in_sh), .new_data,
    .out_data(out_data_sh), .out_valid(out_valid_sh)
  );

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

  byte_t last_out [N_CORES];
  bit    rom_ok   [N_CORES];
  bit    is_out   [N_CORES];
  byte_t oval     [N_CORES];
  byte_t expv     [N_CORES];
  int    kind     [N_CORES];  // 0 rom own, 1 rom other, 2 peer, 3 new

  initial begin
    rst = 1'b1;
    for (int c = 0; c < N_CORES; c++) begin
      core_bus[c] = '0; new_data[c] = '0; rom_ok[c] = 1'b0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int slot = 0; slot < 600; slot++) begin
      // choose roles: outputs first, then inputs that may read them
      for (int c = 0; c < N_CORES; c++) begin
        is_out[c] = ($urandom % 2) == 0;
        oval[c]   = byte_t'($urandom);
        new_data[c] = byte_t'($urandom);
      end
      for (int c = 0; c < N_CORES; c++) begin
        core_bus[c] = '0;
        if (is_out[c]) begin
          core_bus[c].port_id  = byte_t'($urandom);
          core_bus[c].out_port = oval[c];
        end else begin
          automatic int choice, src;
          automatic int peers [$];
          for (int k = 1; k < N_CORES; k++) if (is_out[(c + k) % N_CORES]) peers.push_back(k);
          choice = $urandom % 3;
          if (choice == 2 && peers.size() == 0) choice = 0;
          if (choice == 0) begin
            src = $urandom % N_CORES;
            if (!rom_ok[src]) choice = 1;
          end
          if (choice == 0) begin
            core_bus[c].port_id = byte_t'(src);
            expv[c] = ref_sbox(last_out[src]);
            kind[c] = (src == c) ? 0 : 1;
          end else if (choice == 2) begin
            automatic int k = peers[$urandom % peers.size()];
            core_bus[c].port_id = byte_t'(3 + k);
            expv[c] = oval[(c + k) % N_CORES];
            kind[c] = 2;
          end else begin
            core_bus[c].port_id = {5'($urandom), 3'd7};
            expv[c] = new_data[c];
            kind[c] = 3;
          end
        end
      end
      @(negedge clk);                 // first clock of the instruction
      for (int c = 0; c < N_CORES; c++) begin
        if (is_out[c]) core_bus[c].write_strobe = 1'b1;
        else           core_bus[c].read_strobe  = 1'b1;
      end
      #4;                             // just before the edge that ends the second clock
      for (int c = 0; c < N_CORES; c++) begin
        if (!is_out[c]) begin
          check(core_in[c], expv[c], $sformatf("slot %0d core %0d kind %0d", slot, c, kind[c]));
          check(core_in_sh[c], expv[c], $sformatf("shared ROMs: slot %0d core %0d kind %0d", slot, c, kind[c]));
          case (kind[c])
            0: n_rom_own++;
            1: n_rom_other++;
            2: n_peer++;
            default: n_new++;
          endcase
        end
      end
      @(posedge clk);
      @(negedge clk);
      for (int c = 0; c < N_CORES; c++) begin
        if (is_out[c]) begin
          last_out[c] = oval[c];
          rom_ok[c]   = 1'b1;
        end
      end
    end
    $display("transfers: rom_own=%0d rom_other=%0d peer=%0d new=%0d out=%0d",
             n_rom_own, n_rom_other, n_peer, n_new, n_out);
    checks++;
    if (n_rom_own == 0 || n_rom_other == 0 || n_peer == 0 || n_new == 0 || n_out == 0) begin
      failures++;
      $display("FAIL some kind of transfer never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The external output bars must show every OUTPUT with its strobe.
  always @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < N_CORES; c++) begin
        if (core_bus[c].write_strobe) begin
          n_out++;
          checks++;
          if (!out_valid[c] || out_data[c] !== core_bus[c].out_port) begin
            failures++;
            $display("FAIL output bar of core %0d", c);
          end
        end
      end
    end
  end
endmodule
