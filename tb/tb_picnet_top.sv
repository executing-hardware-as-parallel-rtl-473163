// End-to-end test of the network: four PicoBlaze models run hand-assembled
// programs. They are scheduled statically, with no handshake, the way
// programs produced from a cycle-based hardware description run. One
// iteration of every program (L instructions, 2L clocks) is one tick of
// the emulated hardware:
//   core 0  the 4-stage pipeline loop: out s3; load s3,s2; load s2,s1;
//           load s1,s0; input s0 <- new data; jump
//   core 1  a second 4-stage pipeline, its input taken from core 0's bar
//           in the slot of core 0's OUTPUT
//   core 2  reads core 1's bar, looks the byte up in its own S-box ROM and
//           puts S(x) on its bar
//   core 3  reads core 2's ROM directly (a ShiftRows-style move), reads
//           core 2's bar, XORs a key byte from its new-data input, looks
//           the result up in its own ROM and outputs three bytes
// System A is picnet_top with its default parameters (no network delay)
// and also runs pipe4 one tick per iteration: core 0's output must equal
// pipe4's output. System B is a pico_network with a 4-clock network delay,
// whose programs delay every peer INPUT by two instructions. Expected
// values come from a reference S-box and a queue model written here.
// System C is a pico_network with shared dual-port ROMs (SHARED_ROM=1)
// running the programs of system A.
// Counts each kind of transfer and fails if one never happened.
module tb_picnet_top;
  import picnet_pkg::*;

  localparam int unsigned N_ITER = 40;
  localparam int unsigned IMEM   = 1024;

  logic clk = 1'b0, rst;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- programs
  function automatic logic [17:0] i_ld(int x, int y);  return {6'h01, 4'(x), 4'(y), 4'h0}; endfunction
  function automatic logic [17:0] i_in(int x, int p);  return {6'h04, 4'(x), 8'(p)}; endfunction
  function automatic logic [17:0] i_out(int x);        return {6'h2C, 4'(x), 8'h00}; endfunction
  function automatic logic [17:0] i_xor(int x, int y); return {6'h0F, 4'(x), 4'(y), 4'h0}; endfunction
  function automatic logic [17:0] i_jmp(int a);        return {6'h34, 2'b00, 10'(a)}; endfunction
  localparam logic [17:0] I_NOP = 18'h01000;

  // d = network delay in instructions (0 or 2); iteration length 12 + 2d
  function automatic logic [17:0] prog_word(int core, int a, int d);
    int len = 12 + 2 * d;
    int base = ((d > 1) ? d : 1) + 1;
    if (a == len - 1) return i_jmp(0);
    case (core)
      0: case (a)
           0: return i_out(3);
           1: return i_ld(3, 2);
           2: return i_ld(2, 1);
           3: return i_ld(1, 0);
           4: return i_in(0, int'(SEL_NEW));
           default: return I_NOP;
         endcase
      1: begin
           if (a == d)        return i_in(4, int'(SEL_PEER3));
           if (a == 1)        return i_out(3);
           if (a == base)     return i_ld(3, 2);
           if (a == base + 1) return i_ld(2, 1);
           if (a == base + 2) return i_ld(1, 0);
           if (a == base + 3) return i_ld(0, 4);
           return I_NOP;
         end
      2: begin
           if (a == 1 + d) return i_in(0, int'(SEL_PEER3));
           if (a == 2 + d) return i_out(0);
           if (a == 3 + d) return i_in(1, int'(SEL_ROM2));
           if (a == 4 + d) return i_out(1);
           return I_NOP;
         end
      default: begin
           if (a == 3 + d)     return i_in(0, int'(SEL_ROM2));
           if (a == 4 + 2 * d) return i_in(1, int'(SEL_PEER3));
           if (a == 5 + 2 * d) return i_in(2, int'(SEL_NEW));
           if (a == 6 + 2 * d) return i_xor(1, 2);
           if (a == 7 + 2 * d) return i_out(1);
           if (a == 8 + 2 * d) return i_in(3, int'(SEL_ROM3));
           if (a == 9 + 2 * d) return i_out(3);
           if (a == 10 + 2 * d) return i_out(0);
           return I_NOP;
         end
    endcase
  endfunction

  // ------------------------------------------------------- reference S-box
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

  // ------------------------------------------------------------ stimulus
  byte_t in_seq  [N_ITER + 2];
  byte_t key_seq [N_ITER + 2];
  initial begin
    for (int k = 0; k < N_ITER + 2; k++) begin
      in_seq[k]  = byte_t'($urandom);
      key_seq[k] = byte_t'($urandom);
    end
  end

  function automatic byte_t x_at(int k);  // byte core 2 sees in iteration k
    return (k >= 8) ? in_seq[k - 8] : 8'h00;
  endfunction

  // counters of mechanisms
  int n_peer [3], n_rom_own [3], n_rom_other [3], n_new [3], n_ext [3];
  int n_pipe_ticks = 0, n_pipe_cmp = 0;
  int n_out3 [3];

  task automatic check(byte_t got, byte_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  // ------------------------------------------------------ the two systems
  for (genvar s = 0; s < 3; s++) begin : g_sys
    localparam int D   = (s == 1) ? 2 : 0;
    localparam int LEN = 12 + 2 * D;

    core_bus_t bus [N_CORES];
    byte_t     cin [N_CORES];
    byte_t     nd  [N_CORES];
    byte_t     od  [N_CORES];
    logic      ov  [N_CORES];
    int        cnt;
    int        iter;

    always_ff @(posedge clk) cnt <= rst ? 0 : cnt + 1;
    assign iter = cnt / (2 * LEN);

    always_comb begin
      nd[0] = in_seq[(iter < N_ITER + 2) ? iter : 0];
      nd[1] = 8'h11;
      nd[2] = 8'h22;
      nd[3] = key_seq[(iter < N_ITER + 2) ? iter : 0];
    end

    for (genvar c = 0; c < N_CORES; c++) begin : g_core
      logic [7:0] pid, opt;
      logic       ws, rs;
      pblaze_model #(.IMEM_DEPTH(IMEM)) u_core (
        .clk, .rst, .port_id(pid), .out_port(opt), .write_strobe(ws),
        .read_strobe(rs), .in_port(cin[c])
      );
      assign bus[c] = '{port_id: pid, out_port: opt, write_strobe: ws, read_strobe: rs};
      initial for (int a = 0; a < IMEM; a++) u_core.imem[a] = prog_word(c, a, D);

      always @(posedge clk) if (!rst && rs) begin
        if (pid[2:0] == 3'd7)      n_new[s]++;
        else if (pid[2] == 1'b1)   n_peer[s]++;
        else if (pid[1:0] == 2'(c)) n_rom_own[s]++;
        else                       n_rom_other[s]++;
      end
    end

    // core 3 output stream: per iteration S(x)^key, S(S(x)^key), S(x)
    always @(posedge clk) if (!rst && ov[3] && n_out3[s] < 3 * N_ITER) begin
      automatic int k = n_out3[s] / 3;
      automatic byte_t e1 = ref_sbox(x_at(k)) ^ key_seq[k];
      n_ext[s]++;
      case (n_out3[s] % 3)
        0: check(od[3], e1, $sformatf("sys %0d iter %0d S(x)^key", s, k));
        1: check(od[3], ref_sbox(e1), $sformatf("sys %0d iter %0d S(S(x)^key)", s, k));
        default: check(od[3], ref_sbox(x_at(k)), $sformatf("sys %0d iter %0d S(x) via ROM2", s, k));
      endcase
      n_out3[s]++;
    end

    // core 0 output: the input of four iterations earlier
    always @(posedge clk) if (!rst && ov[0]) begin
      automatic int k = iter;
      if (D != 0) k = (cnt - D * 2) / (2 * LEN);
      if (k < N_ITER) check(od[0], (k >= 4) ? in_seq[k - 4] : 8'h00, $sformatf("sys %0d iter %0d core 0", s, k));
    end
  end

  // System A: the top at its default parameters, with pipe4 beside it.
  logic  pipe_en;
  byte_t pipe_in, pipe_out;
  assign pipe_en = (g_sys[0].cnt % 24) == 23;
  assign pipe_in = g_sys[0].nd[0];

  picnet_top u_top (
    .clk, .rst,
    .core_bus (g_sys[0].bus), .core_in (g_sys[0].cin), .new_data (g_sys[0].nd),
    .out_data (g_sys[0].od),  .out_valid (g_sys[0].ov),
    .pipe_en, .pipe_in, .pipe_out
  );

  always @(posedge clk) if (!rst) begin
    if (pipe_en) n_pipe_ticks++;
    if (g_sys[0].ov[0] && g_sys[0].iter < N_ITER) begin
      n_pipe_cmp++;
      check(g_sys[0].od[0], pipe_out, "core 0 against pipe4");
    end
  end

  // System B: the network alone with a 4-clock network delay.
  pico_network #(.NET_DELAY(4)) u_net_dly (
    .clk, .rst,
    .core_bus (g_sys[1].bus), .core_in (g_sys[1].cin), .new_data (g_sys[1].nd),
    .out_data (g_sys[1].od),  .out_valid (g_sys[1].ov)
  );

  // System C: one dual-port S-box ROM per pair of cores.
  pico_network #(.SHARED_ROM(1)) u_net_shared (
    .clk, .rst,
    .core_bus (g_sys[2].bus), .core_in (g_sys[2].cin), .new_data (g_sys[2].nd),
    .out_data (g_sys[2].od),  .out_valid (g_sys[2].ov)
  );

  // ------------------------------------------------------------- control
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (g_sys[1].iter == N_ITER + 1);
    @(negedge clk);
    for (int s = 0; s < 3; s++) begin
      $display("system %0d: peer=%0d rom_own=%0d rom_other=%0d new=%0d core3_out=%0d",
               s, n_peer[s], n_rom_own[s], n_rom_other[s], n_new[s], n_ext[s]);
      checks++;
      if (n_peer[s] == 0 || n_rom_own[s] == 0 || n_rom_other[s] == 0 || n_new[s] == 0 ||
          n_ext[s] < 3 * N_ITER) begin
        failures++;
        $display("FAIL system %0d: a transfer kind never happened", s);
      end
    end
    $display("pipe4 ticks=%0d compared=%0d", n_pipe_ticks, n_pipe_cmp);
    checks++;
    if (n_pipe_ticks < N_ITER || n_pipe_cmp < N_ITER - 1) begin
      failures++;
      $display("FAIL pipe4 comparison too short");
    end
    // cycle count: an iteration of L instructions takes exactly 2L clocks
    checks++;
    if (g_sys[0].iter != (g_sys[1].cnt / 24)) begin
      failures++;
      $display("FAIL iteration count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
