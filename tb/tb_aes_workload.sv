// AES-128 encryption on the four-core network, with picnet_top at its
// default parameters. The four PicoBlaze programs are generated here,
// scheduled statically and padded with NOPs at every synchronisation point.
// All four programs have the same length and run in lock-step.
//
// Data layout (column allocation): core c holds state column c in s0..s3
// (row r in s<r>) and round-key column c in s4..s7. Per round:
//   key schedule  core 3 looks up its rotated key column in its own ROM;
//                 core 0 reads those bytes from ROM 3 and adds rcon; then
//                 each new column passes core 0 -> 1 -> 2 -> 3 over the output
//                 bars (serial, as the key schedule is)
//   rcon update   xtime with a branch balanced by NOPs (constant time)
//   SubBytes +    every core OUTPUTs row r to its own ROM, then INPUTs row r
//   ShiftRows     from the ROM of core (c+r) mod 4
//   MixColumns    local to each core, xtime again as a balanced branch
//   AddRoundKey   local XORs
// Bytes come in through each core's new-data input (plaintext column, then
// key column). The ciphertext leaves as OUTPUTs to port 0x80.
//
// Checks: block 0 against the FIPS-197 example vector, more random blocks
// against a reference AES written here, and the cycle count. Every block
// must take exactly the latency that the program structure predicts,
// whatever its data. The test also counts ROM, peer and new-data transfers
// and both arms of the balanced branches.
module tb_aes_workload;
  import picnet_pkg::*;

  localparam int NBLK = 4;
  localparam int IMEM = 1024;

  logic clk = 1'b0, rst = 1'b1;
  int   checks = 0, failures = 0;
  int   cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------ instruction words
  function automatic logic [17:0] w_ldk(int x, int k);  return {6'h00, 4'(x), 8'(k)}; endfunction
  function automatic logic [17:0] w_ld(int x, int y);   return {6'h01, 4'(x), 4'(y), 4'h0}; endfunction
  function automatic logic [17:0] w_in(int x, int p);   return {6'h04, 4'(x), 8'(p)}; endfunction
  function automatic logic [17:0] w_out(int x, int p);  return {6'h2C, 4'(x), 8'(p)}; endfunction
  function automatic logic [17:0] w_xor(int x, int y);  return {6'h0F, 4'(x), 4'(y), 4'h0}; endfunction
  function automatic logic [17:0] w_xork(int x, int k); return {6'h0E, 4'(x), 8'(k)}; endfunction
  function automatic logic [17:0] w_cmpk(int x, int k); return {6'h14, 4'(x), 8'(k)}; endfunction
  function automatic logic [17:0] w_subk(int x, int k); return {6'h1C, 4'(x), 8'(k)}; endfunction
  function automatic logic [17:0] w_sl0(int x);         return {6'h20, 4'(x), 8'h06}; endfunction
  function automatic logic [17:0] w_jmp(int a);         return {6'h34, 2'b00, 10'(a)}; endfunction
  function automatic logic [17:0] w_jz(int a);          return {6'h35, 2'b00, 10'(a)}; endfunction
  function automatic logic [17:0] w_jnz(int a);         return {6'h35, 2'b01, 10'(a)}; endfunction
  function automatic logic [17:0] w_jnc(int a);         return {6'h35, 2'b11, 10'(a)}; endfunction
  localparam logic [17:0] W_NOP = 18'h01000;
  localparam int R_T = 8, R_U = 9, R_RCON = 11, R_CNT = 12, R_A0 = 13, R_TMP = 14;
  localparam int P_LOOKUP = 'h00, P_CIPHER = 'h80;

  logic [17:0] prog [N_CORES][IMEM];
  int          plen [N_CORES];
  bit          prog_ready = 1'b0;
  int          a_round, a_jz, a_ark, a_jnz, a_out0;

  task automatic emit(int c, logic [17:0] w);
    prog[c][plen[c]] = w;
    plen[c]++;
  endtask
  task automatic emit_all(logic [17:0] w);
    for (int c = 0; c < N_CORES; c++) emit(c, w);
  endtask
  task automatic sync();
    int m = 0;
    for (int c = 0; c < N_CORES; c++) if (plen[c] > m) m = plen[c];
    for (int c = 0; c < N_CORES; c++) while (plen[c] < m) emit(c, W_NOP);
  endtask
  // x = xtime(x), 6 words, always 4 executed: SL0; JUMP NC; XOR 1B; JUMP / NOP; NOP
  task automatic xtime_all(int x);
    int h;
    sync();
    h = plen[0];
    emit_all(w_sl0(x));
    emit_all(w_jnc(h + 4));
    emit_all(w_xork(x, 'h1b));
    emit_all(w_jmp(h + 6));
    emit_all(W_NOP);
    emit_all(W_NOP);
  endtask

  task automatic build_programs();
    for (int c = 0; c < N_CORES; c++) plen[c] = 0;
    // load plaintext and key columns, initial AddRoundKey
    for (int r = 0; r < 4; r++) emit_all(w_in(r, int'(SEL_NEW)));
    for (int r = 0; r < 4; r++) emit_all(w_in(4 + r, int'(SEL_NEW)));
    emit_all(w_ldk(R_RCON, 1));
    emit_all(w_ldk(R_CNT, 10));
    for (int r = 0; r < 4; r++) emit_all(w_xor(r, 4 + r));
    sync();
    a_round = plen[0];
    // key schedule: RotWord + SubWord of column 3 through ROM 3, into column 0
    for (int r = 0; r < 4; r++) begin
      emit(3, w_out(4 + (r + 1) % 4, P_LOOKUP)); sync();
      emit(0, w_in(R_TMP, int'(SEL_ROM3)));      sync();
      emit(0, w_xor(4 + r, R_TMP));              sync();
    end
    emit(0, w_xor(4, R_RCON)); sync();
    // column c ^= new column c-1, passed over the output bars
    for (int c = 1; c < N_CORES; c++) begin
      for (int r = 0; r < 4; r++) begin
        emit(c - 1, w_out(4 + r, P_LOOKUP));
        emit(c, w_in(R_TMP, int'(SEL_PEER3)));
        sync();
        emit(c, w_xor(4 + r, R_TMP)); sync();
      end
    end
    xtime_all(R_RCON);
    // SubBytes + ShiftRows
    for (int r = 0; r < 4; r++) begin
      emit_all(w_out(r, P_LOOKUP)); sync();
      for (int c = 0; c < N_CORES; c++) emit(c, w_in(r, (c + r) % 4));
      sync();
    end
    // last round has no MixColumns
    emit_all(w_cmpk(R_CNT, 1));
    a_jz = plen[0];
    emit_all(w_jz(0));                    // target patched below
    // MixColumns: b_i = a_i ^ t ^ xtime(a_i ^ a_(i+1)), t = a0^a1^a2^a3
    emit_all(w_ld(R_A0, 0));
    emit_all(w_ld(R_T, 0));
    for (int r = 1; r < 4; r++) emit_all(w_xor(R_T, r));
    for (int i = 0; i < 4; i++) begin
      emit_all(w_ld(R_U, i));
      emit_all(w_xor(R_U, (i == 3) ? R_A0 : i + 1));
      xtime_all(R_U);
      emit_all(w_xor(R_U, R_T));
      emit_all(w_xor(i, R_U));
    end
    sync();
    a_ark = plen[0];
    for (int c = 0; c < N_CORES; c++) prog[c][a_jz] = w_jz(a_ark);
    // AddRoundKey, next round
    for (int r = 0; r < 4; r++) emit_all(w_xor(r, 4 + r));
    emit_all(w_subk(R_CNT, 1));
    a_jnz = plen[0];
    emit_all(w_jnz(a_round));
    a_out0 = plen[0];
    for (int r = 0; r < 4; r++) emit_all(w_out(r, P_CIPHER));
    emit_all(w_jmp(0));
    sync();
    for (int c = 0; c < N_CORES; c++)
      for (int a = plen[c]; a < IMEM; a++) prog[c][a] = W_NOP;
  endtask

  // ------------------------------------------------------ reference AES-128
  byte_t sb [256];
  function automatic byte_t xt(byte_t a);
    return a[7] ? byte_t'({a[6:0], 1'b0} ^ 8'h1b) : byte_t'({a[6:0], 1'b0});
  endfunction
  function automatic byte_t mul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 7; i >= 0; i--) begin p = xt(p); if (b[i]) p ^= a; end
    return p;
  endfunction
  task automatic build_sbox();
    for (int a = 0; a < 256; a++) begin
      byte_t inv = 0, r;
      for (int c = 1; c < 256; c++) if (mul(byte_t'(a), byte_t'(c)) == 8'h01) inv = byte_t'(c);
      for (int i = 0; i < 8; i++)
        r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8] ^ 1'(8'h63 >> i);
      sb[a] = r;
    end
  endtask
  // byte i of a 16-byte block is row i%4, column i/4
  task automatic aes_ref(input byte_t pt [16], input byte_t key [16], output byte_t ct [16]);
    byte_t st [16], k [16], n [16];
    byte_t rc = 8'h01;
    for (int i = 0; i < 16; i++) begin st[i] = pt[i] ^ key[i]; k[i] = key[i]; end
    for (int rnd = 1; rnd <= 10; rnd++) begin
      // key expansion
      for (int r = 0; r < 4; r++) k[r] ^= sb[k[12 + (r + 1) % 4]] ^ ((r == 0) ? rc : 8'h00);
      for (int i = 4; i < 16; i++) k[i] ^= k[i - 4];
      rc = xt(rc);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) n[4*c + r] = sb[st[4*((c + r) % 4) + r]];
      // MixColumns
      if (rnd != 10) begin
        for (int c = 0; c < 4; c++) begin
          byte_t a0 = n[4*c], a1 = n[4*c+1], a2 = n[4*c+2], a3 = n[4*c+3];
          n[4*c]   = mul(a0, 2) ^ mul(a1, 3) ^ a2 ^ a3;
          n[4*c+1] = a0 ^ mul(a1, 2) ^ mul(a2, 3) ^ a3;
          n[4*c+2] = a0 ^ a1 ^ mul(a2, 2) ^ mul(a3, 3);
          n[4*c+3] = mul(a0, 3) ^ a1 ^ a2 ^ mul(a3, 2);
        end
      end
      for (int i = 0; i < 16; i++) st[i] = n[i] ^ k[i];
    end
    ct = st;
  endtask

  // ------------------------------------------------------------- the system
  core_bus_t bus [N_CORES];
  byte_t     cin [N_CORES];
  byte_t     nd  [N_CORES];
  byte_t     od  [N_CORES];
  logic      ov  [N_CORES];
  byte_t     pipe_out;

  picnet_top u_top (
    .clk, .rst, .core_bus(bus), .core_in(cin), .new_data(nd),
    .out_data(od), .out_valid(ov), .pipe_en(1'b0), .pipe_in(8'h00), .pipe_out
  );

  byte_t pts  [NBLK][16];
  byte_t keys [NBLK][16];
  byte_t cts  [NBLK][16];
  int    feed_idx [N_CORES];
  int    out_idx  [N_CORES];
  int    t_first  [NBLK];
  int    t_last   [NBLK];
  int    n_rom_own = 0, n_rom_other = 0, n_peer = 0, n_new = 0, n_cipher = 0;
  int    n_carry = 0, n_nocarry = 0;

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    logic [7:0] pid, opt;
    logic       ws, rs;
    pblaze_model #(.IMEM_DEPTH(IMEM)) u_core (
      .clk, .rst, .port_id(pid), .out_port(opt), .write_strobe(ws),
      .read_strobe(rs), .in_port(cin[c])
    );
    assign bus[c] = '{port_id: pid, out_port: opt, write_strobe: ws, read_strobe: rs};

    initial begin
      wait (prog_ready);
      for (int a = 0; a < IMEM; a++) u_core.imem[a] = prog[c][a];
    end

    // new-data input: plaintext column c, then key column c, block by block
    always_comb begin
      automatic int b = feed_idx[c] / 8;
      automatic int j = feed_idx[c] % 8;
      if (b >= NBLK) nd[c] = 8'h00;
      else nd[c] = (j < 4) ? pts[b][4*c + j] : keys[b][4*c + j - 4];
    end

    always @(posedge clk) if (!rst) begin
      if (rs) begin
        if (pid[2:0] == 3'd7) begin
          if (c == 0 && feed_idx[c] % 8 == 0 && feed_idx[c] / 8 < NBLK) t_first[feed_idx[c] / 8] = cyc;
          feed_idx[c]++;
          n_new++;
        end
        else if (pid[2])            n_peer++;
        else if (pid[1:0] == 2'(c)) n_rom_own++;
        else                        n_rom_other++;
      end
      if (ws && pid == 8'(P_CIPHER)) begin
        automatic int b = out_idx[c] / 4;
        automatic int r = out_idx[c] % 4;
        checks++;
        if (!ov[c] || b >= NBLK || od[c] !== cts[b][4*c + r]) begin
          failures++;
          $display("FAIL block %0d byte %0d: got %02h expected %02h", b, 4*c + r, od[c],
                   (b < NBLK) ? cts[b][4*c + r] : 8'h00);
        end
        if (b < NBLK) t_last[b] = cyc;
        out_idx[c]++;
        n_cipher++;
      end
      // both arms of the balanced xtime branch
      if (u_core.phase && u_core.ir[17:10] == 8'b110101_11) begin
        if (u_core.cf) n_carry++;
        else           n_nocarry++;
      end
    end
  end

  // ------------------------------------------------------------- control
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t fips_ct [16];
    int    exp_lat, exec_before_last;
    rst = 1'b1;
    for (int c = 0; c < N_CORES; c++) begin feed_idx[c] = 0; out_idx[c] = 0; end
    build_sbox();
    // FIPS-197 appendix C.1
    for (int i = 0; i < 16; i++) begin
      pts[0][i]  = byte_t'(8'h11 * (i % 16));
      keys[0][i] = byte_t'(i);
    end
    fips_ct = '{8'h69, 8'hc4, 8'he0, 8'hd8, 8'h6a, 8'h7b, 8'h04, 8'h30,
                8'hd8, 8'hcd, 8'hb7, 8'h80, 8'h70, 8'hb4, 8'hc5, 8'h5a};
    for (int b = 1; b < NBLK; b++)
      for (int i = 0; i < 16; i++) begin
        pts[b][i]  = byte_t'($urandom);
        keys[b][i] = byte_t'($urandom);
      end
    for (int b = 0; b < NBLK; b++) aes_ref(pts[b], keys[b], cts[b]);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (cts[0][i] !== fips_ct[i]) begin
        failures++;
        $display("FAIL reference model byte %0d", i);
      end
    end
    build_programs();
    $display("program: %0d words per core, round loop %0d..%0d", plen[0], a_round, a_jnz);
    prog_ready = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (out_idx[0] == 4 * NBLK && out_idx[3] == 4 * NBLK);
    repeat (4) @(posedge clk);
    // latency predicted from the program: every instruction takes 2 clocks,
    // and each 6-word xtime executes 4 words (1 per round for rcon, 4 per
    // MixColumns)
    exec_before_last = a_round + 10 * (a_jz + 1 - a_round - 2) + 9 * (a_ark - a_jz - 1 - 4 * 2)
                     + 10 * (a_jnz + 1 - a_ark) + 3;
    exp_lat = 2 * exec_before_last;
    for (int b = 0; b < NBLK; b++) begin
      $display("block %0d: latency %0d clocks (program predicts %0d)", b, t_last[b] - t_first[b], exp_lat);
      checks++;
      if (t_last[b] - t_first[b] != exp_lat) begin
        failures++;
        $display("FAIL block %0d latency", b);
      end
    end
    $display("published 4-core figure for comparison: 1582 clocks per block");
    $display("transfers: rom_own=%0d rom_other=%0d peer=%0d new=%0d cipher=%0d; xtime carry=%0d no_carry=%0d",
             n_rom_own, n_rom_other, n_peer, n_new, n_cipher, n_carry, n_nocarry);
    checks++;
    if (n_rom_own == 0 || n_rom_other == 0 || n_peer == 0 || n_new != 32 * NBLK ||
        n_cipher != 16 * NBLK || n_carry == 0 || n_nocarry == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
