// Self-checking test of xbar_mux: for each core position 0..3 and each of
// the eight select codes, random bar contents are applied and the output
// is compared with the source that the select code names (ROM k, peer
// core CORE+k modulo 4, or new data).
module tb_xbar_mux;
  import picnet_pkg::*;

  byte_t rom_bar [N_CORES];
  byte_t out_bar [N_CORES];
  byte_t new_data [N_CORES];
  xsel_e sel;
  byte_t dout [N_CORES];
  int    checks = 0, failures = 0;

  for (genvar c = 0; c < N_CORES; c++) begin : g_dut
    xbar_mux #(.CORE(c)) dut (.sel, .rom_bar, .out_bar, .new_data(new_data[c]), .dout(dout[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 50; rep++) begin
      for (int k = 0; k < N_CORES; k++) begin
        rom_bar[k]  = byte_t'($urandom);
        out_bar[k]  = byte_t'($urandom);
        new_data[k] = byte_t'($urandom);
      end
      for (int sv = 0; sv < N_SEL; sv++) begin
        sel = xsel_e'(sv);
        #1;
        for (int c = 0; c < N_CORES; c++) begin
          byte_t exp;
          if (sv < 4)       exp = rom_bar[sv];
          else if (sv < 7)  exp = out_bar[(c + sv - 3) % 4];
          else              exp = new_data[c];
          checks++;
          if (dout[c] !== exp) begin
            failures++;
            $display("FAIL core %0d sel %0d: got %02h expected %02h", c, sv, dout[c], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
