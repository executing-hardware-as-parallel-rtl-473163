// Self-checking test of pipe4: random bytes go in on random enable ticks;
// the output must equal the input of four ticks earlier (zero before
// four ticks after reset) and must not move on cycles without a tick.
module tb_pipe4;
  import picnet_pkg::byte_t;

  logic  clk = 1'b0, rst, en;
  byte_t i, o;
  byte_t hist [$];
  int    checks = 0, failures = 0, ticks = 0;

  always #5 clk = ~clk;

  pipe4 dut (.clk, .rst, .en, .i, .o);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; en = 1'b0; i = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 4; k++) hist.push_back(8'h00);
    for (int n = 0; n < 1000; n++) begin
      en = ($urandom % 3) != 0;
      i  = byte_t'($urandom);
      @(negedge clk);
      if (en) begin
        hist.push_back(i);
        void'(hist.pop_front());
        ticks++;
      end
      checks++;
      if (o !== hist[0]) begin
        failures++;
        $display("FAIL cycle %0d: o=%02h expected %02h", n, o, hist[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
