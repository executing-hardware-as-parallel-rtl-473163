// Behavioural model of a PicoBlaze (KCPSM3-style) 8-bit core, for
// testbenches only. Not synthesizable and not a full core.
//
// Sixteen byte registers s0..sF, a 64-byte scratchpad and a program memory
// of IMEM_DEPTH 18-bit words. The testbench fills imem before reset is
// released. Every instruction takes two clocks. port_id and out_port are
// valid for both clocks of INPUT/OUTPUT. write_strobe / read_strobe are
// high in the second clock, and INPUT takes in_port at the end of the
// second clock. Reset clears pc, flags and registers.
//
// Implemented subset, opcode in bits [17:12] (sX = [11:8], sY = [7:4],
// kk/pp = [7:0], aaa = [9:0]):
//   00/01 LOAD   04/05 INPUT  06/07 FETCH  0A/0B AND  0C/0D OR
//   0E/0F XOR    14/15 COMPARE 18/19 ADD   1C/1D SUB  2C/2D OUTPUT
//   2E/2F STORE  34 JUMP aaa  35 JUMP cond ([11:10]: Z, NZ, C, NC)
//   20    shift/rotate by [3:0]: 6 SL0, 7 SL1, 2 RL, E SR0, F SR1, C RR
// Odd opcodes take the second operand from sY, even ones from kk.
// "LOAD s0, s0" (0x01000) serves as NOP.
module pblaze_model #(
  parameter int unsigned IMEM_DEPTH = 1024
)(
  input  logic       clk,
  input  logic       rst,
  output logic [7:0] port_id,
  output logic [7:0] out_port,
  output logic       write_strobe,
  output logic       read_strobe,
  input  logic [7:0] in_port
);

  logic [17:0] imem [IMEM_DEPTH];
  logic [7:0]  s    [16];
  logic [7:0]  spm  [64];
  logic [9:0]  pc;
  logic        phase;
  logic        zf, cf;

  logic [17:0] ir;
  logic [5:0]  op;
  logic [3:0]  rx, ry;
  logic [7:0]  opb;

  assign ir  = imem[pc];
  assign op  = ir[17:12];
  assign rx  = ir[11:8];
  assign ry  = ir[7:4];
  assign opb = op[0] ? s[ry] : ir[7:0];

  wire is_in  = (op == 6'h04) || (op == 6'h05);
  wire is_out = (op == 6'h2C) || (op == 6'h2D);

  assign port_id      = (is_in || is_out) ? opb : 8'h00;
  assign out_port     = is_out ? s[rx] : 8'h00;
  assign write_strobe = phase && is_out;
  assign read_strobe  = phase && is_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc    <= '0;
      phase <= 1'b0;
      zf    <= 1'b0;
      cf    <= 1'b0;
      for (int r = 0; r < 16; r++) s[r] <= '0;
    end else begin
      phase <= ~phase;
      if (phase) begin
        logic [8:0] sum;
        logic       take;
        pc <= pc + 10'd1;
        unique case (op)
          6'h00, 6'h01: s[rx] <= opb;
          6'h04, 6'h05: s[rx] <= in_port;
          6'h06, 6'h07: s[rx] <= spm[opb[5:0]];
          6'h2E, 6'h2F: spm[opb[5:0]] <= s[rx];
          6'h0A, 6'h0B: begin s[rx] <= s[rx] & opb; zf <= (s[rx] & opb) == 0; cf <= 1'b0; end
          6'h0C, 6'h0D: begin s[rx] <= s[rx] | opb; zf <= (s[rx] | opb) == 0; cf <= 1'b0; end
          6'h0E, 6'h0F: begin s[rx] <= s[rx] ^ opb; zf <= (s[rx] ^ opb) == 0; cf <= 1'b0; end
          6'h18, 6'h19: begin
            sum = {1'b0, s[rx]} + {1'b0, opb};
            s[rx] <= sum[7:0]; zf <= sum[7:0] == 0; cf <= sum[8];
          end
          6'h1C, 6'h1D: begin
            sum = {1'b0, s[rx]} - {1'b0, opb};
            s[rx] <= sum[7:0]; zf <= sum[7:0] == 0; cf <= sum[8];
          end
          6'h14, 6'h15: begin
            sum = {1'b0, s[rx]} - {1'b0, opb};
            zf <= sum[7:0] == 0; cf <= sum[8];
          end
          6'h20: begin
            logic [7:0] v;
            logic       co;
            unique case (ir[3:0])
              4'h6: begin v = {s[rx][6:0], 1'b0};     co = s[rx][7]; end
              4'h7: begin v = {s[rx][6:0], 1'b1};     co = s[rx][7]; end
              4'h2: begin v = {s[rx][6:0], s[rx][7]}; co = s[rx][7]; end
              4'hE: begin v = {1'b0, s[rx][7:1]};     co = s[rx][0]; end
              4'hF: begin v = {1'b1, s[rx][7:1]};     co = s[rx][0]; end
              default: begin v = {s[rx][0], s[rx][7:1]}; co = s[rx][0]; end
            endcase
            s[rx] <= v; zf <= v == 0; cf <= co;
          end
          6'h34: pc <= ir[9:0];
          6'h35: begin
            unique case (ir[11:10])
              2'd0: take = zf;
              2'd1: take = !zf;
              2'd2: take = cf;
              default: take = !cf;
            endcase
            if (take) pc <= ir[9:0];
          end
          default: ;
        endcase
      end
    end
  end

endmodule
