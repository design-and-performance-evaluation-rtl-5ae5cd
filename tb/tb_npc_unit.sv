// tb_npc_unit: random check of the next-PC adder against an independent
// byte-address computation: npc = block_base(pc) + c * BLOCK_BYTES +
// 4 * (straddle ? tail_len : off).
module tb_npc_unit;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] pc, npc;
  logic        c, straddle;
  logic [2:0]  off, tail_len;

  npc_unit #(.ADDR_W(32), .W_MAIN(8)) dut (.pc, .c, .off, .straddle, .tail_len, .npc);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int i = 0; i < 2000; i++) begin
      pc       = $urandom;
      if (i == 0) pc = 32'hFFFF_FFFC;       // carry out of the top bit wraps
      c        = 1'($urandom);
      off      = 3'($urandom);
      straddle = c & 1'($urandom);
      tail_len = 3'(1 + $urandom % 3);
      #1;
      exp = (pc & ~32'h1F) + (c ? 32'd32 : 32'd0) + 32'(straddle ? tail_len : off) * 4;
      checks++;
      if (npc !== exp) begin
        failures++;
        $display("FAIL pc=%h c=%0b off=%0d s=%0b tl=%0d npc=%h exp=%h", pc, c, off, straddle, tail_len, npc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
