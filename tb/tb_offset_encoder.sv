// tb_offset_encoder: exhaustive check of the offset encoder for the
// document's 8-instruction block / 4-issue configuration and for a
// 16-instruction block (64-byte block). The expected enable is worked out as
// "some packet of up to N_ISSUE instructions starting here could cross the
// block end", i.e. off + N_ISSUE - 1 > W_MAIN - 1.
module tb_offset_encoder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] off8;  logic en8;
  logic [3:0] off16; logic en16;

  offset_encoder #(.W_MAIN(8),  .N_ISSUE(4)) dut8  (.off(off8),  .en(en8));
  offset_encoder #(.W_MAIN(16), .N_ISSUE(4)) dut16 (.off(off16), .en(en16));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 8; o++) begin
      off8 = 3'(o); #1;
      checks++;
      if (en8 !== (o + 3 > 7)) begin failures++; $display("FAIL W8 off=%0d en=%0b", o, en8); end
    end
    // The worked example: a packet at offset seven enables the buffer.
    off8 = 3'd7; #1; checks++; if (!en8) failures++;
    off8 = 3'd4; #1; checks++; if (en8) failures++;
    for (int o = 0; o < 16; o++) begin
      off16 = 4'(o); #1;
      checks++;
      if (en16 !== (o + 3 > 15)) begin failures++; $display("FAIL W16 off=%0d en=%0b", o, en16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
