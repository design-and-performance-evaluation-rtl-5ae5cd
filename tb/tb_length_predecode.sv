// tb_length_predecode: random end-of-packet patterns; for every slot the
// expected carry bit and next offset are found by walking forward to the
// first marked slot, as the length-field definition states.
module tb_length_predecode;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]       stop;
  logic [7:0]       c;
  logic [7:0][2:0]  off;

  length_predecode #(.W_MAIN(8)) dut (.stop, .c, .off);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 600; t++) begin
      stop = (t < 256) ? 8'(t) : 8'($urandom);
      #1;
      for (int i = 0; i < 8; i++) begin
        int j;
        logic ec; int eo;
        j = i;
        while (j < 8 && !stop[j]) j++;
        // j == 8: no mark (straddle); j == 7: ends at block end
        ec = (j >= 7);
        eo = (j >= 7) ? 0 : j + 1;
        checks++;
        if (c[i] !== ec || int'(off[i]) != eo) begin
          failures++;
          $display("FAIL stop=%b slot %0d c=%0b off=%0d exp %0b %0d", stop, i, c[i], off[i], ec, eo);
        end
      end
    end
    // Section 3 example: packet A starts at slot 7 and straddles.
    stop = 8'b0001_0000; #1;
    checks++; if (!(c[7] && off[7] == 0)) failures++;
    checks++; if (!(c[5] == 1'b1)) failures++;
    checks++; if (!(c[2] == 1'b0 && off[2] == 3'd5)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
