// tb_main_data_array: random whole-line writes and reads against a reference
// copy of the lines; also checks that a write lands on the clock edge only.
module tb_main_data_array;
  localparam int SETS = 512, W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0] rd_idx, wr_idx;
  logic wr_en;
  logic [W-1:0][31:0] rd_row, wr_row;

  main_data_array #(.SETS(SETS), .W_MAIN(W), .INST_W(32)) dut (.*);

  logic [W-1:0][31:0] ref_row [SETS];
  logic               written [SETS];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_idx = 0; wr_idx = 0; wr_row = '0;
    for (int i = 0; i < SETS; i++) written[i] = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_idx = 9'($urandom % 128);
      for (int k = 0; k < W; k++) wr_row[k] = $urandom;
      wr_en  = 1'($urandom % 2);
      rd_idx = wr_idx; #1;
      if (written[wr_idx]) begin
        checks++;   // before the edge the old line is still read
        if (rd_row !== ref_row[wr_idx]) begin failures++; $display("FAIL early write idx=%0d", wr_idx); end
      end
      if (wr_en) begin ref_row[wr_idx] = wr_row; written[wr_idx] = 1; end
      @(posedge clk); #1;
      wr_en = 0;
      rd_idx = 9'($urandom % 128); #1;
      if (written[rd_idx]) begin
        checks++;
        if (rd_row !== ref_row[rd_idx]) begin failures++; $display("FAIL read idx=%0d", rd_idx); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
