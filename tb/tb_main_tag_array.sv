// tb_main_tag_array: random refills and lookups against a reference copy of
// valid bits, tags and length rows kept in the testbench. Checks that reset
// clears every valid bit, that hit needs valid and an equal tag, and that the
// length row read back is the one written.
module tb_main_tag_array;
  localparam int SETS = 512, TAG_W = 18, W = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [8:0] rd_idx, wr_idx;
  logic [TAG_W-1:0] rd_tag, wr_tag;
  logic rd_hit, wr_en;
  logic [W-1:0] rd_c, wr_c;
  logic [W-1:0][2:0] rd_off, wr_off;

  main_tag_array #(.SETS(SETS), .TAG_W(TAG_W), .W_MAIN(W)) dut (.*);

  logic              rv [SETS];
  logic [TAG_W-1:0]  rt [SETS];
  logic [W-1:0]      rc [SETS];
  logic [W-1:0][2:0] ro [SETS];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(int idx, logic [TAG_W-1:0] tag);
    rd_idx = 9'(idx); rd_tag = tag; #1;
    checks++;
    if (rd_hit !== (rv[idx] && rt[idx] == tag)) begin
      failures++; $display("FAIL hit idx=%0d", idx);
    end
    if (rv[idx]) begin
      checks++;
      if (rd_c !== rc[idx] || rd_off !== ro[idx]) begin failures++; $display("FAIL len idx=%0d", idx); end
    end
  endtask

  initial begin
    rst_n = 0; wr_en = 0; rd_idx = 0; rd_tag = 0; wr_idx = 0; wr_tag = 0; wr_c = 0; wr_off = 0;
    for (int i = 0; i < SETS; i++) rv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < SETS; i++) check_read(i, rt[i]);  // all must miss
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      wr_en  = 1'($urandom % 2);
      wr_idx = 9'($urandom % 64);
      wr_tag = TAG_W'($urandom % 4);
      wr_c   = W'($urandom);
      wr_off = 24'($urandom);
      if (wr_en) begin rv[wr_idx] = 1; rt[wr_idx] = wr_tag; rc[wr_idx] = wr_c; ro[wr_idx] = wr_off; end
      @(posedge clk); #1;
      wr_en = 0;
      check_read($urandom % 64, TAG_W'($urandom % 4));
    end
    // reset clears valid bits but leaves tags: lines written before must now miss
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      rd_idx = 9'(i); rd_tag = rt[i]; #1;
      checks++;
      if (rd_hit) begin failures++; $display("FAIL hit after reset idx=%0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
