// tb_expansion_buffer: random fills and reads against a reference of the
// direct-mapped buffer (entry = low block-address bits, tag = the rest).
// Checks that a disabled read never hits and returns zeros, that block
// addresses sharing an entry evict each other, and that reset clears it.
module tb_expansion_buffer;
  localparam int E = 32, WE = 3, BA = 27;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, conflicts = 0;

  logic rst_n, rd_en, rd_hit, wr_en;
  logic [BA-1:0] rd_baddr, wr_baddr;
  logic [WE-1:0][31:0] rd_insts, wr_insts;

  expansion_buffer #(.ENTRIES(E), .W_EXP(WE), .BA_W(BA), .INST_W(32)) dut (.*);

  logic                rv [E];
  logic [BA-1:0]       rb [E];
  logic [WE-1:0][31:0] rd_ref [E];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; rd_en = 0; wr_en = 0; rd_baddr = 0; wr_baddr = 0; wr_insts = '0;
    for (int i = 0; i < E; i++) rv[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      wr_en    = 1'($urandom % 2);
      wr_baddr = BA'($urandom % 96);   // three block addresses per entry
      for (int k = 0; k < WE; k++) wr_insts[k] = $urandom;
      if (wr_en) begin
        int e; e = wr_baddr % E;
        if (rv[e] && rb[e] != wr_baddr) conflicts++;
        rv[e] = 1; rb[e] = wr_baddr; rd_ref[e] = wr_insts;
      end
      @(posedge clk); #1;
      wr_en    = 0;
      rd_en    = 1'($urandom % 4 != 0);
      rd_baddr = BA'($urandom % 96);
      #1;
      begin
        int e; logic exp_hit;
        e = rd_baddr % E;
        exp_hit = rd_en && rv[e] && rb[e] == rd_baddr;
        checks++;
        if (rd_hit !== exp_hit) begin failures++; $display("FAIL hit ba=%0d en=%0b", rd_baddr, rd_en); end
        if (exp_hit) begin
          checks++;
          if (rd_insts !== rd_ref[e]) begin failures++; $display("FAIL data ba=%0d", rd_baddr); end
        end
        if (!rd_en) begin
          checks++;
          if (rd_insts !== '0) begin failures++; $display("FAIL disabled output not zero"); end
        end
      end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no conflict eviction exercised"); end
    $display("conflict evictions: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
