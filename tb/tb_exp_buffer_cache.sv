// tb_exp_buffer_cache: end-to-end test of the expansion buffer cache at its
// default size (16 Kbyte main cache of 32-byte blocks, 32-entry buffer of
// three instructions, four-issue packets, 15-cycle memory).
//
// The fetch environment runs a synthetic 32 Kbyte VLIW program through the
// cache: loops, loop-backs and far jumps, back-to-back requests and idle
// cycles, and a final phase in which the memory refuses requests at random.
// Every packet, next PC and response cycle is checked against a reference
// model, and each mechanism of the design must occur at least once: single
// access, buffer-supplied straddle packet, double access, front-block miss,
// successive-block miss, buffer enabled for a packet that does not straddle,
// buffer and main-cache replacement, back-to-back delivery, memory stall.
module tb_exp_buffer_cache;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        req_valid, req_ready, resp_valid, resp_straddle, resp_double;
  logic [31:0] req_pc, resp_pc, resp_npc;
  logic [3:0][31:0] resp_insts;
  logic [2:0]  resp_len;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_resp_data;
  logic ev_main_access, ev_main_miss, ev_double, ev_buf_access, ev_buf_hit, ev_buf_fill;

  exp_buffer_cache dut (.*);

  logic done;
  int checks, failures;
  int n_packets, n_single, n_straddle, n_buf_hit, n_double, n_front_miss, n_succ_miss,
      n_rough_enable, n_buf_conflict, n_main_conflict, n_back_to_back, n_bubble,
      n_mem_stall, n_far_jump, n_loop_back, total_cycles;

  ebc_env #(.BLOCK_INSTS(8), .CACHE_BYTES(16384), .EXP_ENTRIES(32), .W_EXP(3),
            .N_REQ(30000), .STALL_FROM(24000)) env (.*);

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(string what, int n, inout int c, inout int f);
    c++;
    if (n == 0) begin f++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-36s %0d", what, n);
  endtask

  initial begin
    int c, f;
    @(posedge rst_n);
    wait (done);
    c = checks; f = failures;
    $display("packets %0d in %0d cycles", n_packets, total_cycles);
    need("single-access packets",            n_single, c, f);
    need("straddle packets",                 n_straddle, c, f);
    need("straddle served with buffer",      n_buf_hit, c, f);
    need("double accesses",                  n_double, c, f);
    need("front-block misses",               n_front_miss, c, f);
    need("successive-block misses",          n_succ_miss, c, f);
    need("buffer enabled, no straddle",      n_rough_enable, c, f);
    need("buffer entry replacements",        n_buf_conflict, c, f);
    need("main cache line replacements",     n_main_conflict, c, f);
    need("back-to-back deliveries",          n_back_to_back, c, f);
    need("idle cycles between requests",     n_bubble, c, f);
    need("memory request stalls",            n_mem_stall, c, f);
    need("far jumps",                        n_far_jump, c, f);
    need("loop-back branches",               n_loop_back, c, f);
    $display("straddle ratio %0.2f%%, buffer hit ratio %0.2f%%, double access ratio %0.2f%%",
             100.0 * n_straddle / n_packets, 100.0 * n_buf_hit / n_straddle, 100.0 * n_double / n_packets);
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
