// tb_ebc_workloads: the cache configurations compared in the evaluation,
// run side by side on one synthetic instruction stream.
//
// Eight caches of 16 Kbytes: 32-byte blocks with 16-, 32- and 64-entry
// buffers three instructions wide, 32-byte blocks with a 32-entry buffer one
// and two instructions wide, and 64-byte blocks with 16-, 32- and 64-entry
// buffers. Each has its own fetch environment with the same seed, so all see
// the same program and the same packet sequence (loop bodies of up to 272
// words). Besides each environment's own packet-by-packet checks, the
// testbench checks properties that hold for direct-mapped buffers filled on
// every buffer miss: a larger or wider buffer never hits less often, and
// 64-byte blocks give fewer straddle packets than 32-byte blocks. It prints
// the straddle ratio, buffer hit ratio, double access ratio and average
// cycles per packet of each configuration.
module tb_ebc_workloads;
  localparam int NCFG = 8;
  localparam int BI [NCFG] = '{8, 8, 8, 8, 8, 16, 16, 16};
  localparam int EE [NCFG] = '{16, 32, 64, 32, 32, 16, 32, 64};
  localparam int WE [NCFG] = '{3, 3, 3, 1, 2, 3, 3, 3};
  localparam int NREQ = 20000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  initial begin
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  logic done [NCFG];
  int   checks [NCFG], failures [NCFG];
  int   n_packets [NCFG], n_straddle [NCFG], n_buf_hit [NCFG], n_double [NCFG], cycles [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    logic        req_valid, req_ready, resp_valid, resp_straddle, resp_double;
    logic [31:0] req_pc, resp_pc, resp_npc;
    logic [3:0][31:0] resp_insts;
    logic [2:0]  resp_len;
    logic        mem_req_valid, mem_req_ready, mem_resp_valid;
    logic [31:0] mem_req_addr;
    logic [63:0] mem_resp_data;
    logic ev_main_access, ev_main_miss, ev_double, ev_buf_access, ev_buf_hit, ev_buf_fill;
    int n_single, n_front_miss, n_succ_miss, n_rough_enable, n_buf_conflict, n_main_conflict,
        n_back_to_back, n_bubble, n_mem_stall, n_far_jump, n_loop_back;

    exp_buffer_cache #(.BLOCK_INSTS(BI[g]), .EXP_ENTRIES(EE[g]), .W_EXP(WE[g])) dut (
      .clk, .rst_n, .req_valid, .req_ready, .req_pc, .resp_valid, .resp_pc, .resp_insts,
      .resp_len, .resp_npc, .resp_straddle, .resp_double, .mem_req_valid, .mem_req_ready,
      .mem_req_addr, .mem_resp_valid, .mem_resp_data, .ev_main_access, .ev_main_miss,
      .ev_double, .ev_buf_access, .ev_buf_hit, .ev_buf_fill
    );

    ebc_env #(.BLOCK_INSTS(BI[g]), .EXP_ENTRIES(EE[g]), .W_EXP(WE[g]), .N_REQ(NREQ),
              .STALL_FROM(NREQ + 1), .LOOP_MAX(256), .SEED(11)) env (
      .clk, .rst_n, .req_valid, .req_ready, .req_pc, .resp_valid, .resp_pc, .resp_insts,
      .resp_len, .resp_npc, .resp_straddle, .resp_double, .mem_req_valid, .mem_req_ready,
      .mem_req_addr, .mem_resp_valid, .mem_resp_data, .ev_main_access, .ev_main_miss,
      .ev_double, .ev_buf_access, .ev_buf_hit, .ev_buf_fill,
      .done(done[g]), .checks(checks[g]), .failures(failures[g]),
      .n_packets(n_packets[g]), .n_single, .n_straddle(n_straddle[g]), .n_buf_hit(n_buf_hit[g]),
      .n_double(n_double[g]), .n_front_miss, .n_succ_miss, .n_rough_enable, .n_buf_conflict,
      .n_main_conflict, .n_back_to_back, .n_bubble, .n_mem_stall, .n_far_jump, .n_loop_back,
      .total_cycles(cycles[g])
    );
  end

  initial begin
    repeat (4000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", 1, 1);
    $finish;
  end

  task automatic order(int a, int b, inout int c, inout int f);
    c++;
    if (n_buf_hit[a] > n_buf_hit[b]) begin
      f++; $display("FAIL buffer hits of configuration %0d exceed those of %0d", a, b);
    end
  endtask

  initial begin
    int c, f;
    @(posedge rst_n);
    for (int g = 0; g < NCFG; g++) wait (done[g]);
    c = 0; f = 0;
    for (int g = 0; g < NCFG; g++) begin
      c += checks[g]; f += failures[g];
      $display("%2d-byte block, %2d entries x %0d: straddle %5.2f%%  buffer hit %5.2f%%  double access %5.2f%%  cycles/packet %0.3f",
               BI[g] * 4, EE[g], WE[g], 100.0 * n_straddle[g] / n_packets[g],
               100.0 * n_buf_hit[g] / n_straddle[g], 100.0 * n_double[g] / n_packets[g],
               1.0 * cycles[g] / n_packets[g]);
    end
    order(0, 1, c, f); order(1, 2, c, f);      // more entries, 32-byte block
    order(3, 4, c, f); order(4, 1, c, f);      // wider entries
    order(5, 6, c, f); order(6, 7, c, f);      // more entries, 64-byte block
    c++;
    if (n_straddle[1] <= n_straddle[6]) begin f++; $display("FAIL 64-byte blocks do not reduce straddles"); end
    c++;
    if (n_buf_hit[0] == 0) begin f++; $display("FAIL buffer never hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
