// tb_ebc_example: the straddle example of the expansion buffer cache, run
// on the default-size cache with a hand-written program.
//
// Eight instructions per block, packets of up to four, three-wide buffer.
// Packet A = {A1, A2, A3} starts at offset 7 of block 0, so A1 is the last
// instruction of block 0 and A2, A3 are the first two of block 1. Program
// (word: packet): 0-2 P, 3-6 Q, 7-9 A, 10-11 R, 12-15 S, then a branch back
// to 0. The first pass of A finds block 1 absent and the buffer empty: a
// double access with a refill of block 1, which also stores A2, A3 in the
// buffer entry of block 0. On the second pass every block is resident and A
// is delivered in one access from the main cache and the buffer together.
// The testbench answers refills itself (first beat 15 cycles after the
// request, then one 64-bit beat per cycle) and checks contents, next PCs,
// response cycles and the buffer-enable pulses.
module tb_ebc_example;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  logic        req_valid, req_ready, resp_valid, resp_straddle, resp_double;
  logic [31:0] req_pc, resp_pc, resp_npc;
  logic [3:0][31:0] resp_insts;
  logic [2:0]  resp_len;
  logic        mem_req_valid, mem_req_ready, mem_resp_valid;
  logic [31:0] mem_req_addr;
  logic [63:0] mem_resp_data;
  logic ev_main_access, ev_main_miss, ev_double, ev_buf_access, ev_buf_hit, ev_buf_fill;

  exp_buffer_cache dut (.*);

  // program: packet boundaries as (start, length)
  localparam int NP = 5;
  localparam int PS [NP] = '{0, 3, 7, 10, 12};
  localparam int PL [NP] = '{3, 4, 3, 2, 4};
  logic [31:0] prog [16];
  initial begin
    for (int p = 0; p < NP; p++)
      for (int k = 0; k < PL[p]; k++)
        prog[PS[p] + k] = {(k == PL[p] - 1), 7'(p), 8'(k), 16'hC0DE};
  end

  // refill responder
  int unsigned mcnt; logic mbusy; int unsigned mbase;
  assign mem_req_ready = !mbusy;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin mbusy <= 0; mcnt <= 0; mbase <= 0; end
    else if (mem_req_valid && !mbusy) begin mbusy <= 1; mcnt <= 1; mbase <= mem_req_addr / 4; end
    else if (mbusy) begin mcnt <= mcnt + 1; if (mcnt == 18) mbusy <= 0; end
  end
  always_comb begin
    mem_resp_valid = mbusy && mcnt >= 15;
    mem_resp_data  = '0;
    if (mem_resp_valid)
      for (int k = 0; k < 2; k++) mem_resp_data[k*32 +: 32] = prog[(mbase + (mcnt - 15) * 2 + k) % 16];
  end

  int cnt = 0;
  always @(posedge clk) cnt <= cnt + 1;
  int e_bacc = 0, e_bhit = 0, e_double = 0;
  always @(posedge clk) if (rst_n) begin
    e_bacc += int'(ev_buf_access); e_bhit += int'(ev_buf_hit); e_double += int'(ev_double);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fetch packet p; expect the response exp_lat cycles later
  task automatic fetch(int p, int exp_lat, logic exp_double);
    int t0;
    @(negedge clk);
    req_valid = 1; req_pc = PS[p] * 4;
    while (!req_ready) @(negedge clk);
    t0 = cnt;
    @(posedge clk); #1 req_valid = 0;
    while (!resp_valid) @(negedge clk);
    checks++;
    if (cnt - t0 != exp_lat) begin failures++; $display("FAIL packet %0d latency %0d exp %0d", p, cnt - t0, exp_lat); end
    checks++;
    if (int'(resp_len) != PL[p] || resp_npc != 32'((PS[p] + PL[p]) * 4) || resp_double != exp_double ||
        resp_straddle != (PS[p] % 8 + PL[p] > 8)) begin
      failures++; $display("FAIL packet %0d len=%0d npc=%h double=%0b", p, resp_len, resp_npc, resp_double);
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (resp_insts[k] != ((k < PL[p]) ? prog[PS[p] + k] : 32'd0)) begin failures++; $display("FAIL packet %0d slot %0d", p, k); end
    end
    @(posedge clk);
  endtask

  initial begin
    rst_n = 0; req_valid = 0; req_pc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // first pass: block 0 misses; A (offset 7) needs block 1: double access + refill
    fetch(0, 22, 0);
    fetch(1, 1, 0);
    fetch(2, 1 + 1 + 21, 1);
    fetch(3, 1, 0);
    fetch(4, 1, 0);
    checks++;
    if (e_double != 1 || e_bhit != 0) begin failures++; $display("FAIL first pass events"); end
    // second pass: A from main cache (A1) and buffer (A2, A3) in one access
    fetch(0, 1, 0);
    fetch(1, 1, 0);
    fetch(2, 1, 0);
    fetch(3, 1, 0);
    fetch(4, 1, 0);
    checks++;
    if (e_double != 1 || e_bhit != 1) begin failures++; $display("FAIL second pass events double=%0d bufhit=%0d", e_double, e_bhit); end
    // buffer reads: only A starts at offset >= 5 (offset 7); packets at 0, 3, 2 (=10), 4 (=12) do not
    checks++;
    if (e_bacc != 2) begin failures++; $display("FAIL buffer enables %0d exp 2", e_bacc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
