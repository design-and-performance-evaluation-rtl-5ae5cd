// ebc_env: test environment for one expansion buffer cache instance: the
// behavioural lower memory holding a synthetic VLIW program, a fetch unit
// that walks the program, and a reference model that predicts every result.
// Not synthesizable; testbench use only.
//
// Fetch unit: requests I-packets back to back, presenting the next PC in the
// cycle a packet is delivered. The next PC is the delivered NPC, except for
// loop-back branches (to the start of the current loop body once LOOP_LEN
// words have run), occasional far jumps to a random packet, and a new loop
// region every few iterations; some requests are delayed by an idle cycle.
// All decisions come from this module's own random stream seeded by SEED, so
// instances with the same SEED fetch the same packet sequence.
//
// Reference model: a copy of the main cache tags (direct mapped, SETS lines)
// and of the expansion buffer tags (EXP_ENTRIES entries, keyed by the front
// block address). For each request it predicts front miss, straddle, buffer
// hit, double access and successive-block miss, hence the response cycle
// (1 for a hit, +1 for a double access, +LAT+BEATS+2 per refill) while the
// memory does not stall, the packet contents, length and next PC, and the
// counts of the cache's event pulses.
module ebc_env #(
  parameter int unsigned BLOCK_INSTS = 8,
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned EXP_ENTRIES = 32,
  parameter int unsigned W_EXP       = 3,
  parameter int unsigned N_ISSUE     = 4,
  parameter int unsigned LAT         = 15,
  parameter int unsigned WORDS       = 8192,
  parameter int unsigned N_REQ       = 20000,
  parameter int unsigned STALL_FROM  = 15000,   // memory stalls from this request on
  parameter int unsigned LOOP_MAX    = 2048,    // longest loop body, in words
  parameter int unsigned SEED        = 7
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic                         req_valid,
  input  logic                         req_ready,
  output logic [31:0]                  req_pc,
  input  logic                         resp_valid,
  input  logic [31:0]                  resp_pc,
  input  logic [N_ISSUE-1:0][31:0]     resp_insts,
  input  logic [$clog2(N_ISSUE+1)-1:0] resp_len,
  input  logic [31:0]                  resp_npc,
  input  logic                         resp_straddle,
  input  logic                         resp_double,
  input  logic                         mem_req_valid,
  output logic                         mem_req_ready,
  input  logic [31:0]                  mem_req_addr,
  output logic                         mem_resp_valid,
  output logic [63:0]                  mem_resp_data,
  input  logic                         ev_main_access,
  input  logic                         ev_main_miss,
  input  logic                         ev_double,
  input  logic                         ev_buf_access,
  input  logic                         ev_buf_hit,
  input  logic                         ev_buf_fill,
  output logic                         done,
  output int                           checks,
  output int                           failures,
  // mechanism counters (reference model)
  output int                           n_packets,
  output int                           n_single,       // no straddle, one access
  output int                           n_straddle,
  output int                           n_buf_hit,      // flow 1 with the buffer
  output int                           n_double,       // flow 2
  output int                           n_front_miss,   // flow 3
  output int                           n_succ_miss,    // flow 3 on the rear block
  output int                           n_rough_enable, // buffer enabled, no straddle
  output int                           n_buf_conflict, // buffer entry replaced
  output int                           n_main_conflict,// main cache line replaced
  output int                           n_back_to_back, // request taken in a response cycle
  output int                           n_bubble,
  output int                           n_mem_stall,
  output int                           n_far_jump,
  output int                           n_loop_back,
  output int                           total_cycles
);

  localparam int unsigned SETS   = CACHE_BYTES / (BLOCK_INSTS * 4);
  localparam int unsigned BLOCK_BYTES = BLOCK_INSTS * 4;
  localparam int unsigned BEATS  = BLOCK_BYTES * 8 / 64;
  localparam int unsigned MISS_PENALTY = LAT + BEATS + 2;

  logic stall_en;
  int unsigned n_mreq, n_mstall;

  mem_model #(.WORDS(WORDS), .N_ISSUE(N_ISSUE), .BLOCK_BYTES(BLOCK_BYTES), .BUS_W(64),
              .LATENCY(LAT), .SEED(SEED)) u_mem (
    .clk, .rst_n, .stall_en, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_addr(mem_req_addr), .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .n_requests(n_mreq), .n_stalls(n_mstall)
  );

  // reference tags
  logic        rm_valid [SETS];
  int unsigned rm_block [SETS];
  logic        rb_valid [EXP_ENTRIES];
  int unsigned rb_block [EXP_ENTRIES];

  int cnt = 0;
  always @(posedge clk) cnt <= cnt + 1;

  // event pulse counters
  int e_access = 0, e_miss = 0, e_double = 0, e_bacc = 0, e_bhit = 0, e_bfill = 0;
  always @(posedge clk) if (rst_n) begin
    e_access += int'(ev_main_access);
    e_miss   += int'(ev_main_miss);
    e_double += int'(ev_double);
    e_bacc   += int'(ev_buf_access);
    e_bhit   += int'(ev_buf_hit);
    e_bfill  += int'(ev_buf_fill);
  end

  // xorshift32 stream: identical in every instance with the same SEED
  int unsigned rs = 32'h2545_F491 ^ SEED;
  function automatic int unsigned rnd();
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs;
  endfunction

  function automatic int unsigned pkt_len_at(int unsigned w);
    int unsigned l = 1;
    while (!u_mem.mem[w + l - 1][31] && l < N_ISSUE) l++;
    return l;
  endfunction

  function automatic int unsigned next_start(int unsigned w);
    while (!u_mem.pkt_start[w % WORDS]) w++;
    return w % WORDS;
  endfunction

  // Installs a block in the reference main cache; returns 1 on a miss.
  function automatic logic ref_main(int unsigned blk);
    int unsigned s = blk % SETS;
    if (rm_valid[s] && rm_block[s] == blk) return 1'b0;
    if (rm_valid[s]) n_main_conflict++;
    rm_valid[s] = 1'b1;
    rm_block[s] = blk;
    return 1'b1;
  endfunction

  // expectation for the request in flight
  int unsigned x_pc, x_len, x_lat, x_set;
  logic        x_straddle, x_double, x_pending;
  int          x_miss = 0, x_double_cnt = 0, x_bhit = 0, x_bacc = 0;

  initial begin
    int unsigned pc, loop_start, loop_len, loop_iter, issued;
    logic have_next;
    checks = 0; failures = 0; done = 0;
    n_packets = 0; n_single = 0; n_straddle = 0; n_buf_hit = 0; n_double = 0;
    n_front_miss = 0; n_succ_miss = 0; n_rough_enable = 0; n_buf_conflict = 0;
    n_main_conflict = 0; n_back_to_back = 0; n_bubble = 0; n_mem_stall = 0;
    n_far_jump = 0; n_loop_back = 0; total_cycles = 0;
    for (int i = 0; i < int'(SETS); i++) rm_valid[i] = 1'b0;
    for (int i = 0; i < int'(EXP_ENTRIES); i++) rb_valid[i] = 1'b0;
    req_valid = 0; req_pc = 0; stall_en = 0; x_pending = 0;
    loop_start = 0; loop_len = 16 + rnd() % LOOP_MAX; loop_iter = 0;
    pc = 0; have_next = 1; issued = 0;
    @(posedge rst_n);
    while (n_packets < int'(N_REQ)) begin
      @(negedge clk);
      // 1. check a delivered packet
      if (resp_valid) begin
        int unsigned w;
        if (!x_pending) begin failures++; $display("FAIL unexpected response pc=%h", resp_pc); end
        w = x_pc / 4;
        checks++;
        if (resp_pc !== x_pc || int'(resp_len) != int'(x_len) || resp_npc !== x_pc + 4 * x_len ||
            resp_straddle !== x_straddle || resp_double !== x_double) begin
          failures++;
          $display("FAIL packet pc=%h len=%0d/%0d npc=%h straddle=%0b/%0b double=%0b/%0b",
                   resp_pc, resp_len, x_len, resp_npc, resp_straddle, x_straddle, resp_double, x_double);
        end
        for (int k = 0; k < int'(N_ISSUE); k++) begin
          checks++;
          if (resp_insts[k] !== ((k < int'(x_len)) ? u_mem.mem[w + k] : 32'd0)) begin
            failures++; $display("FAIL slot %0d of packet pc=%h", k, x_pc);
          end
        end
        if (!stall_en) begin
          checks++;
          if (cnt - int'(x_set) != int'(x_lat)) begin
            failures++; $display("FAIL latency pc=%h got %0d exp %0d", x_pc, cnt - int'(x_set), x_lat);
          end
        end
        x_pending = 0;
        n_packets++;
        if (n_packets >= int'(N_REQ)) break;
        if ($test$plusargs("trace") && n_packets % 500 == 0) $display("pkt %0d pc=%0d ls=%0d ll=%0d", n_packets, x_pc/4, loop_start, loop_len);
        // next fetch address
        pc = x_pc + 4 * x_len;
        if (pc / 4 >= WORDS) pc = loop_start * 4;
        if ((pc / 4) - loop_start >= loop_len && pc / 4 > loop_start) begin
          loop_iter++;
          n_loop_back++;
          if (loop_iter >= 10) begin
            loop_start = next_start(rnd() % (WORDS - LOOP_MAX - 64));
            loop_len   = 16 + rnd() % LOOP_MAX;
            loop_iter  = 0;
          end
          pc = loop_start * 4;
        end else if (rnd() % 300 == 0) begin
          pc = next_start(rnd() % WORDS) * 4;
          n_far_jump++;
        end
        have_next = 1;
        req_valid = 0;
        if (rnd() % 16 == 0) begin n_bubble++; continue; end
      end
      if (n_packets >= int'(STALL_FROM)) stall_en = 1;
      // 2. present the next request
      if (have_next) begin
        req_valid = 1;
        req_pc    = pc;
      end
      // 3. the request is taken at the coming edge: predict its outcome
      if (req_valid && req_ready) begin
        int unsigned w, off, blk, l;
        logic fm, st, bh, sm;
        w   = pc / 4;
        off = w % BLOCK_INSTS;
        blk = w / BLOCK_INSTS;
        l   = pkt_len_at(w);
        fm  = ref_main(blk);
        st  = (off + l > BLOCK_INSTS);
        bh  = 1'b0;
        sm  = 1'b0;
        if (off >= BLOCK_INSTS - (N_ISSUE - 1)) begin
          x_bacc += fm ? 2 : 1;
          if (!st) n_rough_enable++;
        end
        if (st) begin
          bh = rb_valid[blk % EXP_ENTRIES] && rb_block[blk % EXP_ENTRIES] == blk &&
               (off + l - BLOCK_INSTS <= W_EXP);
          if (!bh) begin
            sm = ref_main(blk + 1);
            if (rb_valid[blk % EXP_ENTRIES] && rb_block[blk % EXP_ENTRIES] != blk) n_buf_conflict++;
            rb_valid[blk % EXP_ENTRIES] = 1'b1;
            rb_block[blk % EXP_ENTRIES] = blk;
          end
        end
        if (resp_valid) n_back_to_back++;
        x_pc = pc; x_len = l; x_straddle = st; x_double = st && !bh;
        x_lat = 1 + (fm ? MISS_PENALTY : 0) + ((st && !bh) ? 1 + (sm ? MISS_PENALTY : 0) : 0);
        x_set = cnt;
        x_pending = 1;
        x_miss += int'(fm) + int'(sm);
        x_double_cnt += int'(st && !bh);
        x_bhit += int'(st && bh);
        n_front_miss += int'(fm); n_succ_miss += int'(sm);
        n_straddle += int'(st); n_buf_hit += int'(st && bh); n_double += int'(st && !bh);
        n_single += int'(!st);
        have_next = 0;
        issued++;
        @(posedge clk);
        #1 req_valid = 0;
      end
    end
    // events against the model
    @(negedge clk);
    checks++; if (e_miss != x_miss)         begin failures++; $display("FAIL miss events %0d exp %0d", e_miss, x_miss); end
    checks++; if (e_double != x_double_cnt) begin failures++; $display("FAIL double events %0d exp %0d", e_double, x_double_cnt); end
    checks++; if (e_bfill != x_double_cnt)  begin failures++; $display("FAIL buffer fill events %0d exp %0d", e_bfill, x_double_cnt); end
    checks++; if (e_bhit != x_bhit)         begin failures++; $display("FAIL buffer hit events %0d exp %0d", e_bhit, x_bhit); end
    checks++; if (e_bacc != x_bacc)         begin failures++; $display("FAIL buffer access events %0d exp %0d", e_bacc, x_bacc); end
    checks++; if (int'(n_mreq) != x_miss)   begin failures++; $display("FAIL memory requests %0d exp %0d", n_mreq, x_miss); end
    n_mem_stall  = int'(n_mstall);
    total_cycles = cnt;
    done = 1;
  end

endmodule
