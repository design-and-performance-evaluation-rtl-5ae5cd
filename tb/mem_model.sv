// mem_model: behavioural model of the lower-level (main) memory holding a
// synthetic VLIW program. Not synthesizable; testbench use only.
//
// Program: WORDS 32-bit instructions from address 0, packed into I-packets of
// 1..N_ISSUE instructions with lengths drawn from a xorshift generator seeded by SEED.
// Word w is {stop, 31'(w * 32'h9E37_79B1)}: bit 31 marks the last instruction
// of a packet and the remaining bits identify the word. pkt_start[w] is set
// for the first instruction of each packet (used to pick branch targets).
//
// Timing: a block request is taken when req_valid && req_ready; the first
// BUS_W-bit beat is presented LATENCY cycles later and the rest follow one per
// cycle, lowest address first. With stall_en set, req_ready drops at random.
module mem_model #(
  parameter int unsigned WORDS      = 8192,
  parameter int unsigned N_ISSUE    = 4,
  parameter int unsigned BLOCK_BYTES = 32,
  parameter int unsigned BUS_W      = 64,
  parameter int unsigned LATENCY    = 15,
  parameter int unsigned SEED       = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              stall_en,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [31:0]       req_addr,
  output logic              resp_valid,
  output logic [BUS_W-1:0]  resp_data,
  output int unsigned       n_requests,
  output int unsigned       n_stalls
);

  localparam int unsigned BEATS = BLOCK_BYTES * 8 / BUS_W;
  localparam int unsigned WPB   = BUS_W / 32;     // words per beat

  logic [31:0] mem       [WORDS];
  logic        pkt_start [WORDS];

  // xorshift32 stream for the program layout, fixed by SEED
  int unsigned rs = 32'h9E37_79B9 ^ SEED;
  function automatic int unsigned rnd();
    rs ^= rs << 13;
    rs ^= rs >> 17;
    rs ^= rs << 5;
    return rs;
  endfunction

  initial begin
    int unsigned w, len;
    w = 0;
    while (w < WORDS) begin
      len = 1 + (rnd() % N_ISSUE);
      for (int k = 0; k < int'(len); k++) begin
        if (w + k < WORDS) begin
          mem[w+k]       = {(k == int'(len) - 1) || (w + k == WORDS - 1), 31'(((w + k) * 32'h9E37_79B1) >> 1)};
          pkt_start[w+k] = (k == 0);
        end
      end
      w += len;
    end
  end

  int unsigned busy_cnt;   // cycles left until the response is complete
  int unsigned base_word;
  logic        busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      busy_cnt   <= 0;
      base_word  <= 0;
      req_ready  <= 1'b1;
      n_requests <= 0;
      n_stalls   <= 0;
    end else begin
      if (req_valid && req_ready && !busy) begin
        busy       <= 1'b1;
        busy_cnt   <= 1;
        base_word  <= (req_addr / 4) % WORDS;
        n_requests <= n_requests + 1;
      end else if (busy) begin
        busy_cnt <= busy_cnt + 1;
        if (busy_cnt == LATENCY + BEATS - 1) busy <= 1'b0;
      end
      if (stall_en && ($urandom % 4 == 0)) begin
        req_ready <= 1'b0;
        if (req_valid) n_stalls <= n_stalls + 1;
      end else begin
        req_ready <= 1'b1;
      end
    end
  end

  always_comb begin
    resp_valid = busy && (busy_cnt >= LATENCY);
    resp_data  = '0;
    if (resp_valid)
      for (int k = 0; k < int'(WPB); k++)
        resp_data[k*32 +: 32] = mem[(base_word + (busy_cnt - LATENCY) * WPB + k) % WORDS];
  end

endmodule
