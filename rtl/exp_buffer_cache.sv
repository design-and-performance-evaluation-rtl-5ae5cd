// exp_buffer_cache: instruction cache for a VLIW processor with variable
// length I-packets, made of a direct-mapped main cache and a small expansion
// buffer that holds the rear parts of straddle I-packets.
//
// A fetch request carries the byte address of an I-packet:
//   | tag | index | off | word |  (word = 2 bits, off = log2(W_MAIN) bits)
// The main cache (main_tag_array, main_data_array) is read at the index; in
// the same cycle the offset encoder decides from `off` whether the packet can
// straddle and, only then, enables the expansion buffer, addressed by the
// block address (tag+index). The column decoder joins the front part from the
// main cache and the rear part from the buffer in program order, and the NPC
// adder computes the next sequential PC from the length field. A straddle
// packet whose rear part the buffer lacks costs a second main cache access,
// which also copies the rear part into the buffer. Misses are refilled one
// block at a time from lower memory over a BUS_W-bit bus.
//
// Defaults are the document's main configuration: 16 Kbyte cache of 32-byte
// blocks (eight 32-bit instructions), four-issue packets, 32-entry buffer of
// three instructions. Address width, instruction format (end-of-packet bit),
// handshakes and the refill sequencing are this design's choices.
//
// Timing: response in the cycle after the request is accepted (hit, with or
// without buffer), one cycle later on a double access; refills add the memory
// latency. A new request is accepted in the cycle a packet is delivered.
module exp_buffer_cache
  import ebc_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned BLOCK_INSTS = 8,
  parameter int unsigned N_ISSUE     = 4,
  parameter int unsigned W_EXP       = 3,
  parameter int unsigned EXP_ENTRIES = 32,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned BUS_W       = 64,
  localparam int unsigned LEN_W      = $clog2(N_ISSUE + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor fetch port
  input  logic                        req_valid,
  output logic                        req_ready,
  input  logic [ADDR_W-1:0]           req_pc,
  output logic                        resp_valid,
  output logic [ADDR_W-1:0]           resp_pc,
  output logic [N_ISSUE-1:0][INST_W-1:0] resp_insts,
  output logic [LEN_W-1:0]            resp_len,
  output logic [ADDR_W-1:0]           resp_npc,
  output logic                        resp_straddle,
  output logic                        resp_double,
  // lower memory port
  output logic                        mem_req_valid,
  input  logic                        mem_req_ready,
  output logic [ADDR_W-1:0]           mem_req_addr,
  input  logic                        mem_resp_valid,
  input  logic [BUS_W-1:0]            mem_resp_data,
  // access statistics events (one-cycle pulses)
  output logic                        ev_main_access,
  output logic                        ev_main_miss,
  output logic                        ev_double,
  output logic                        ev_buf_access,
  output logic                        ev_buf_hit,
  output logic                        ev_buf_fill
);

  localparam int unsigned W_MAIN = BLOCK_INSTS;
  localparam int unsigned SETS   = CACHE_BYTES / (BLOCK_INSTS * (INST_W / 8));
  localparam int unsigned OFF_W  = $clog2(W_MAIN);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned BA_W   = ADDR_W - OFF_W - 2;
  localparam int unsigned TAG_W  = BA_W - IDX_W;
  localparam int unsigned TAIL_N = N_ISSUE - 1;

  // ---------------------------------------------------------------- control
  ebc_state_e               state;
  logic [ADDR_W-1:0]        pc_q;
  logic [BA_W-1:0]          rd_baddr, fill_baddr, pc_baddr;
  logic                     hold_head, buf_wr_en, fill_en;
  logic [W_MAIN*INST_W-1:0] fill_line;
  logic                     main_hit, buf_en, buf_hit, straddle, tail_ok;
  logic [OFF_W-1:0]         pc_off;

  assign pc_baddr = pc_q[ADDR_W-1 -: BA_W];
  assign pc_off   = pc_q[OFF_W+1:2];

  ebc_controller #(
    .ADDR_W(ADDR_W), .W_MAIN(W_MAIN), .INST_W(INST_W), .BUS_W(BUS_W)
  ) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_pc, .pc_q,
    .resp_valid, .resp_double,
    .main_hit, .straddle, .tail_ok, .buf_en,
    .state, .rd_baddr, .hold_head, .buf_wr_en, .fill_en, .fill_baddr, .fill_line,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
    .ev_main_access, .ev_main_miss, .ev_double, .ev_buf_access, .ev_buf_hit, .ev_buf_fill
  );

  // ------------------------------------------------------------- main cache
  logic [W_MAIN-1:0]            rd_c, fill_c, stops;
  logic [W_MAIN-1:0][OFF_W-1:0] rd_off, fill_off;
  inst_t [W_MAIN-1:0]           rd_row, fill_row;

  assign fill_row = fill_line;
  always_comb for (int i = 0; i < W_MAIN; i++) stops[i] = is_stop(fill_row[i]);

  length_predecode #(.W_MAIN(W_MAIN)) u_pre (
    .stop(stops), .c(fill_c), .off(fill_off)
  );

  main_tag_array #(.SETS(SETS), .TAG_W(TAG_W), .W_MAIN(W_MAIN)) u_tag (
    .clk, .rst_n,
    .rd_idx(rd_baddr[IDX_W-1:0]), .rd_tag(rd_baddr[BA_W-1:IDX_W]),
    .rd_hit(main_hit), .rd_c, .rd_off,
    .wr_en(fill_en), .wr_idx(fill_baddr[IDX_W-1:0]), .wr_tag(fill_baddr[BA_W-1:IDX_W]),
    .wr_c(fill_c), .wr_off(fill_off)
  );

  main_data_array #(.SETS(SETS), .W_MAIN(W_MAIN), .INST_W(INST_W)) u_data (
    .clk, .rd_idx(rd_baddr[IDX_W-1:0]), .rd_row,
    .wr_en(fill_en), .wr_idx(fill_baddr[IDX_W-1:0]), .wr_row(fill_row)
  );

  // ------------------------------------------------------- expansion buffer
  inst_t [W_EXP-1:0] buf_insts, buf_wr_insts;

  offset_encoder #(.W_MAIN(W_MAIN), .N_ISSUE(N_ISSUE)) u_enc (
    .off(pc_off), .en(buf_en)
  );

  always_comb for (int i = 0; i < W_EXP; i++) buf_wr_insts[i] = rd_row[i];

  expansion_buffer #(
    .ENTRIES(EXP_ENTRIES), .W_EXP(W_EXP), .BA_W(BA_W), .INST_W(INST_W)
  ) u_buf (
    .clk, .rst_n,
    .rd_en(buf_en && (state == ST_LOOKUP)), .rd_baddr(pc_baddr),
    .rd_hit(buf_hit), .rd_insts(buf_insts),
    .wr_en(buf_wr_en), .wr_baddr(pc_baddr), .wr_insts(buf_wr_insts)
  );

  // --------------------------------------------- front block for SECOND
  inst_t [W_MAIN-1:0]           head_row_q;
  logic [W_MAIN-1:0]            head_c_q;
  logic [W_MAIN-1:0][OFF_W-1:0] head_off_q;

  always_ff @(posedge clk) begin
    if (hold_head) begin
      head_row_q <= rd_row;
      head_c_q   <= rd_c;
      head_off_q <= rd_off;
    end
  end

  // ---------------------------------------------------------- column decoder
  inst_t [W_MAIN-1:0]           dec_row;
  logic [W_MAIN-1:0]            dec_c;
  logic [W_MAIN-1:0][OFF_W-1:0] dec_off;
  inst_t [TAIL_N-1:0]           dec_tail;
  logic [LEN_W-1:0]             tail_avail, head_len, tail_len;
  logic                         c_sel;
  logic [OFF_W-1:0]             off_sel;
  logic                         second;

  assign second = (state == ST_SECOND);

  always_comb begin
    dec_row    = second ? head_row_q : rd_row;
    dec_c      = second ? head_c_q   : rd_c;
    dec_off    = second ? head_off_q : rd_off;
    dec_tail   = '0;
    tail_avail = '0;
    if (second) begin
      for (int k = 0; k < TAIL_N; k++) dec_tail[k] = rd_row[k];
      tail_avail = LEN_W'(TAIL_N);
    end else if (buf_hit) begin
      for (int k = 0; k < TAIL_N; k++) if (k < W_EXP) dec_tail[k] = buf_insts[k];
      tail_avail = LEN_W'(W_EXP);
    end
  end

  column_decoder #(.W_MAIN(W_MAIN), .N_ISSUE(N_ISSUE)) u_dec (
    .row(dec_row), .len_c(dec_c), .len_off(dec_off), .off(pc_off),
    .tail(dec_tail), .tail_avail,
    .pkt(resp_insts), .pkt_len(resp_len), .head_len, .tail_len,
    .straddle, .tail_ok, .c_sel, .off_sel
  );

  // ------------------------------------------------------------------- NPC
  npc_unit #(.ADDR_W(ADDR_W), .W_MAIN(W_MAIN)) u_npc (
    .pc(pc_q), .c(c_sel), .off(off_sel), .straddle,
    .tail_len(OFF_W'(tail_len)), .npc(resp_npc)
  );

  assign resp_pc       = pc_q;
  assign resp_straddle = straddle;

endmodule
