// ebc_controller: control of the expansion buffer cache.
//
// It accepts one fetch request at a time (valid/ready) and follows the
// document's operational flow for the requested I-packet:
//   * not a straddle packet, or a straddle packet whose rear part the
//     expansion buffer holds (flow 1): the packet is delivered in the LOOKUP
//     cycle, from the main cache and, if needed, the buffer at the same time;
//   * main cache hit, straddle packet, buffer miss (flow 2): a second main
//     cache access reads the successive block one cycle later (SECOND); the
//     packet is delivered then and the successive block's first W_EXP
//     instructions are written into the buffer entry of the front block;
//   * main cache miss (flow 3), for the front block in LOOKUP or the
//     successive block in SECOND: the block is read from lower memory
//     (MEMREQ, MEMDAT), written into the main cache (FILL), and the state
//     that missed is repeated, which then hits and continues as above.
// While it delivers a packet the controller accepts the next request, so hits
// stream at one packet per cycle. Latencies, with a memory that returns its
// first beat L cycles after accepting the request: hit 1 cycle after the
// request is taken, double access 2 cycles, refill of one block adds
// 1 + L + BEATS + 1 cycles (MEMREQ, wait, beats, FILL).
//
// The controller also assembles the refill beats (lowest address first) into
// one line and emits one-cycle event pulses used for access statistics.
// The state machine, the replay after a refill and the handshakes are this
// design's own; the document gives only the three cases.
module ebc_controller #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned W_MAIN = 8,
  parameter int unsigned INST_W = 32,
  parameter int unsigned BUS_W  = 64,
  localparam int unsigned OFF_W = $clog2(W_MAIN),
  localparam int unsigned BA_W  = ADDR_W - OFF_W - 2,
  localparam int unsigned BEATS = (W_MAIN * INST_W) / BUS_W,
  localparam int unsigned BEAT_W = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor side
  input  logic                          req_valid,
  output logic                          req_ready,
  input  logic [ADDR_W-1:0]             req_pc,
  output logic [ADDR_W-1:0]             pc_q,        // address being served
  output logic                          resp_valid,
  output logic                          resp_double,
  // datapath status
  input  logic                          main_hit,    // tag compare of rd_baddr
  input  logic                          straddle,    // from column decoder
  input  logic                          tail_ok,     // tail source holds the rear part
  input  logic                          buf_en,      // offset encoder output
  // datapath control
  output ebc_pkg::ebc_state_e                    state,
  output logic [BA_W-1:0]               rd_baddr,    // block read from the main cache
  output logic                          hold_head,   // keep the front block for SECOND
  output logic                          buf_wr_en,   // write successive block head to buffer
  output logic                          fill_en,     // write refilled line
  output logic [BA_W-1:0]               fill_baddr,
  output logic [W_MAIN*INST_W-1:0]      fill_line,
  // lower memory
  output logic                          mem_req_valid,
  input  logic                          mem_req_ready,
  output logic [ADDR_W-1:0]             mem_req_addr,
  input  logic                          mem_resp_valid,
  input  logic [BUS_W-1:0]              mem_resp_data,
  // events
  output logic                          ev_main_access,
  output logic                          ev_main_miss,
  output logic                          ev_double,
  output logic                          ev_buf_access,
  output logic                          ev_buf_hit,
  output logic                          ev_buf_fill
);

  ebc_pkg::ebc_state_e             state_q, state_d, ret_q;
  logic [BA_W-1:0]        fill_baddr_q;
  logic [BEAT_W-1:0]      beat_q;
  logic [BEATS-1:0][BUS_W-1:0] line_q;
  logic                   take_req;
  logic [BA_W-1:0]        pc_baddr;

  assign pc_baddr   = pc_q[ADDR_W-1 -: BA_W];
  assign state      = state_q;
  assign fill_baddr = fill_baddr_q;
  assign fill_line  = line_q;
  assign mem_req_addr = {fill_baddr_q, {(ADDR_W-BA_W){1'b0}}};

  always_comb begin
    state_d        = state_q;
    req_ready      = 1'b0;
    resp_valid     = 1'b0;
    resp_double    = 1'b0;
    hold_head      = 1'b0;
    buf_wr_en      = 1'b0;
    fill_en        = 1'b0;
    mem_req_valid  = 1'b0;
    rd_baddr       = pc_baddr;
    ev_main_access = 1'b0;
    ev_main_miss   = 1'b0;
    ev_double      = 1'b0;
    ev_buf_access  = 1'b0;
    ev_buf_hit     = 1'b0;
    ev_buf_fill    = 1'b0;

    unique case (state_q)
      ebc_pkg::ST_IDLE: begin
        req_ready = 1'b1;
        if (req_valid) state_d = ebc_pkg::ST_LOOKUP;
      end
      ebc_pkg::ST_LOOKUP: begin
        ev_main_access = 1'b1;
        ev_buf_access  = buf_en;
        if (!main_hit) begin
          ev_main_miss = 1'b1;
          state_d      = ebc_pkg::ST_MEMREQ;
        end else if (straddle && !tail_ok) begin
          hold_head = 1'b1;
          ev_double = 1'b1;
          state_d   = ebc_pkg::ST_SECOND;
        end else begin
          resp_valid = 1'b1;
          ev_buf_hit = straddle;
          req_ready  = 1'b1;
          state_d    = req_valid ? ebc_pkg::ST_LOOKUP : ebc_pkg::ST_IDLE;
        end
      end
      ebc_pkg::ST_SECOND: begin
        rd_baddr       = pc_baddr + 1'b1;
        ev_main_access = 1'b1;
        if (!main_hit) begin
          ev_main_miss = 1'b1;
          state_d      = ebc_pkg::ST_MEMREQ;
        end else begin
          resp_valid  = 1'b1;
          resp_double = 1'b1;
          buf_wr_en   = 1'b1;
          ev_buf_fill = 1'b1;
          req_ready   = 1'b1;
          state_d     = req_valid ? ebc_pkg::ST_LOOKUP : ebc_pkg::ST_IDLE;
        end
      end
      ebc_pkg::ST_MEMREQ: begin
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_d = ebc_pkg::ST_MEMDAT;
      end
      ebc_pkg::ST_MEMDAT: begin
        if (mem_resp_valid && (32'(beat_q) == BEATS - 1)) state_d = ebc_pkg::ST_FILL;
      end
      ebc_pkg::ST_FILL: begin
        fill_en = 1'b1;
        state_d = ret_q;
      end
      default: state_d = ebc_pkg::ST_IDLE;
    endcase
  end

  assign take_req = req_valid && req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ebc_pkg::ST_IDLE;
      ret_q        <= ebc_pkg::ST_LOOKUP;
      pc_q         <= '0;
      fill_baddr_q <= '0;
      beat_q       <= '0;
      line_q       <= '0;
    end else begin
      state_q <= state_d;
      if (take_req) pc_q <= req_pc;
      if ((state_q == ebc_pkg::ST_LOOKUP || state_q == ebc_pkg::ST_SECOND) && !main_hit) begin
        ret_q        <= state_q;
        fill_baddr_q <= rd_baddr;
        beat_q       <= '0;
      end
      if (state_q == ebc_pkg::ST_MEMDAT && mem_resp_valid) begin
        line_q[beat_q] <= mem_resp_data;
        beat_q         <= beat_q + 1'b1;
      end
    end
  end

  // Lower-memory request must stay up, with a stable address, until taken.
  a_memreq_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> (mem_req_valid && $stable(mem_req_addr)));
  // A packet is only delivered from a main cache hit.
  a_resp_hit: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |-> main_hit);
  // Refill beats are only expected while collecting them.
  a_beats: assert property (@(posedge clk) disable iff (!rst_n)
    mem_resp_valid |-> (state_q == ebc_pkg::ST_MEMDAT));

endmodule
