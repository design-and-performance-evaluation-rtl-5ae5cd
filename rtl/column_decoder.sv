// column_decoder: extracts the requested I-packet from the front block and
// the tail source, in program order, with no reordering.
//
// Inputs are the whole front block (from the main data array, or the copy
// held during a double access), the length field row of that block, the block
// offset of the PC, and up to N_ISSUE-1 tail instructions of which the first
// tail_avail are valid: the expansion buffer entry (W_EXP of them) or the
// first slots of the successive block read by a second access.
//
// The length field of the starting slot gives the front part:
//   c = 0            : head_len = off_next - off, packet ends in the block
//   c = 1            : head_len = W_MAIN - off; the packet straddles when the
//                      block's last instruction has no end-of-packet mark
// For a straddling packet the tail length is one plus the slot of the first
// end mark among the valid tail instructions; tail_ok is low when no mark is
// found there, i.e. the tail source cannot supply the whole rear part.
// Output slot s carries front instruction off+s for s < head_len, then tail
// instruction s-head_len, then zeros. Pure combinational logic.
module column_decoder
  import ebc_pkg::*;
#(
  parameter int unsigned W_MAIN  = 8,
  parameter int unsigned N_ISSUE = 4,
  localparam int unsigned OFF_W  = $clog2(W_MAIN),
  localparam int unsigned LEN_W  = $clog2(N_ISSUE + 1),
  localparam int unsigned TAIL_N = N_ISSUE - 1
) (
  input  inst_t [W_MAIN-1:0]            row,
  input  logic  [W_MAIN-1:0]            len_c,
  input  logic  [W_MAIN-1:0][OFF_W-1:0] len_off,
  input  logic  [OFF_W-1:0]             off,
  input  inst_t [TAIL_N-1:0]            tail,
  input  logic  [LEN_W-1:0]             tail_avail,
  output inst_t [N_ISSUE-1:0]           pkt,
  output logic  [LEN_W-1:0]             pkt_len,
  output logic  [LEN_W-1:0]             head_len,
  output logic  [LEN_W-1:0]             tail_len,
  output logic                          straddle,
  output logic                          tail_ok,
  output logic                          c_sel,     // carry bit of starting slot
  output logic  [OFF_W-1:0]             off_sel    // next offset of starting slot
);

  always_comb begin
    int unsigned hl, tl, start;
    logic found;

    start    = 32'(off);
    c_sel    = len_c[off];
    off_sel  = len_off[off];
    straddle = c_sel && !is_stop(row[W_MAIN-1]);

    hl = c_sel ? (W_MAIN - start) : (32'(off_sel) - start);
    if (hl > N_ISSUE) hl = N_ISSUE;  // malformed code: never more than one packet width

    found = 1'b0;
    tl    = 0;
    for (int k = 0; k < TAIL_N; k++) begin
      if (!found && (k < 32'(tail_avail)) && is_stop(tail[k])) begin
        found = 1'b1;
        tl    = k + 1;
      end
    end
    if (!straddle) tl = 0;
    if (hl + tl > N_ISSUE) tl = N_ISSUE - hl;

    tail_ok  = !straddle || found;
    head_len = LEN_W'(hl);
    tail_len = LEN_W'(tl);
    pkt_len  = LEN_W'(hl + tl);

    for (int s = 0; s < N_ISSUE; s++) begin
      if (s < hl)           pkt[s] = row[(start + s) % W_MAIN];
      else if (s < hl + tl) pkt[s] = tail[(s - hl) % TAIL_N];
      else                  pkt[s] = '0;
    end
  end

endmodule
