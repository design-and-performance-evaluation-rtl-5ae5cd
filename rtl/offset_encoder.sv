// offset_encoder: decides from the PC's block offset alone whether the
// requested I-packet may straddle into the next block, and so whether the
// expansion buffer must be read (EN) or can stay idle (DIS).
//
// A packet of at most N_ISSUE instructions that starts at offset off stays in
// its block whenever off + (N_ISSUE-1) < W_MAIN. The buffer is therefore
// enabled exactly for off >= W_MAIN - (N_ISSUE-1); for the 8-instruction
// block and 4-issue machine that is offsets 5, 6 and 7. The detection is
// deliberately rough: the packet length is not consulted, so a short packet
// near the block end still enables the buffer. Pure combinational logic.
//
// Interface: off (block offset, in instructions) -> en (buffer read enable).
module offset_encoder #(
  parameter int unsigned W_MAIN  = 8,   // instructions per main cache block
  parameter int unsigned N_ISSUE = 4,   // maximum instructions per I-packet
  localparam int unsigned OFF_W  = $clog2(W_MAIN)
) (
  input  logic [OFF_W-1:0] off,
  output logic             en
);

  localparam int unsigned THRESH = W_MAIN - (N_ISSUE - 1);

  always_comb en = (32'(off) >= THRESH);

endmodule
