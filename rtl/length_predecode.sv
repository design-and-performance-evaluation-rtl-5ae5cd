// length_predecode: builds the I-packet length field of one main cache block
// from the end-of-packet marks of its instructions, when the block is
// written into the main cache on a refill.
//
// For every instruction slot i the length field holds a carry bit c[i] and an
// offset off[i], with the meaning the document gives them: off[i] is the
// block offset of the next sequential I-packet, and c[i] is set when that next
// packet does not start in the same block. The packet starting at slot i ends
// at the first slot j >= i whose instruction carries the end-of-packet mark:
//   j + 1 <  W_MAIN : c = 0, off = j + 1
//   j + 1 == W_MAIN : c = 1, off = 0   (packet ends exactly at the block end)
//   no such j       : c = 1, off = 0   (packet straddles into the next block)
// The last two cases are told apart by the mark of the block's last
// instruction, which is read together with the block; for a straddling packet
// the offset of the following packet equals the length of its tail, found in
// the tail's own instructions at fetch time. Working from the block alone
// keeps a refill to one block; this is the design's own choice, the document
// does not say how the field is produced. Pure combinational logic.
module length_predecode #(
  parameter int unsigned W_MAIN = 8,
  localparam int unsigned OFF_W = $clog2(W_MAIN)
) (
  input  logic [W_MAIN-1:0]            stop,  // end-of-packet mark per slot
  output logic [W_MAIN-1:0]            c,     // carry bit per slot
  output logic [W_MAIN-1:0][OFF_W-1:0] off    // next-packet offset per slot
);

  always_comb begin
    int unsigned pos;  // slot after the first end mark at or after i
    pos = W_MAIN;
    for (int i = W_MAIN - 1; i >= 0; i--) begin
      if (stop[i]) pos = i + 1;
      c[i]   = (pos == W_MAIN);
      off[i] = (pos == W_MAIN) ? '0 : OFF_W'(pos);
    end
  end

endmodule
