// npc_unit: next-PC computation for a fetched I-packet.
//
// The carry bit c of the packet's starting instruction is added to the
// tag+index part of the PC (the block address) and the next-packet offset is
// copied into the offset field; the byte-within-instruction field is zero.
// This is the adder arrangement of the document. For a packet that straddles
// into the next block the offset of the following packet is the length of the
// packet's tail, which the column decoder reports; it replaces the stored
// offset (see length_predecode). Pure combinational logic.
module npc_unit #(
  parameter int unsigned ADDR_W = 32,  // byte address width
  parameter int unsigned W_MAIN = 8,   // instructions per block
  parameter int unsigned WORD_W = 2,   // byte-in-instruction bits (4-byte instructions)
  localparam int unsigned OFF_W = $clog2(W_MAIN),
  localparam int unsigned BA_W  = ADDR_W - OFF_W - WORD_W
) (
  input  logic [ADDR_W-1:0] pc,         // address of the current I-packet
  input  logic              c,          // carry bit of the starting instruction
  input  logic [OFF_W-1:0]  off,        // next-packet offset from the length field
  input  logic              straddle,   // packet runs into the next block
  input  logic [OFF_W-1:0]  tail_len,   // instructions of the packet in the next block
  output logic [ADDR_W-1:0] npc
);

  logic [BA_W-1:0]  baddr, nbaddr;
  logic [OFF_W-1:0] noff;

  always_comb begin
    baddr  = pc[ADDR_W-1 -: BA_W];
    nbaddr = baddr + BA_W'(c);
    noff   = straddle ? tail_len : off;
    npc    = {nbaddr, noff, {WORD_W{1'b0}}};
  end

endmodule
