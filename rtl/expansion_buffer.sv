// expansion_buffer: small direct-mapped buffer holding the rear (tail) part
// of straddle I-packets.
//
// Entry e holds the first W_EXP instructions of the block that follows a
// front block, addressed by the front block's block address (tag+index of the
// PC): the low EIDX_W bits select the entry and the remaining bits are the
// stored tag. Because the stored instructions are the successive block's
// first slots, they come out already in program order after the front part.
// A read happens only when rd_en (the offset encoder's EN) is high; with
// rd_en low the outputs are zero and rd_hit is low, modelling a disabled
// decoder. Reads are combinational; writes happen on the clock edge.
// Valid bits are cleared by reset. Code is read-only, so entries never go
// stale and need no invalidation when the main cache replaces a block.
module expansion_buffer #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned W_EXP   = 3,
  parameter int unsigned BA_W    = 27,  // block address width (tag + index)
  parameter int unsigned INST_W  = 32,
  localparam int unsigned EIDX_W = $clog2(ENTRIES),
  localparam int unsigned ETAG_W = BA_W - EIDX_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         rd_en,
  input  logic [BA_W-1:0]              rd_baddr,
  output logic                         rd_hit,
  output logic [W_EXP-1:0][INST_W-1:0] rd_insts,
  input  logic                         wr_en,
  input  logic [BA_W-1:0]              wr_baddr,
  input  logic [W_EXP-1:0][INST_W-1:0] wr_insts
);

  logic [ENTRIES-1:0]            valid_q;
  logic [ETAG_W-1:0]             tag_q  [ENTRIES];
  logic [W_EXP-1:0][INST_W-1:0]  data_q [ENTRIES];

  logic [EIDX_W-1:0] ridx, widx;
  logic [ETAG_W-1:0] rtag, wtag;

  always_comb begin
    ridx = rd_baddr[EIDX_W-1:0];
    rtag = rd_baddr[BA_W-1:EIDX_W];
    widx = wr_baddr[EIDX_W-1:0];
    wtag = wr_baddr[BA_W-1:EIDX_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[widx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[widx]  <= wtag;
      data_q[widx] <= wr_insts;
    end
  end

  always_comb begin
    rd_hit   = rd_en && valid_q[ridx] && (tag_q[ridx] == rtag);
    rd_insts = rd_en ? data_q[ridx] : '0;
  end

endmodule
