// main_tag_array: tag array of the direct-mapped main cache together with
// the per-instruction I-packet length field (the "tag" and "len" columns).
//
// Each of the SETS lines holds a valid bit, the tag, and for each of the
// W_MAIN instruction slots a carry bit and a next-packet offset. One
// combinational read port compares the stored tag with rd_tag and returns the
// whole length row; the caller selects the starting slot. One write port,
// used when a block is refilled, writes tag, valid and length row together.
// Valid bits are cleared by reset; tags and length fields are not.
// The arrays are modelled with asynchronous read to keep the controller
// simple; a synchronous SRAM would move the read half a cycle earlier.
module main_tag_array #(
  parameter int unsigned SETS   = 512,
  parameter int unsigned TAG_W  = 18,
  parameter int unsigned W_MAIN = 8,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned OFF_W = $clog2(W_MAIN)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // read / compare
  input  logic [IDX_W-1:0]             rd_idx,
  input  logic [TAG_W-1:0]             rd_tag,
  output logic                         rd_hit,
  output logic [W_MAIN-1:0]            rd_c,
  output logic [W_MAIN-1:0][OFF_W-1:0] rd_off,
  // write (refill)
  input  logic                         wr_en,
  input  logic [IDX_W-1:0]             wr_idx,
  input  logic [TAG_W-1:0]             wr_tag,
  input  logic [W_MAIN-1:0]            wr_c,
  input  logic [W_MAIN-1:0][OFF_W-1:0] wr_off
);

  logic [SETS-1:0]                         valid_q;
  logic [TAG_W-1:0]                        tag_q [SETS];
  logic [W_MAIN-1:0]                       c_q   [SETS];
  logic [W_MAIN-1:0][OFF_W-1:0]            off_q [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (wr_en) valid_q[wr_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tag_q[wr_idx] <= wr_tag;
      c_q[wr_idx]   <= wr_c;
      off_q[wr_idx] <= wr_off;
    end
  end

  always_comb begin
    rd_hit = valid_q[rd_idx] && (tag_q[rd_idx] == rd_tag);
    rd_c   = c_q[rd_idx];
    rd_off = off_q[rd_idx];
  end

endmodule
