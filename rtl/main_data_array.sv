// main_data_array: data array of the direct-mapped main cache.
//
// SETS lines of W_MAIN instructions each (16 Kbytes as 512 lines of eight
// 32-bit instructions by default). One combinational read port returns the
// whole line, from which the column decoder picks the I-packet; one write
// port writes a whole refilled line. No reset: a line is only used once its
// valid bit in the tag array is set.
module main_data_array #(
  parameter int unsigned SETS   = 512,
  parameter int unsigned W_MAIN = 8,
  parameter int unsigned INST_W = 32,
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic                          clk,
  input  logic [IDX_W-1:0]              rd_idx,
  output logic [W_MAIN-1:0][INST_W-1:0] rd_row,
  input  logic                          wr_en,
  input  logic [IDX_W-1:0]              wr_idx,
  input  logic [W_MAIN-1:0][INST_W-1:0] wr_row
);

  logic [W_MAIN-1:0][INST_W-1:0] mem_q [SETS];

  always_ff @(posedge clk) begin
    if (wr_en) mem_q[wr_idx] <= wr_row;
  end

  always_comb rd_row = mem_q[rd_idx];

endmodule
