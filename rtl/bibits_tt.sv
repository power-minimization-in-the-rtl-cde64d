// bibits_tt -- transformation table (TT).
//
// One row per encoded instruction. A row holds the 2-bit transformation code of each
// of the six partitions and an end bit that is set in the row of the last encoded
// instruction of a basic block. The rows of one block are stored consecutively, so the
// decoding control only needs the first row's index (from the BBIT) and a counter.
// A block of N instructions takes N-1 rows: its first instruction is not encoded.
//
// The row contents follow the published BIBITS scheme. The table is a memory array with
// one write and one read port with a registered read (one cycle from rd_en to rd_data);
// the depth, the write port and the read timing are this design's choices. rd_data holds
// its value until the next read. Row contents are undefined until written; the read
// register resets to an all-identity row with the end bit set.
module bibits_tt
  import bibits_pkg::*;
#(
  parameter int unsigned DEPTH = 1024     // rows (encoded instructions)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH)-1:0]   wr_addr,
  input  tt_entry_t                  wr_data,
  input  logic                       rd_en,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output tt_entry_t                  rd_data
);

  tt_entry_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data <= '{tau: {N_PART{TAU_ID}}, last: 1'b1};
    else if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
