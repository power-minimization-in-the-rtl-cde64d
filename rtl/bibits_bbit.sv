// bibits_bbit -- basic block identification table (BBIT).
//
// An associative table with one entry per encoded basic block. An entry holds the
// address of the block's first encoded instruction and the index of that instruction's
// row in the transformation table. Every fetch address is compared against all valid
// entries at once; a match says the word about to come over the bus is encoded and
// where its transformation codes start.
//
// The entry contents (PC and index into the transformation table) follow the published
// BIBITS scheme. Its size, the write port used to load it, the word-address compare and
// the rule that the lowest matching entry wins are this design's own choices.
//
// Interface:
//   wr_en/wr_addr/wr_valid/wr_pc/wr_index  write (or clear, wr_valid=0) one entry;
//                                         takes effect at the next rising edge.
//   lk_pc                                 word address (PC[31:2]) to look up.
//   lk_hit/lk_index                       combinational result of the lookup.
// All entries are invalid after reset.
module bibits_bbit #(
  parameter int unsigned DEPTH   = 128,   // entries (basic blocks)
  parameter int unsigned PC_W    = 30,    // word address width
  parameter int unsigned INDEX_W = 10     // transformation table index width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [$clog2(DEPTH)-1:0]   wr_addr,
  input  logic                       wr_valid,
  input  logic [PC_W-1:0]            wr_pc,
  input  logic [INDEX_W-1:0]         wr_index,
  input  logic [PC_W-1:0]            lk_pc,
  output logic                       lk_hit,
  output logic [INDEX_W-1:0]         lk_index
);

  logic [DEPTH-1:0]               valid_q;
  logic [DEPTH-1:0][PC_W-1:0]     pc_q;
  logic [DEPTH-1:0][INDEX_W-1:0]  index_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid_q <= '0;
    else if (wr_en) valid_q[wr_addr] <= wr_valid;
  end

  // Tag and index storage needs no reset: a row is read only while its valid bit is set.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      pc_q[wr_addr]    <= wr_pc;
      index_q[wr_addr] <= wr_index;
    end
  end

  logic [DEPTH-1:0] match;

  always_comb begin
    for (int e = 0; e < DEPTH; e++) match[e] = valid_q[e] && (pc_q[e] == lk_pc);
  end

  always_comb begin
    lk_hit   = 1'b0;
    lk_index = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (match[e]) begin
        lk_hit   = 1'b1;
        lk_index = index_q[e];
      end
    end
  end

endmodule
