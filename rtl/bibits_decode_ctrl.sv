// bibits_decode_ctrl -- BIBITS decoding-control logic (top level).
//
// Sits between a CPU core and its program memory and turns the BIBITS-encoded words on
// the memory data bus back into the original instructions. It holds the instruction
// fetcher, the basic block identification table (BBIT), the transformation table (TT),
// the decoder and the output multiplexer.
//
// Operation, per fetch (one may start every cycle):
//   1. The CPU presents a PC (cpu_req/cpu_pc). The fetcher puts it on the address bus.
//   2. Outside an encoded block, the PC is looked up in the BBIT. On a hit the word is
//      encoded and the TT row given by the BBIT entry is read. On a miss the word is
//      raw and goes to the CPU unchanged.
//   3. Inside an encoded block the BBIT is not consulted: the next consecutive TT row
//      is read for each fetch until a row whose end bit is set has been used. The
//      fetch after that is again looked up in the BBIT.
//   4. When the word arrives, the decoder restores it with the row's six codes, and
//      the multiplexer gives the CPU the decoded word for an encoded fetch and the bus
//      word for a raw one.
// A BBIT entry names the first encoded instruction of a block, which is the block's
// second instruction: the first one reaches the bus unencoded, because the word ahead
// of it depends on which path led into the block.
//
// Timing: cpu_req at cycle t -> imem_req/imem_addr at t+1 -> imem_rdata at t+1+MEM_LAT
// -> cpu_rvalid/cpu_instr combinationally in that same cycle. The TT row read at t is
// ready at t+1 and travels with the fetch through the fetcher's tag.
//
// Tables are loaded through the bbit_wr_* and tt_wr_* ports, normally before the
// program runs. Writing a table while an encoded block is being fetched is not
// supported. The fetch order is taken as given: once in a block, every fetch consumes
// the next row, as a block runs to its end (an exception inside a block is not handled).
//
// The structure, the lookup-then-walk procedure and the end bit follow the published
// BIBITS scheme; the load ports, table sizes, memory latency and cycle timing are this
// design's own. Lint notes rst_n as used both asynchronously (the flops) and
// synchronously (the assertion's disable condition); that is intended.
module bibits_decode_ctrl
  import bibits_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned BBIT_DEPTH = 128,   // encoded basic blocks
  parameter int unsigned TT_DEPTH   = 1024,  // encoded instructions
  parameter int unsigned MEM_LAT    = 1      // program memory read latency
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // CPU side
  input  logic                          cpu_req,
  input  logic [ADDR_W-1:0]             cpu_pc,
  output logic                          cpu_rvalid,
  output instr_t                        cpu_instr,
  output logic                          cpu_decoded,  // word was decoded (mux select)
  // program memory side
  output logic                          imem_req,
  output logic [ADDR_W-1:0]             imem_addr,
  input  instr_t                        imem_rdata,
  // table loading
  input  logic                          bbit_wr_en,
  input  logic [$clog2(BBIT_DEPTH)-1:0] bbit_wr_addr,
  input  logic                          bbit_wr_valid,
  input  logic [ADDR_W-3:0]             bbit_wr_pc,     // word address PC[31:2]
  input  logic [$clog2(TT_DEPTH)-1:0]   bbit_wr_index,
  input  logic                          tt_wr_en,
  input  logic [$clog2(TT_DEPTH)-1:0]   tt_wr_addr,
  input  tt_entry_t                     tt_wr_data
);

  localparam int unsigned IDX_W = $clog2(TT_DEPTH);

  typedef struct packed {
    logic              enc;
    tau_e [N_PART-1:0] tau;
  } tag_t;

  // ---------------------------------------------------------------- tables
  logic             lk_hit;
  logic [IDX_W-1:0] lk_index;
  logic             tt_rd_en;
  logic [IDX_W-1:0] tt_rd_addr;
  tt_entry_t        tt_row;

  bibits_bbit #(
    .DEPTH   (BBIT_DEPTH),
    .PC_W    (ADDR_W - 2),
    .INDEX_W (IDX_W)
  ) u_bbit (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_en    (bbit_wr_en),
    .wr_addr  (bbit_wr_addr),
    .wr_valid (bbit_wr_valid),
    .wr_pc    (bbit_wr_pc),
    .wr_index (bbit_wr_index),
    .lk_pc    (cpu_pc[ADDR_W-1:2]),
    .lk_hit   (lk_hit),
    .lk_index (lk_index)
  );

  bibits_tt #(
    .DEPTH (TT_DEPTH)
  ) u_tt (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (tt_wr_en),
    .wr_addr (tt_wr_addr),
    .wr_data (tt_wr_data),
    .rd_en   (tt_rd_en),
    .rd_addr (tt_rd_addr),
    .rd_data (tt_row)
  );

  // ---------------------------------------------------------------- block walk
  // enc_q: the latest fetch was encoded, so tt_row is its row.
  // ptr_q: the row after it.
  logic             enc_q;
  logic [IDX_W-1:0] ptr_q;
  logic             in_block;
  logic             fetch_enc;

  assign in_block  = enc_q && !tt_row.last;
  assign fetch_enc = in_block || lk_hit;
  assign tt_rd_en  = cpu_req && fetch_enc;
  assign tt_rd_addr = in_block ? ptr_q : lk_index;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enc_q <= 1'b0;
      ptr_q <= '0;
    end else if (cpu_req) begin
      enc_q <= fetch_enc;
      if (fetch_enc) ptr_q <= tt_rd_addr + 1'b1;
    end
  end

  // ---------------------------------------------------------------- fetch and decode
  tag_t   tag_in, rsp_tag;
  logic   rsp_valid;
  instr_t rsp_data;
  instr_t dec_data;

  // Cycle of imem_req: enc_q and tt_row describe the fetch made one cycle earlier.
  assign tag_in = '{enc: enc_q, tau: tt_row.tau};

  bibits_fetcher #(
    .ADDR_W  (ADDR_W),
    .DATA_W  (INSTR_W),
    .MEM_LAT (MEM_LAT),
    .TAG_W   ($bits(tag_t))
  ) u_fetch (
    .clk        (clk),
    .rst_n      (rst_n),
    .cpu_req    (cpu_req),
    .cpu_pc     (cpu_pc),
    .imem_req   (imem_req),
    .imem_addr  (imem_addr),
    .imem_rdata (imem_rdata),
    .tag_in     (tag_in),
    .rsp_valid  (rsp_valid),
    .rsp_data   (rsp_data),
    .rsp_tag    (rsp_tag)
  );

  bibits_decoder u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_valid (rsp_valid),
    .bus_data  (rsp_data),
    .tau       (rsp_tag.tau),
    .dec_data  (dec_data)
  );

  assign cpu_rvalid  = rsp_valid;
  assign cpu_decoded = rsp_valid && rsp_tag.enc;
  assign cpu_instr   = rsp_tag.enc ? dec_data : rsp_data;

  // ---------------------------------------------------------------- checks
  // A block's rows must not run past the end of the table.
  a_tt_no_wrap: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req && in_block |-> ptr_q != '0)
    else $error("transformation table walk wrapped past the last row");

endmodule
