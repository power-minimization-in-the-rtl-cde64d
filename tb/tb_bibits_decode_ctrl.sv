// tb_bibits_decode_ctrl -- end-to-end testbench of the BIBITS decoding control.
//
// Runs the top level at its default sizes (128 BBIT entries, 1024 TT rows, memory
// latency 1). The testbench builds a random MIPS-like program of basic blocks, encodes
// a selection of the blocks with the reference encoder (first instruction of each block
// left as is, every later one encoded against the word before it on the bus), writes
// the encoded image into a program-memory model and loads the BBIT and the TT through
// the load ports. A CPU model then fetches a loop-heavy trace: whole basic blocks in a
// random order, some repeated back to back, with idle cycles at random points,
// including inside blocks.
//
// Checked for every fetch: the CPU receives the original instruction, exactly two
// cycles after the request (one cycle address register plus the memory latency), and
// the decoded flag is set exactly for encoded words. Counted and required to occur:
// BBIT hits, BBIT misses at the start of blocks that are not encoded, block ends taken
// from the end bit, back-to-back entries into an encoded block, idle cycles inside an
// encoded block, and each of the four transformation codes. The bus toggles of the
// encoded run are compared with those the original program would have caused.
module tb_bibits_decode_ctrl;
  import bibits_pkg::*;
  import tb_bibits_ref_pkg::*;

  localparam int unsigned BBIT_DEPTH = 128;
  localparam int unsigned TT_DEPTH   = 1024;
  localparam int unsigned N_BLOCKS   = 160;   // blocks in the program
  localparam int unsigned MEM_WORDS  = 2048;
  localparam logic [31:0] BASE       = 32'h0000_0400;
  localparam int unsigned N_EXEC     = 3000;  // block executions in the trace

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic                          cpu_req = 1'b0;
  logic [31:0]                   cpu_pc = '0;
  logic                          cpu_rvalid;
  instr_t                        cpu_instr;
  logic                          cpu_decoded;
  logic                          imem_req;
  logic [31:0]                   imem_addr;
  instr_t                        imem_rdata;
  logic                          bbit_wr_en = 1'b0;
  logic [$clog2(BBIT_DEPTH)-1:0] bbit_wr_addr = '0;
  logic                          bbit_wr_valid = 1'b0;
  logic [29:0]                   bbit_wr_pc = '0;
  logic [$clog2(TT_DEPTH)-1:0]   bbit_wr_index = '0;
  logic                          tt_wr_en = 1'b0;
  logic [$clog2(TT_DEPTH)-1:0]   tt_wr_addr = '0;
  tt_entry_t                     tt_wr_data;

  bibits_decode_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------------ program
  logic [31:0] orig [MEM_WORDS];   // original program
  logic [31:0] mem  [MEM_WORDS];   // encoded image in program memory
  int          blk_start [N_BLOCKS];
  int          blk_len   [N_BLOCKS];
  bit          blk_enc   [N_BLOCKS];

  // MIPS-like word with register fields drawn from a few registers, as in a tight loop
  function automatic logic [31:0] rand_instr();
    logic [4:0] regs [6];
    regs = '{5'd2, 5'd3, 5'd4, 5'd5, 5'd8, 5'd29};
    case ($urandom_range(0, 2))
      0: return {6'b000000, regs[$urandom_range(0, 5)], regs[$urandom_range(0, 5)],
                 regs[$urandom_range(0, 5)], 5'($urandom_range(0, 3)), 6'b100001};
      1: return {6'b100011, regs[$urandom_range(0, 5)], regs[$urandom_range(0, 5)],
                 16'($urandom_range(0, 64) * 4)};
      default: return {6'b001001, regs[$urandom_range(0, 5)], regs[$urandom_range(0, 5)],
                       16'($urandom_range(0, 15))};
    endcase
  endfunction

  // word index of a byte address in the program arrays
  function automatic int widx(logic [31:0] a);
    return int'((a - BASE) >> 2) % MEM_WORDS;
  endfunction

  // ------------------------------------------------------------------ memory model
  logic [31:0] rd_q;
  always_ff @(posedge clk) if (imem_req) rd_q <= mem[widx(imem_addr)];
  assign imem_rdata = rd_q;

  // ------------------------------------------------------------------ expectations
  int          req_cycle[$];
  logic [31:0] req_pc[$];
  bit          req_enc[$];
  int          cycle = 0;

  always @(posedge clk) cycle++;

  // counters of mechanisms
  int n_hit = 0, n_miss_start = 0, n_end = 0, n_b2b = 0, n_gap_in_block = 0;
  int n_code [4] = '{0, 0, 0, 0};
  longint tog_orig = 0, tog_bus = 0;
  logic [31:0] last_bus = '0, last_orig = '0;

  always @(negedge clk) if (rst_n && cpu_rvalid) begin
    int          c;
    logic [31:0] pc;
    bit          enc;
    chk(req_pc.size() != 0, "response without request");
    if (req_pc.size() != 0) begin
      c = req_cycle.pop_front();
      pc = req_pc.pop_front();
      enc = req_enc.pop_front();
      chk(cycle - c == 2, $sformatf("latency %0d cycles for pc %08h", cycle - c, pc));
      chk(cpu_instr == orig[widx(pc)],
          $sformatf("pc %08h: got %08h expected %08h", pc, cpu_instr, orig[widx(pc)]));
      chk(cpu_decoded == enc, $sformatf("pc %08h: decoded flag %0b", pc, cpu_decoded));
      tog_orig += longint'(popcount32(orig[widx(pc)] ^ last_orig));
      tog_bus  += longint'(popcount32(imem_rdata ^ last_bus));
      last_orig = orig[widx(pc)];
      last_bus  = imem_rdata;
    end
  end

  // one fetch; 'enc' is what the word should be, gaps are idle cycles before it
  task automatic fetch(logic [31:0] pc, bit enc, int gap);
    repeat (gap) begin
      cpu_req = 1'b0;
      cpu_pc  = 32'($urandom());
      @(posedge clk);
      #1;
    end
    cpu_req = 1'b1;
    cpu_pc  = pc;
    req_cycle.push_back(cycle);
    req_pc.push_back(pc);
    req_enc.push_back(enc);
    @(posedge clk);
    #1;
    cpu_req = 1'b0;
  endtask

  initial begin
    int          addr, tt_row, bb_entry, prev_blk;
    logic [31:0] prev_y, y;
    logic [11:0] codes;
    tt_entry_t   row;

    // build program: blocks of 1..12 instructions laid out back to back
    addr = 0;
    for (int b = 0; b < N_BLOCKS; b++) begin
      blk_start[b] = addr;
      blk_len[b]   = (b % 17 == 0) ? 1 : $urandom_range(2, 12);
      for (int i = 0; i < blk_len[b]; i++) begin
        orig[addr] = rand_instr();
        mem[addr]  = orig[addr];
        addr++;
      end
    end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // encode and load: take blocks in order while BBIT and TT have room; every fifth
    // block is left unencoded so that BBIT misses at block starts occur too
    tt_row = 0;
    bb_entry = 0;
    for (int b = 0; b < N_BLOCKS; b++) begin
      blk_enc[b] = 1'b0;
      if (blk_len[b] < 2 || b % 5 == 3 || bb_entry >= BBIT_DEPTH ||
          tt_row + blk_len[b] - 1 > TT_DEPTH - 1) continue;
      blk_enc[b] = 1'b1;
      @(negedge clk);
      bbit_wr_en    = 1'b1;
      bbit_wr_addr  = 7'(bb_entry);
      bbit_wr_valid = 1'b1;
      bbit_wr_pc    = 30'((BASE >> 2) + blk_start[b] + 1);
      bbit_wr_index = 10'(tt_row);
      bb_entry++;
      prev_y = orig[blk_start[b]];
      for (int i = 1; i < blk_len[b]; i++) begin
        y = ref_encode(orig[blk_start[b] + i], prev_y, codes);
        mem[blk_start[b] + i] = y;
        for (int p = 0; p < 6; p++) n_code[codes[2*p +: 2]]++;
        row = tt_entry_t'({codes, 1'(i == blk_len[b] - 1)});
        @(negedge clk);
        bbit_wr_en = 1'b0;
        tt_wr_en   = 1'b1;
        tt_wr_addr = 10'(tt_row);
        tt_wr_data = row;
        tt_row++;
        prev_y = y;
      end
      @(negedge clk);
      bbit_wr_en = 1'b0;
      tt_wr_en   = 1'b0;
    end
    @(negedge clk);
    bbit_wr_en = 1'b0;
    tt_wr_en   = 1'b0;
    $display("loaded %0d encoded blocks, %0d TT rows", bb_entry, tt_row);
    for (int k = 0; k < 4; k++) chk(n_code[k] > 0, $sformatf("code %0d never chosen", k));

    // run the trace
    @(posedge clk);
    #1;
    prev_blk = -1;
    for (int n = 0; n < N_EXEC; n++) begin
      int b;
      b = ($urandom_range(0, 2) == 0 && prev_blk >= 0) ? prev_blk
                                                        : $urandom_range(0, N_BLOCKS - 1);
      if (b == prev_blk && blk_enc[b]) n_b2b++;
      if (!blk_enc[b] && blk_len[b] >= 2) n_miss_start++;
      for (int i = 0; i < blk_len[b]; i++) begin
        int gap;
        gap = ($urandom_range(0, 9) == 0) ? $urandom_range(1, 3) : 0;
        if (blk_enc[b] && i >= 2 && gap > 0) n_gap_in_block++;
        if (blk_enc[b] && i == 1) n_hit++;
        if (blk_enc[b] && i == blk_len[b] - 1) n_end++;
        fetch(BASE + 32'((blk_start[b] + i) * 4), blk_enc[b] && i > 0, gap);
      end
      prev_blk = b;
    end
    repeat (5) @(posedge clk);
    chk(req_pc.size() == 0, "fetches left without a response");

    $display("BBIT hits %0d, unencoded block starts %0d, block ends %0d, back-to-back %0d, idle gaps in block %0d",
             n_hit, n_miss_start, n_end, n_b2b, n_gap_in_block);
    $display("codes chosen: XOR %0d XNOR %0d identity %0d invert %0d",
             n_code[0], n_code[1], n_code[2], n_code[3]);
    $display("bus toggles: original program %0d, encoded %0d (%0d%% fewer)",
             tog_orig, tog_bus, tog_orig == 0 ? 0 : 100 - 100 * tog_bus / tog_orig);
    chk(n_hit > 0, "no BBIT hit");
    chk(n_miss_start > 0, "no unencoded block start");
    chk(n_end > 0, "no block end");
    chk(n_b2b > 0, "no back-to-back block");
    chk(n_gap_in_block > 0, "no idle cycle inside a block");
    chk(tog_bus < tog_orig, "encoding did not reduce bus toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
