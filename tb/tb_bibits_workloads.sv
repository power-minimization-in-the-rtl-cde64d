// tb_bibits_workloads -- the six benchmark configurations run through the decoding control.
//
// The evaluated kernels (matrix multiply, SOR, extrapolated Jacobi, FFT, tri-diagonal
// solver, LU decomposition) are characterised here only by their program size and
// basic block count. For each, the testbench builds a synthetic MIPS-like program with
// that many instructions split into that many basic blocks, encodes every block of two
// or more instructions (the unlimited-table configuration), loads the tables and runs a
// loop-heavy fetch trace through the top level at its default sizes. Every fetch is
// checked against the original program, and the design is reset between programs so
// the tables start empty. The instructions are random, so the toggle reductions it
// prints describe these synthetic programs, not the real kernels.
//
//   program   bytes  blocks         program   bytes  blocks
//   mmul        304      13         fft        1152      65
//   sor        1300      14         tri        1252       9
//   ej         1500      22         lu         3376      34
module tb_bibits_workloads;
  import bibits_pkg::*;
  import tb_bibits_ref_pkg::*;

  localparam int unsigned BBIT_DEPTH = 128;
  localparam int unsigned TT_DEPTH   = 1024;
  localparam int unsigned MEM_WORDS  = 1024;
  localparam logic [31:0] BASE       = 32'h0040_0000;
  localparam int unsigned N_EXEC     = 600;   // block executions per program

  localparam int unsigned N_PROG = 6;
  localparam int unsigned PROG_BYTES  [N_PROG] = '{304, 1300, 1500, 1152, 1252, 3376};
  localparam int unsigned PROG_BLOCKS [N_PROG] = '{13, 14, 22, 65, 9, 34};
  localparam string       PROG_NAME   [N_PROG] = '{"mmul", "sor", "ej", "fft", "tri", "lu"};

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
    repeat (400000) @(posedge clk);
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

  logic [31:0] orig [MEM_WORDS];
  logic [31:0] mem  [MEM_WORDS];
  int          blk_start [128];
  int          blk_len   [128];
  bit          blk_enc   [128];

  function automatic logic [31:0] rand_instr();
    logic [4:0] regs [8];
    regs = '{5'd2, 5'd3, 5'd4, 5'd5, 5'd6, 5'd8, 5'd9, 5'd29};
    case ($urandom_range(0, 2))
      0: return {6'b000000, regs[$urandom_range(0, 7)], regs[$urandom_range(0, 7)],
                 regs[$urandom_range(0, 7)], 5'($urandom_range(0, 3)), 6'b100001};
      1: return {6'b100011, regs[$urandom_range(0, 7)], regs[$urandom_range(0, 7)],
                 16'($urandom_range(0, 64) * 4)};
      default: return {6'b001001, regs[$urandom_range(0, 7)], regs[$urandom_range(0, 7)],
                       16'($urandom_range(0, 15))};
    endcase
  endfunction

  function automatic int widx(logic [31:0] a);
    return int'((a - BASE) >> 2) % MEM_WORDS;
  endfunction

  logic [31:0] rd_q;
  always_ff @(posedge clk) if (imem_req) rd_q <= mem[widx(imem_addr)];
  assign imem_rdata = rd_q;

  logic [31:0] req_pc[$];
  bit          req_enc[$];
  longint      tog_orig = 0, tog_bus = 0;
  logic [31:0] last_bus = '0, last_orig = '0;

  always @(negedge clk) if (rst_n && cpu_rvalid) begin
    logic [31:0] pc;
    bit          enc;
    chk(req_pc.size() != 0, "response without request");
    if (req_pc.size() != 0) begin
      pc  = req_pc.pop_front();
      enc = req_enc.pop_front();
      chk(cpu_instr == orig[widx(pc)],
          $sformatf("pc %08h: got %08h expected %08h", pc, cpu_instr, orig[widx(pc)]));
      chk(cpu_decoded == enc, $sformatf("pc %08h: decoded flag %0b", pc, cpu_decoded));
      tog_orig += longint'(popcount32(orig[widx(pc)] ^ last_orig));
      tog_bus  += longint'(popcount32(imem_rdata ^ last_bus));
      last_orig = orig[widx(pc)];
      last_bus  = imem_rdata;
    end
  end

  task automatic fetch(logic [31:0] pc, bit enc);
    cpu_req = 1'b1;
    cpu_pc  = pc;
    req_pc.push_back(pc);
    req_enc.push_back(enc);
    @(posedge clk);
    #1;
    cpu_req = 1'b0;
  endtask

  task automatic run_program(int w);
    int          n_instr, n_blk, addr, tt_row, spare;
    logic [31:0] prev_y, y;
    logic [11:0] codes;

    n_instr = PROG_BYTES[w] / 4;
    n_blk   = PROG_BLOCKS[w];

    // split n_instr instructions into n_blk blocks of at least one instruction
    spare = n_instr - n_blk;
    for (int b = 0; b < n_blk; b++) blk_len[b] = 1;
    while (spare > 0) begin
      blk_len[$urandom_range(0, n_blk - 1)]++;
      spare--;
    end
    addr = 0;
    for (int b = 0; b < n_blk; b++) begin
      blk_start[b] = addr;
      for (int i = 0; i < blk_len[b]; i++) begin
        orig[addr] = rand_instr();
        mem[addr]  = orig[addr];
        addr++;
      end
    end

    // reset clears the BBIT
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    last_bus = '0;
    last_orig = '0;
    tog_orig = 0;
    tog_bus = 0;

    tt_row = 0;
    for (int b = 0; b < n_blk; b++) begin
      blk_enc[b] = (blk_len[b] >= 2);
      if (!blk_enc[b]) continue;
      @(negedge clk);
      bbit_wr_en    = 1'b1;
      bbit_wr_addr  = 7'(b);
      bbit_wr_valid = 1'b1;
      bbit_wr_pc    = 30'((BASE >> 2) + blk_start[b] + 1);
      bbit_wr_index = 10'(tt_row);
      prev_y = orig[blk_start[b]];
      for (int i = 1; i < blk_len[b]; i++) begin
        y = ref_encode(orig[blk_start[b] + i], prev_y, codes);
        mem[blk_start[b] + i] = y;
        @(negedge clk);
        bbit_wr_en = 1'b0;
        tt_wr_en   = 1'b1;
        tt_wr_addr = 10'(tt_row);
        tt_wr_data = tt_entry_t'({codes, 1'(i == blk_len[b] - 1)});
        tt_row++;
        prev_y = y;
      end
      @(negedge clk);
      bbit_wr_en = 1'b0;
      tt_wr_en   = 1'b0;
    end
    chk(tt_row <= TT_DEPTH && n_blk <= BBIT_DEPTH, "program does not fit the tables");

    @(posedge clk);
    #1;
    for (int n = 0; n < N_EXEC; n++) begin
      int b;
      b = $urandom_range(0, n_blk - 1);
      repeat ($urandom_range(1, 3))
        for (int i = 0; i < blk_len[b]; i++)
          fetch(BASE + 32'((blk_start[b] + i) * 4), blk_enc[b] && i > 0);
    end
    repeat (4) @(posedge clk);
    chk(req_pc.size() == 0, "fetches left without a response");
    chk(tog_bus < tog_orig, "no toggle reduction");
    $display("%-5s %4d instructions %3d blocks %4d TT rows: bus toggles %0d -> %0d (%0d%% fewer)",
             PROG_NAME[w], n_instr, n_blk, tt_row, tog_orig, tog_bus,
             100 - 100 * tog_bus / tog_orig);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < N_PROG; w++) run_program(w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
