// tb_bibits_bbit -- self-checking testbench of the basic block identification table.
//
// Keeps its own copy of the table, writes and clears random entries, and after every
// write looks up addresses that are stored (including addresses stored in more than
// one entry, where the lowest entry must win) and addresses that are not. The lookup
// is combinational; writes take effect at the next clock edge.
module tb_bibits_bbit;

  localparam int unsigned DEPTH   = 128;
  localparam int unsigned PC_W    = 30;
  localparam int unsigned INDEX_W = 10;

  logic                     clk = 1'b0;
  logic                     rst_n = 1'b0;
  logic                     wr_en = 1'b0;
  logic [$clog2(DEPTH)-1:0] wr_addr = '0;
  logic                     wr_valid = 1'b0;
  logic [PC_W-1:0]          wr_pc = '0;
  logic [INDEX_W-1:0]       wr_index = '0;
  logic [PC_W-1:0]          lk_pc = '0;
  logic                     lk_hit;
  logic [INDEX_W-1:0]       lk_index;

  bibits_bbit #(.DEPTH(DEPTH), .PC_W(PC_W), .INDEX_W(INDEX_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit                 m_valid [DEPTH];
  logic [PC_W-1:0]    m_pc    [DEPTH];
  logic [INDEX_W-1:0] m_index [DEPTH];

  task automatic lookup(logic [PC_W-1:0] pc);
    bit                 exp_hit;
    logic [INDEX_W-1:0] exp_index;
    exp_hit = 1'b0;
    exp_index = '0;
    for (int e = 0; e < DEPTH; e++) begin
      if (!exp_hit && m_valid[e] && m_pc[e] == pc) begin
        exp_hit = 1'b1;
        exp_index = m_index[e];
      end
    end
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit !== exp_hit || (exp_hit && lk_index !== exp_index)) begin
      failures++;
      $display("FAIL lookup %08h: hit %0b index %0d, expected hit %0b index %0d",
               pc, lk_hit, lk_index, exp_hit, exp_index);
    end
  endtask

  initial begin
    for (int e = 0; e < DEPTH; e++) m_valid[e] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    lookup('0);                       // empty after reset
    for (int n = 0; n < 3000; n++) begin
      // write one entry; PCs come from a small pool so that duplicates occur
      @(negedge clk);
      wr_en    = 1'b1;
      wr_addr  = 7'($urandom_range(0, DEPTH - 1));
      wr_valid = ($urandom_range(0, 5) != 0);
      wr_pc    = PC_W'($urandom_range(0, 300));
      wr_index = INDEX_W'($urandom());
      @(posedge clk);
      m_valid[wr_addr] = wr_valid;
      m_pc[wr_addr]    = wr_pc;
      m_index[wr_addr] = wr_index;
      #1 wr_en = 1'b0;
      lookup(PC_W'($urandom_range(0, 300)));
      lookup(wr_pc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
