// tb_bibits_latency -- decoding control with other memory latencies and small tables.
//
// Two copies of the top level, one with a program memory that answers in the cycle of
// the request (MEM_LAT = 0) and one that answers three cycles later (MEM_LAT = 3),
// both with an 8-entry BBIT and a 64-row TT. Both see the same program, tables and
// fetch stream; each has its own memory model. For every fetch the testbench checks
// the original instruction, the decoded flag and a latency of exactly 1 + MEM_LAT
// cycles. The small tables are filled up to their last row, so a block that ends in
// the table's last row is exercised too.
module tb_bibits_latency;
  import bibits_pkg::*;
  import tb_bibits_ref_pkg::*;

  localparam int unsigned BBIT_DEPTH = 8;
  localparam int unsigned TT_DEPTH   = 64;
  localparam int unsigned N_BLOCKS   = 12;
  localparam int unsigned MEM_WORDS  = 256;

  logic                          clk = 1'b0;
  logic                          rst_n = 1'b0;
  logic                          cpu_req = 1'b0;
  logic [31:0]                   cpu_pc = '0;
  logic                          bbit_wr_en = 1'b0;
  logic [$clog2(BBIT_DEPTH)-1:0] bbit_wr_addr = '0;
  logic                          bbit_wr_valid = 1'b0;
  logic [29:0]                   bbit_wr_pc = '0;
  logic [$clog2(TT_DEPTH)-1:0]   bbit_wr_index = '0;
  logic                          tt_wr_en = 1'b0;
  logic [$clog2(TT_DEPTH)-1:0]   tt_wr_addr = '0;
  tt_entry_t                     tt_wr_data;

  logic        v0, v3, d0, d3, rq0, rq3;
  instr_t      i0, i3, rd0, rd3;
  logic [31:0] a0, a3;

  bibits_decode_ctrl #(.BBIT_DEPTH(BBIT_DEPTH), .TT_DEPTH(TT_DEPTH), .MEM_LAT(0)) u_lat0 (
    .clk, .rst_n, .cpu_req, .cpu_pc, .cpu_rvalid(v0), .cpu_instr(i0), .cpu_decoded(d0),
    .imem_req(rq0), .imem_addr(a0), .imem_rdata(rd0),
    .bbit_wr_en, .bbit_wr_addr, .bbit_wr_valid, .bbit_wr_pc, .bbit_wr_index,
    .tt_wr_en, .tt_wr_addr, .tt_wr_data
  );

  bibits_decode_ctrl #(.BBIT_DEPTH(BBIT_DEPTH), .TT_DEPTH(TT_DEPTH), .MEM_LAT(3)) u_lat3 (
    .clk, .rst_n, .cpu_req, .cpu_pc, .cpu_rvalid(v3), .cpu_instr(i3), .cpu_decoded(d3),
    .imem_req(rq3), .imem_addr(a3), .imem_rdata(rd3),
    .bbit_wr_en, .bbit_wr_addr, .bbit_wr_valid, .bbit_wr_pc, .bbit_wr_index,
    .tt_wr_en, .tt_wr_addr, .tt_wr_data
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
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
  int          blk_start [N_BLOCKS];
  int          blk_len   [N_BLOCKS];
  bit          blk_enc   [N_BLOCKS];

  // memory models: same cycle, and three cycles after imem_req
  logic [31:0] a3_q [3];
  always_ff @(posedge clk) begin
    a3_q[0] <= a3;
    a3_q[1] <= a3_q[0];
    a3_q[2] <= a3_q[1];
  end
  assign rd0 = mem[a0[9:2]];
  assign rd3 = mem[a3_q[2][9:2]];

  int          cycle = 0;
  always @(posedge clk) cycle++;

  int          q_cycle0[$], q_cycle3[$];
  logic [31:0] q_pc0[$], q_pc3[$];
  bit          q_enc0[$], q_enc3[$];
  int          n_enc = 0, n_last_row = 0;

  always @(negedge clk) if (rst_n) begin
    if (v0) begin
      int c; logic [31:0] pc; bit e;
      c = q_cycle0.pop_front(); pc = q_pc0.pop_front(); e = q_enc0.pop_front();
      chk(cycle - c == 1, "latency-0 memory: response one cycle after the request");
      chk(i0 == orig[pc[9:2]], $sformatf("latency 0, pc %08h: got %08h expected %08h",
                                         pc, i0, orig[pc[9:2]]));
      chk(d0 == e, "latency 0: decoded flag");
      if (d0) n_enc++;
    end
    if (v3) begin
      int c; logic [31:0] pc; bit e;
      c = q_cycle3.pop_front(); pc = q_pc3.pop_front(); e = q_enc3.pop_front();
      chk(cycle - c == 4, "latency-3 memory: response four cycles after the request");
      chk(i3 == orig[pc[9:2]], $sformatf("latency 3, pc %08h: got %08h expected %08h",
                                         pc, i3, orig[pc[9:2]]));
      chk(d3 == e, "latency 3: decoded flag");
    end
  end

  function automatic logic [31:0] rand_instr();
    return {6'($urandom_range(0, 3)), 5'($urandom_range(2, 5)), 5'($urandom_range(2, 5)),
            5'($urandom_range(2, 9)), 5'($urandom_range(0, 1)), 6'($urandom_range(32, 35))};
  endfunction

  initial begin
    int          addr, tt_row, bb;
    logic [31:0] prev_y, y;
    logic [11:0] codes;
    int          last_blk;

    // 12 blocks; the first eight (all that fit the BBIT) have 9 instructions each, so
    // their 8 x 8 encoded rows fill the 64-row table exactly. The rest stay unencoded.
    addr = 0;
    for (int b = 0; b < N_BLOCKS; b++) begin
      blk_start[b] = addr;
      blk_len[b]   = (b < 8) ? 9 : $urandom_range(1, 6);
      for (int i = 0; i < blk_len[b]; i++) begin
        orig[addr] = rand_instr();
        mem[addr]  = orig[addr];
        addr++;
      end
    end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    tt_row = 0;
    bb = 0;
    last_blk = -1;
    for (int b = 0; b < N_BLOCKS; b++) begin
      blk_enc[b] = (bb < BBIT_DEPTH) && (blk_len[b] >= 2) &&
                   (tt_row + blk_len[b] - 1 <= TT_DEPTH);
      if (!blk_enc[b]) continue;
      @(negedge clk);
      bbit_wr_en = 1'b1; bbit_wr_addr = 3'(bb); bbit_wr_valid = 1'b1;
      bbit_wr_pc = 30'(blk_start[b] + 1); bbit_wr_index = 6'(tt_row);
      bb++;
      prev_y = orig[blk_start[b]];
      for (int i = 1; i < blk_len[b]; i++) begin
        y = ref_encode(orig[blk_start[b] + i], prev_y, codes);
        mem[blk_start[b] + i] = y;
        @(negedge clk);
        bbit_wr_en = 1'b0;
        tt_wr_en = 1'b1; tt_wr_addr = 6'(tt_row);
        tt_wr_data = tt_entry_t'({codes, 1'(i == blk_len[b] - 1)});
        tt_row++;
        prev_y = y;
      end
      last_blk = b;
      @(negedge clk);
      bbit_wr_en = 1'b0; tt_wr_en = 1'b0;
    end
    chk(tt_row == TT_DEPTH, $sformatf("table not filled to its last row (%0d rows)", tt_row));

    @(posedge clk);
    #1;
    for (int n = 0; n < 800; n++) begin
      int b;
      b = (n % 7 == 0) ? last_blk : $urandom_range(0, N_BLOCKS - 1);
      if (b == last_blk) n_last_row++;
      for (int i = 0; i < blk_len[b]; i++) begin
        if ($urandom_range(0, 7) == 0) begin
          cpu_req = 1'b0;
          @(posedge clk);
          #1;
        end
        cpu_req = 1'b1;
        cpu_pc  = 32'((blk_start[b] + i) * 4);
        q_cycle0.push_back(cycle); q_pc0.push_back(cpu_pc); q_enc0.push_back(blk_enc[b] && i > 0);
        q_cycle3.push_back(cycle); q_pc3.push_back(cpu_pc); q_enc3.push_back(blk_enc[b] && i > 0);
        @(posedge clk);
        #1;
        cpu_req = 1'b0;
      end
    end
    repeat (6) @(posedge clk);
    chk(q_pc0.size() == 0 && q_pc3.size() == 0, "fetches left without a response");
    chk(n_enc > 0, "no encoded fetch");
    chk(n_last_row > 0, "block in the last table row never run");
    $display("encoded fetches %0d, runs of the block ending in the last row %0d", n_enc, n_last_row);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
