// tb_bibits_fetcher -- self-checking testbench of the instruction fetcher.
//
// Two fetchers, with memory latencies 1 (the default) and 3, see the same random
// stream of fetches. A memory model behind each answers imem_addr with a word derived
// from the address, MEM_LAT cycles after imem_req. For every fetch the testbench
// expects: imem_req/imem_addr one cycle after cpu_req, the response exactly
// 1 + MEM_LAT cycles after cpu_req, the right word, and the tag that was presented in
// the imem_req cycle. It also checks that the address bus holds still while idle.
module tb_bibits_fetcher;

  localparam int unsigned TAG_W = 13;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             cpu_req = 1'b0;
  logic [31:0]      cpu_pc = '0;
  logic [TAG_W-1:0] tag_in = '0;

  logic             req1, req3, v1, v3;
  logic [31:0]      addr1, addr3, rd1, rd3, d1, d3;
  logic [TAG_W-1:0] t1, t3;

  bibits_fetcher u_l1 (
    .clk, .rst_n, .cpu_req, .cpu_pc, .imem_req(req1), .imem_addr(addr1),
    .imem_rdata(rd1), .tag_in, .rsp_valid(v1), .rsp_data(d1), .rsp_tag(t1)
  );

  bibits_fetcher #(.MEM_LAT(3)) u_l3 (
    .clk, .rst_n, .cpu_req, .cpu_pc, .imem_req(req3), .imem_addr(addr3),
    .imem_rdata(rd3), .tag_in, .rsp_valid(v3), .rsp_data(d3), .rsp_tag(t3)
  );

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return {a[15:0], ~a[31:16]} ^ 32'h5a5a_0f0f;
  endfunction

  // memory models: a word read at cycle c is on the bus at cycle c + MEM_LAT
  logic [31:0] a1_q;
  logic [31:0] a3_q [3];
  always_ff @(posedge clk) begin
    a1_q  <= addr1;
    a3_q[0] <= addr3;
    a3_q[1] <= a3_q[0];
    a3_q[2] <= a3_q[1];
  end
  assign rd1 = mem_word(a1_q);
  assign rd3 = mem_word(a3_q[2]);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected responses keyed by the cycle in which they are due
  logic [31:0]      exp_pc  [int];
  logic [TAG_W-1:0] tag_at  [int];
  int               req_at  [int];   // cycle of cpu_req -> 1
  logic [31:0]      last_addr;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // sample everything just before each rising edge
  always @(negedge clk) if (rst_n) begin
    // address bus
    if (req_at.exists(cycle - 1)) begin
      chk(req1 && req3, "imem_req one cycle after cpu_req");
      chk(addr1 == exp_pc[cycle - 1] && addr3 == exp_pc[cycle - 1], "imem_addr is the PC");
    end else begin
      chk(!req1 && !req3, "no imem_req without cpu_req");
      chk(addr1 == last_addr, "address bus holds while idle");
    end
    last_addr = addr1;
    tag_at[cycle] = tag_in;
    // responses
    chk(v1 == req_at.exists(cycle - 2), "latency-1 response timing");
    if (v1) begin
      chk(d1 == mem_word(exp_pc[cycle - 2]), "latency-1 word");
      chk(t1 == tag_at[cycle - 1], "latency-1 tag");
    end
    chk(v3 == req_at.exists(cycle - 4), "latency-3 response timing");
    if (v3) begin
      chk(d3 == mem_word(exp_pc[cycle - 4]), "latency-3 word");
      chk(t3 == tag_at[cycle - 3], "latency-3 tag");
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (cpu_req) begin
      req_at[cycle] = 1;
      exp_pc[cycle] = cpu_pc;
    end
    cycle++;
  end

  initial begin
    last_addr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      #2;
      cpu_req = ($urandom_range(0, 3) != 0);
      cpu_pc  = {30'($urandom()), 2'b00};
      tag_in  = TAG_W'($urandom());
    end
    @(posedge clk);
    #2 cpu_req = 1'b0;
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
