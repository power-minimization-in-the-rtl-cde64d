// tb_bibits_tt -- self-checking testbench of the transformation table.
//
// Checks the reset value of the read register, then fills the table with random rows
// while keeping a copy, and reads random rows back. A read issued at one clock edge
// must show its row after that edge and keep it while no further read is issued.
module tb_bibits_tt;
  import bibits_pkg::*;

  localparam int unsigned DEPTH = 1024;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          wr_en = 1'b0;
  logic [AW-1:0] wr_addr = '0;
  tt_entry_t     wr_data;
  logic          rd_en = 1'b0;
  logic [AW-1:0] rd_addr = '0;
  tt_entry_t     rd_data;

  bibits_tt #(.DEPTH(DEPTH)) dut (.*);

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

  logic [12:0] model [DEPTH];

  task automatic expect_row(logic [12:0] exp, string what);
    checks++;
    if (13'(rd_data) !== exp) begin
      failures++;
      $display("FAIL %s: got %04h expected %04h", what, 13'(rd_data), exp);
    end
  endtask

  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 expect_row({12'b10_10_10_10_10_10, 1'b1}, "reset row is identity with end bit");
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1'b1;
      wr_addr = AW'(a);
      model[a] = 13'($urandom());
      wr_data = tt_entry_t'(model[a]);
    end
    @(negedge clk);
    wr_en = 1'b0;
    // random reads, sometimes with idle cycles in between
    for (int n = 0; n < 4000; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      rd_en = 1'b1;
      rd_addr = AW'(a);
      @(posedge clk);
      #1 expect_row(model[a], "read after one cycle");
      if ($urandom_range(0, 3) == 0) begin
        rd_en = 1'b0;
        rd_addr = AW'($urandom());
        @(posedge clk);
        #1 expect_row(model[a], "row held while idle");
      end
      // overwrite a row now and then
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk);
        rd_en = 1'b0;
        wr_en = 1'b1;
        model[a] = 13'($urandom());
        wr_addr = AW'(a);
        wr_data = tt_entry_t'(model[a]);
        @(negedge clk);
        wr_en = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
