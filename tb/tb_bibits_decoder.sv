// tb_bibits_decoder -- self-checking testbench of the BIBITS partition decoder.
//
// Drives a stream of bus words. Each word is either encoded by the reference encoder
// against the previous bus word (the decoder must give back the original word) or an
// arbitrary word with arbitrary codes (the decoder must match the reference decoder).
// Also checks the worked example of one partition: previous 01101, original 11110,
// sent as 01100 with XNOR. The decoder output is combinational; words are applied
// one per clock and the previous-word register is checked implicitly by every word.
module tb_bibits_decoder;
  import bibits_pkg::*;
  import tb_bibits_ref_pkg::*;

  typedef tau_e [N_PART-1:0] tau_vec_t;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              bus_valid = 1'b0;
  instr_t            bus_data = '0;
  tau_e [N_PART-1:0] tau = {N_PART{TAU_ID}};
  instr_t            dec_data;

  int checks = 0;
  int failures = 0;

  bibits_decoder dut (
    .clk, .rst_n, .bus_valid, .bus_data, .tau, .dec_data
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  logic [31:0] prev_bus, x, y;
  logic [11:0] codes;

  initial begin
    prev_bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Worked example in partition 1 (rs): previous 01101, original 11110.
    x = 32'h0;
    x[25:21] = 5'b11110;
    prev_bus = 32'h0;
    prev_bus[25:21] = 5'b01101;
    // put the previous word on the bus first
    bus_valid <= 1'b1; bus_data <= prev_bus; tau <= {N_PART{TAU_ID}};
    @(posedge clk);
    y = ref_encode(x, prev_bus, codes);
    check({30'd0, codes[3:2]}, 32'd1, "example code is XNOR");
    check({27'd0, y[25:21]}, 32'b01100, "example encoded partition");
    bus_data <= y; tau <= tau_vec_t'(codes);
    #1 check(dec_data, x, "example decode");
    @(posedge clk);
    prev_bus = y;

    for (int n = 0; n < 4000; n++) begin
      x = $urandom();
      if ($urandom_range(0, 2) == 0) begin
        // arbitrary word, arbitrary codes
        y = $urandom();
        codes = 12'($urandom());
        bus_data <= y; tau <= tau_vec_t'(codes); bus_valid <= 1'b1;
        #1 check(dec_data, ref_decode(y, prev_bus, codes), "random codes");
      end else begin
        y = ref_encode(x, prev_bus, codes);
        bus_data <= y; tau <= tau_vec_t'(codes); bus_valid <= 1'b1;
        #1 check(dec_data, x, "encode/decode round trip");
      end
      @(posedge clk);
      prev_bus = y;
      // an idle cycle now and then must not disturb the stored previous word
      if ($urandom_range(0, 7) == 0) begin
        bus_valid <= 1'b0; bus_data <= $urandom();
        @(posedge clk);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
