// bibits_fetcher -- instruction fetcher between the CPU's PC and the program memory.
//
// The CPU presents a fetch address with cpu_req. The fetcher registers it onto the
// address bus (imem_req/imem_addr one cycle later) and keeps the address bus at its last
// value while no fetch is made, so an idle bus does not toggle. The program memory
// answers with a fixed latency of MEM_LAT cycles after imem_req (0 means in the same
// cycle). The fetcher tracks each outstanding fetch in a MEM_LAT-deep shift register,
// raises rsp_valid when its word is on imem_rdata, and carries a side-band tag with it
// so that the decoding control can keep per-fetch information (encoded or not, the
// transformation codes) lined up with the word. The tag is sampled in the cycle of
// imem_req, i.e. one cycle after cpu_req.
//
// The published scheme gives this unit's role only (send the PC to memory, read the
// instruction); the registered address, the fixed memory latency and the tag are this
// design's own choices. One fetch may be started per cycle; there is no back-pressure.
module bibits_fetcher #(
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned DATA_W  = 32,
  parameter int unsigned MEM_LAT = 1,     // program memory read latency in cycles
  parameter int unsigned TAG_W   = 13
) (
  input  logic                clk,
  input  logic                rst_n,
  // from the CPU
  input  logic                cpu_req,
  input  logic [ADDR_W-1:0]   cpu_pc,
  // program memory
  output logic                imem_req,
  output logic [ADDR_W-1:0]   imem_addr,
  input  logic [DATA_W-1:0]   imem_rdata,
  // per-fetch side band, sampled with imem_req
  input  logic [TAG_W-1:0]    tag_in,
  // fetched word
  output logic                rsp_valid,
  output logic [DATA_W-1:0]   rsp_data,
  output logic [TAG_W-1:0]    rsp_tag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      imem_req  <= 1'b0;
      imem_addr <= '0;
    end else begin
      imem_req <= cpu_req;
      if (cpu_req) imem_addr <= cpu_pc;
    end
  end

  if (MEM_LAT == 0) begin : g_comb
    assign rsp_valid = imem_req;
    assign rsp_tag   = tag_in;
  end else begin : g_pipe
    logic [MEM_LAT-1:0]            v_q;
    logic [MEM_LAT-1:0][TAG_W-1:0] t_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_q <= '0;
        t_q <= '0;
      end else begin
        v_q[0] <= imem_req;
        t_q[0] <= tag_in;
        for (int s = 1; s < MEM_LAT; s++) begin
          v_q[s] <= v_q[s-1];
          t_q[s] <= t_q[s-1];
        end
      end
    end

    assign rsp_valid = v_q[MEM_LAT-1];
    assign rsp_tag   = t_q[MEM_LAT-1];
  end

  assign rsp_data = imem_rdata;

endmodule
