// bibits_decoder -- restores an encoded instruction word from the instruction bus.
//
// Each of the six 5-bit partitions of the bus word y_i is passed through one of four
// functions of itself and of the same partition of the previous bus word y_(i-1):
//   code 00: y_i XOR y_(i-1)     code 01: NOT (y_i XOR y_(i-1))
//   code 10: y_i                 code 11: NOT y_i
// The encoder picked the same function when it built the word, and each of the four
// is its own inverse against y_(i-1), so the original word comes back. Bits 30 and 5
// are never encoded and pass straight through.
//
// A register holds the previous bus word. It loads every word that arrives with
// bus_valid, encoded or not, because the encoder worked against whatever preceded the
// word on the bus. It resets to zero (reset value is this design's choice).
//
// Interface: bus_valid/bus_data is the word arriving from memory, tau[p] the code of
// partition p (partition 0 = bits {31,29:26}). dec_data is combinational from bus_data, tau
// and the stored previous word, valid in the same cycle as bus_valid.
//
// The four functions, the one-register structure and the code numbering follow the
// decoder drawing; the register reset and the valid qualifier are this design's own.
module bibits_decoder
  import bibits_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     bus_valid,
  input  instr_t                   bus_data,
  input  tau_e [N_PART-1:0]        tau,
  output instr_t                   dec_data
);

  instr_t prev_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         prev_q <= '0;
    else if (bus_valid) prev_q <= bus_data;
  end

  always_comb begin
    logic [ENC_W-1:0] y, p, x;
    y = enc_bits(bus_data);
    p = enc_bits(prev_q);
    for (int k = 0; k < N_PART; k++) begin
      x[(N_PART-1-k)*PART_W +: PART_W] =
        apply_tau(tau[k], y[(N_PART-1-k)*PART_W +: PART_W],
                  p[(N_PART-1-k)*PART_W +: PART_W]);
    end
    dec_data = merge_bits(x, bus_data);
  end

endmodule
