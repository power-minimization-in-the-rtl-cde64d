// bibits_pkg -- shared types and constants of the BIBITS instruction-bus decoder.
//
// BIBITS cuts the switching activity on the data bus of a program memory. An offline
// tool re-encodes the instructions of selected basic blocks: every 32-bit MIPS word is
// split into six 5-bit partitions, and each partition is sent as a function of itself
// and of the same partition of the previous word on the bus (identity, invert, XOR or
// XNOR), whichever toggles fewest bus lines. The decoder next to the CPU undoes this
// with the 2-bit transformation code stored per partition in a transformation table.
//
// Partition layout (follows the drawn instruction split): bit 30 and bit 5 travel
// unencoded; the remaining 30 bits form six partitions, packed MSB first:
//   P0 = {bit 31, bits 29:26}  (opcode without bit 30)
//   P1 = bits 25:21 (rs)   P2 = bits 20:16 (rt)   P3 = bits 15:11 (rd)
//   P4 = bits 10:6 (shamt) P5 = bits 4:0 (funct without bit 5)
// The written description names bit 6 rather than bit 5 as the second unencoded bit;
// the drawing keeps the whole 10:6 field as one partition, and that is what is used.
//
// Transformation codes follow the input numbering of the decoder multiplexer:
//   00 XOR, 01 XNOR, 10 identity, 11 invert.
package bibits_pkg;

  localparam int unsigned INSTR_W = 32;  // MIPS instruction word
  localparam int unsigned PART_W  = 5;   // one register field per partition
  localparam int unsigned N_PART  = 6;   // partitions per instruction
  localparam int unsigned ENC_W   = N_PART * PART_W;  // 30 encoded bits
  localparam int unsigned SKIP_HI = 30;  // unencoded bit positions
  localparam int unsigned SKIP_LO = 5;

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PART_W-1:0]  part_t;

  typedef enum logic [1:0] {
    TAU_XOR  = 2'b00,
    TAU_XNOR = 2'b01,
    TAU_ID   = 2'b10,
    TAU_INV  = 2'b11
  } tau_e;

  // One transformation table entry: the codes of one encoded instruction (tau[p] for
  // partition p) and the end bit that marks the last encoded instruction of a basic block.
  typedef struct packed {
    tau_e [N_PART-1:0] tau;
    logic              last;
  } tt_entry_t;

  // The 30 encoded bits of a word, packed MSB first (P0 in bits 29:25).
  function automatic logic [ENC_W-1:0] enc_bits(instr_t w);
    logic [ENC_W-1:0] r;
    int unsigned k;
    k = ENC_W;
    for (int i = INSTR_W - 1; i >= 0; i--) begin
      if (i != SKIP_HI && i != SKIP_LO) begin
        k--;
        r[k] = w[i];
      end
    end
    return r;
  endfunction

  // Inverse of enc_bits: puts 30 encoded bits back around the two unencoded bits of w.
  function automatic instr_t merge_bits(logic [ENC_W-1:0] e, instr_t w);
    instr_t r;
    int unsigned k;
    r = w;
    k = ENC_W;
    for (int i = INSTR_W - 1; i >= 0; i--) begin
      if (i != SKIP_HI && i != SKIP_LO) begin
        k--;
        r[i] = e[k];
      end
    end
    return r;
  endfunction

  // Partition p of a word.
  function automatic part_t get_part(instr_t w, int unsigned p);
    logic [ENC_W-1:0] e;
    e = enc_bits(w);
    return e[(N_PART-1-p)*PART_W +: PART_W];
  endfunction

  // One partition through a transformation. The four functions are their own inverses
  // with respect to the previous bus value: apply(apply(x, prev), prev) == x.
  function automatic part_t apply_tau(tau_e t, part_t v, part_t prev);
    unique case (t)
      TAU_XOR:  return v ^ prev;
      TAU_XNOR: return ~(v ^ prev);
      TAU_ID:   return v;
      default:  return ~v;
    endcase
  endfunction

endpackage
