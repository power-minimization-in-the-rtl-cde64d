// tb_bibits_ref_pkg -- reference model of BIBITS encoding for the testbenches.
//
// Written independently of the RTL: partitions are cut with explicit bit slices of the
// MIPS fields rather than with the RTL's packing loop, and the codes are plain 2-bit
// numbers (00 XOR, 01 XNOR, 10 identity, 11 invert). The encoder is the offline
// heuristic: for each partition of each instruction after the first one of a block,
// pick the function that leaves the fewest toggles against the same partition of the
// previous bus word (ties resolved in the order identity, invert, XOR, XNOR).
package tb_bibits_ref_pkg;

  // Partition p of word w, p = 0..5: {31,29:26}, 25:21, 20:16, 15:11, 10:6, 4:0.
  function automatic logic [4:0] ref_part(logic [31:0] w, int p);
    case (p)
      0:       return {w[31], w[29:26]};
      1:       return w[25:21];
      2:       return w[20:16];
      3:       return w[15:11];
      4:       return w[10:6];
      default: return w[4:0];
    endcase
  endfunction

  function automatic logic [31:0] ref_set_part(logic [31:0] w, int p, logic [4:0] v);
    logic [31:0] r;
    r = w;
    case (p)
      0:       {r[31], r[29:26]} = v;
      1:       r[25:21] = v;
      2:       r[20:16] = v;
      3:       r[15:11] = v;
      4:       r[10:6]  = v;
      default: r[4:0]   = v;
    endcase
    return r;
  endfunction

  function automatic logic [4:0] ref_apply(logic [1:0] code, logic [4:0] v, logic [4:0] prev);
    case (code)
      2'b00:   return v ^ prev;
      2'b01:   return ~(v ^ prev);
      2'b10:   return v;
      default: return ~v;
    endcase
  endfunction

  function automatic int popcount32(logic [31:0] v);
    int n;
    n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  // Encode x against the previous bus word prev. Returns the bus word; codes[2p+1:2p]
  // receives the code of partition p.
  function automatic logic [31:0] ref_encode(logic [31:0] x, logic [31:0] prev,
                                             output logic [11:0] codes);
    logic [31:0] y;
    logic [1:0]  order [4];
    order = '{2'b10, 2'b11, 2'b00, 2'b01};
    y = x;
    codes = '0;
    for (int p = 0; p < 6; p++) begin
      int best_hd;
      logic [4:0] best_v, cand;
      logic [1:0] best_c;
      best_hd = 99;
      best_v  = '0;
      best_c  = 2'b10;
      foreach (order[k]) begin
        cand = ref_apply(order[k], ref_part(x, p), ref_part(prev, p));
        if (popcount32({27'd0, cand ^ ref_part(prev, p)}) < best_hd) begin
          best_hd = popcount32({27'd0, cand ^ ref_part(prev, p)});
          best_v  = cand;
          best_c  = order[k];
        end
      end
      y = ref_set_part(y, p, best_v);
      codes[2*p +: 2] = best_c;
    end
    return y;
  endfunction

  // Decode bus word y against the previous bus word with the given codes.
  function automatic logic [31:0] ref_decode(logic [31:0] y, logic [31:0] prev,
                                             logic [11:0] codes);
    logic [31:0] x;
    x = y;
    for (int p = 0; p < 6; p++)
      x = ref_set_part(x, p, ref_apply(codes[2*p +: 2], ref_part(y, p), ref_part(prev, p)));
    return x;
  endfunction

endpackage
