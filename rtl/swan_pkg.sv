// swan_pkg - types and constants shared by the SWAN fabric.
//
// A SWAN fabric replaces a security-critical netlist with sets of identical
// fixed-function gate clusters ("primitive logic blocks") joined by one-time
// programmable crossbars. This package holds:
//   * blk_fn_e      - the functions a primitive logic block can have. The set
//                     of clusters is this design's own choice of small, common
//                     two- and three-input clusters; a fabric generator would
//                     mine them from the protected netlist.
//   * lfsr_taps()   - maximal-length feedback taps for the canary driver.
//   * helpers that fix the numbering of crossbar sources and the bit layout
//     of the fuse configuration word, so that the fabric and any tool (or
//     testbench) that builds configurations agree on it.
//
// Crossbar source numbering (the same for every crossbar in a fabric):
//   0 = constant 0, 1 = constant 1 (configuration-defined constants),
//   2 .. 2+N_IN-1              fabric inputs,
//   then LFSR_W canary-driver bits, then N_REG register outputs,
//   then the outputs of all combinational blocks, set 0 first.
// Configuration word layout, LSB first: three SEL_W-bit selects per
// combinational block (inputs a, b, c), one per register, one per fabric
// output, two per checker comparator, then one enable bit per comparator.
package swan_pkg;

  typedef enum logic [3:0] {
    BLK_AND2  = 4'd0,  // y = a & b
    BLK_OR2   = 4'd1,  // y = a | b
    BLK_XOR2  = 4'd2,  // y = a ^ b
    BLK_NAND2 = 4'd3,  // y = ~(a & b)
    BLK_MUX2  = 4'd4,  // y = c ? b : a
    BLK_AO21  = 4'd5,  // y = (a & b) | c
    BLK_OA21  = 4'd6,  // y = (a | b) & c
    BLK_AOI21 = 4'd7   // y = ~((a & b) | c)
  } blk_fn_e;

  // Evaluate one primitive logic block function.
  function automatic logic blk_eval(blk_fn_e fn, logic a, logic b, logic c);
    unique case (fn)
      BLK_AND2:  return a & b;
      BLK_OR2:   return a | b;
      BLK_XOR2:  return a ^ b;
      BLK_NAND2: return ~(a & b);
      BLK_MUX2:  return c ? b : a;
      BLK_AO21:  return (a & b) | c;
      BLK_OA21:  return (a | b) & c;
      BLK_AOI21: return ~((a & b) | c);
      default:   return 1'b0;
    endcase
  endfunction

  // Feedback taps (bit i set = stage i+1 is tapped) of a maximal-length
  // Fibonacci LFSR of the given width, 3 to 16 bits.
  function automatic logic [15:0] lfsr_taps(int unsigned w);
    case (w)
      3:  return 16'h0006;  // x^3 + x^2 + 1
      4:  return 16'h000C;
      5:  return 16'h0014;
      6:  return 16'h0030;
      7:  return 16'h0060;
      8:  return 16'h00B8;  // x^8 + x^6 + x^5 + x^4 + 1
      9:  return 16'h0110;
      10: return 16'h0240;
      11: return 16'h0500;
      12: return 16'h0829;
      13: return 16'h100D;
      14: return 16'h2015;
      15: return 16'h6000;
      16: return 16'hD008;
      default: return 16'h0000;
    endcase
  endfunction

  // Number of physical blocks in set s: camouflaged ("secure") sets get
  // more copies than the minimum replication.
  function automatic int unsigned set_size(int unsigned s, logic [31:0] secure_sets,
                                           int unsigned mappings, int unsigned secure_mappings);
    return (s < 32 && secure_sets[s[4:0]]) ? secure_mappings : mappings;
  endfunction

  // Index of the first block of set s in the flat block numbering.
  function automatic int unsigned set_first(int unsigned s, logic [31:0] secure_sets,
                                            int unsigned mappings, int unsigned secure_mappings);
    int unsigned n = 0;
    for (int unsigned i = 0; i < s; i++) n += set_size(i, secure_sets, mappings, secure_mappings);
    return n;
  endfunction

  // Crossbar source indices.
  function automatic int unsigned src_pin(int unsigned i);
    return 2 + i;
  endfunction
  function automatic int unsigned src_lfsr(int unsigned j, int unsigned n_in);
    return 2 + n_in + j;
  endfunction
  function automatic int unsigned src_reg(int unsigned r, int unsigned n_in, int unsigned lfsr_w);
    return 2 + n_in + lfsr_w + r;
  endfunction
  function automatic int unsigned src_blk(int unsigned b, int unsigned n_in, int unsigned lfsr_w,
                                          int unsigned n_reg);
    return 2 + n_in + lfsr_w + n_reg + b;
  endfunction

  // Width of a crossbar select for a source count.
  function automatic int unsigned sel_width(int unsigned n_src);
    return (n_src < 2) ? 1 : $clog2(n_src);
  endfunction

  // Bit offsets in the configuration word.
  function automatic int unsigned cfg_blk_off(int unsigned b, int unsigned i, int unsigned sel_w);
    return (3 * b + i) * sel_w;
  endfunction
  function automatic int unsigned cfg_reg_off(int unsigned r, int unsigned n_blk, int unsigned sel_w);
    return (3 * n_blk + r) * sel_w;
  endfunction
  function automatic int unsigned cfg_out_off(int unsigned o, int unsigned n_blk, int unsigned n_reg,
                                              int unsigned sel_w);
    return (3 * n_blk + n_reg + o) * sel_w;
  endfunction
  function automatic int unsigned cfg_chk_off(int unsigned k, int unsigned op, int unsigned n_blk,
                                              int unsigned n_reg, int unsigned n_out, int unsigned sel_w);
    return (3 * n_blk + n_reg + n_out + 2 * k + op) * sel_w;
  endfunction
  function automatic int unsigned cfg_en_off(int unsigned k, int unsigned n_blk, int unsigned n_reg,
                                             int unsigned n_out, int unsigned n_chk, int unsigned sel_w);
    return (3 * n_blk + n_reg + n_out + 2 * n_chk) * sel_w + k;
  endfunction
  function automatic int unsigned cfg_width(int unsigned n_blk, int unsigned n_reg, int unsigned n_out,
                                            int unsigned n_chk, int unsigned sel_w);
    return (3 * n_blk + n_reg + n_out + 2 * n_chk) * sel_w + n_chk;
  endfunction

endpackage
