// crc_pkg -- shared types and encodings of the processor-like reconfigurable
// array (CRC: Configurable Reconfigurable Core).
//
// Holds the FU operation code, the side numbering of the nearest-neighbour
// network, the boot-configuration target codes and helper functions that give
// the widths of the context word and of an FSM table entry for a given set of
// array parameters. The operator set (*, +, ==, <, AND, OR, NOT, SEL) is the
// one of the published instances; the 3-bit code values, the side order and
// the word layouts are this design's own choices.
package crc_pkg;

  // FU operations. Code 0 (MUL) is what a cleared context holds.
  typedef enum logic [2:0] {
    OP_MUL = 3'd0,  // signed half-width x half-width -> full width
    OP_ADD = 3'd1,  // a + b (modulo 2^WIDTH)
    OP_EQ  = 3'd2,  // status = (a == b)
    OP_LT  = 3'd3,  // status = (a < b), signed
    OP_AND = 3'd4,  // a & b, status = s_in & (a != 0)
    OP_OR  = 3'd5,  // a | b, status = s_in | (a != 0)
    OP_NOT = 3'd6,  // ~a,    status = ~s_in
    OP_SEL = 3'd7   // s_in ? b : a
  } fu_op_e;

  // Sides of a PE in the nearest-neighbour network.
  localparam int unsigned N_SIDES = 4;
  typedef enum logic [1:0] {
    SIDE_N = 2'd0,
    SIDE_E = 2'd1,
    SIDE_S = 2'd2,
    SIDE_W = 2'd3
  } side_e;

  // Boot configuration targets.
  typedef enum logic {
    CFG_CTX = 1'b0,  // write a context memory word
    CFG_FSM = 1'b1   // write an FSM state table entry
  } cfg_tgt_e;

  // Index width that is at least 1 bit.
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Select widths. FU operand selects address the four neighbour inputs
  // followed by the registers; output selects address the registers, then the
  // FU result, then the inputs of the four sides (pass-through routing).
  function automatic int unsigned opsel_w(input int unsigned nreg);
    return idx_w(N_SIDES + nreg);
  endfunction
  function automatic int unsigned outsel_w(input int unsigned nreg);
    return idx_w(nreg + 1 + N_SIDES);
  endfunction
  // The FSM condition may also take this cycle's own FU status result.
  function automatic int unsigned condsel_w(input int unsigned nsreg);
    return idx_w(N_SIDES + nsreg + 1);
  endfunction

  // Width of one context word (see crc_pe for the field order).
  function automatic int unsigned ctx_word_w(input int unsigned ndreg,
                                             input int unsigned nsreg);
    return 3                                 // op
         + 2 * opsel_w(ndreg)                // src_a, src_b
         + opsel_w(nsreg)                    // src_s
         + 1 + idx_w(ndreg)                  // data register write
         + 1 + idx_w(nsreg)                  // status register write
         + N_SIDES * outsel_w(ndreg)         // data outputs
         + N_SIDES * outsel_w(nsreg);        // status outputs
  endfunction

  // Width of one FSM table entry: context, condition, two next states.
  function automatic int unsigned fsm_word_w(input int unsigned nstates,
                                             input int unsigned nctx,
                                             input int unsigned nsreg);
    return idx_w(nctx) + condsel_w(nsreg) + 2 * idx_w(nstates);
  endfunction

  function automatic int unsigned max2(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

endpackage
