// crc_tb_pkg -- helpers shared by the PE and array testbenches.
//
// Builds context words and FSM table entries for the default PE parameters
// (32-bit data, 12 data and 12 status registers, 16 contexts, 16 states),
// written out here from the documented field layout rather than taken from
// the RTL's own struct:
//   context (65 bits) = op[64:62] src_a[61:58] src_b[57:54] src_s[53:50]
//                       dreg_we[49] dreg_dst[48:45] sreg_we[44] sreg_dst[43:40]
//                       dout_sel side i at [20+5i +: 5], sout_sel side i at [5i +: 5]
//   FSM entry (17 bits) = ctx[16:13] cond[12:8] next_t[7:4] next_f[3:0]
package crc_tb_pkg;
  import crc_pkg::*;

  // operand select codes
  localparam int IN_N = 0, IN_E = 1, IN_S = 2, IN_W = 3;
  function automatic int REG(int i); return 4 + i; endfunction
  // output select codes
  localparam int O_FU = 12, PASS_N = 13, PASS_E = 14, PASS_S = 15, PASS_W = 16;
  // FSM condition codes
  localparam int C_N = 0, C_E = 1, C_S = 2, C_W = 3, C_FU = 16;
  function automatic int C_SREG(int i); return 4 + i; endfunction

  typedef struct {
    fu_op_e op;
    int     a, b, s;
    bit     dwe;  int ddst;
    bit     swe;  int sdst;
    int     dout [4];
    int     sout [4];
  } ctx_f;

  function automatic ctx_f idle();
    ctx_f c;
    c.op = OP_MUL; c.a = 0; c.b = 0; c.s = 0;
    c.dwe = 0; c.ddst = 0; c.swe = 0; c.sdst = 0;
    for (int i = 0; i < 4; i++) begin c.dout[i] = 0; c.sout[i] = 0; end
    return c;
  endfunction

  function automatic logic [64:0] pack_ctx(ctx_f c);
    logic [64:0] w;
    w = '0;
    w[64:62] = c.op;
    w[61:58] = 4'(c.a);
    w[57:54] = 4'(c.b);
    w[53:50] = 4'(c.s);
    w[49]    = c.dwe;
    w[48:45] = 4'(c.ddst);
    w[44]    = c.swe;
    w[43:40] = 4'(c.sdst);
    for (int i = 0; i < 4; i++) begin
      w[20 + 5*i +: 5] = 5'(c.dout[i]);
      w[5*i +: 5]      = 5'(c.sout[i]);
    end
    return w;
  endfunction

  function automatic logic [16:0] pack_fsm(int ctx, int cond, int nt, int nf);
    return {4'(ctx), 5'(cond), 4'(nt), 4'(nf)};
  endfunction

  // Signed product of the low 16-bit halves, as the FU defines MUL.
  function automatic logic [31:0] mul16(logic [31:0] a, logic [31:0] b);
    int sa, sb;
    sa = int'(signed'(a[15:0]));
    sb = int'(signed'(b[15:0]));
    return 32'(sa * sb);
  endfunction
endpackage
