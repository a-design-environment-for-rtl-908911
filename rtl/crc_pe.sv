// crc_pe -- processing element (PE) of the CRC reconfigurable array.
//
// A PE holds a context memory, a configurable FSM, a boot configuration
// port, a functional unit (FU), a register set and the multiplexers that
// connect it to its four neighbours (N, E, S, W). Every cycle the FSM state
// selects one context word; that word alone decides what the PE does in
// the cycle:
//
//   field      bits          meaning
//   op         3             FU operation (crc_pkg::fu_op_e)
//   src_a/b    opsel_w(ND)   data operand: 0..3 = input from N,E,S,W,
//                            4.. = data register (code - 4)
//   src_s      opsel_w(NS)   status operand, same coding over the status
//                            inputs and status registers
//   dreg_we/dst 1 + idx      write the FU data result into a data register
//   sreg_we/dst 1 + idx      write the FU status result into a status register
//   dout_sel[4] outsel_w(ND) data output of each side: 0..ND-1 = register,
//                            ND = FU result, ND+1..ND+4 = input from N,E,S,W
//                            (pass-through routing)
//   sout_sel[4] outsel_w(NS) status output of each side, same coding
//
// The word is packed in this order, op in the most significant bits and
// the side arrays indexed N=0 .. W=3 from the least significant end. With
// the default parameters it is 65 bits wide.
//
// Timing: FSM state register -> context memory read -> operand multiplexers
// -> FU -> output multiplexers is combinational, so a side output set to "FU
// result" or "pass-through" reaches the neighbour in the same cycle. This is
// what lets operations in neighbouring PEs be chained within one clock
// cycle. Register writes and the FSM state change happen at the rising edge.
// The network is therefore combinational from PE to PE; a configuration that
// closes a ring of FU or pass-through selects is a combinational loop and
// must not be loaded (structurally the ring exists in every array, which is
// why lint tools report a possible loop through the side ports).
//
// Following the published instances: the blocks of the PE, the separation of
// data and status signals, the three FU input multiplexers, the separate FSM
// in every PE, the boot-time configuration and the parameters (operators,
// register counts, width, contexts, states). The field coding, the
// pass-through output option and the register write gating until the array
// is started are this design's own.
module crc_pe
  import crc_pkg::*;
#(
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned NUM_DREG   = 12,
  parameter int unsigned NUM_SREG   = 12,
  parameter int unsigned NUM_CTX    = 16,
  parameter int unsigned NUM_STATES = 16,
  parameter int unsigned NUM_PE     = 6,
  parameter int unsigned PE_ID      = 0,
  localparam int unsigned PE_W      = idx_w(NUM_PE),
  localparam int unsigned CTX_W     = ctx_word_w(NUM_DREG, NUM_SREG),
  localparam int unsigned FSM_W     = fsm_word_w(NUM_STATES, NUM_CTX, NUM_SREG),
  localparam int unsigned ADDR_W    = max2(idx_w(NUM_CTX), idx_w(NUM_STATES)),
  localparam int unsigned DATA_W    = max2(CTX_W, FSM_W)
) (
  input  logic                         clk,
  input  logic                         rst,
  // boot configuration bus (shared by all PEs)
  input  logic                         cfg_we,
  input  logic [PE_W-1:0]              cfg_pe,
  input  cfg_tgt_e                     cfg_tgt,
  input  logic [ADDR_W-1:0]            cfg_addr,
  input  logic [DATA_W-1:0]            cfg_wdata,
  input  logic                         cfg_start,
  // nearest-neighbour network, indexed by crc_pkg::side_e
  input  logic [WIDTH-1:0]             din  [N_SIDES],
  input  logic [N_SIDES-1:0]           sin,
  output logic [WIDTH-1:0]             dout [N_SIDES],
  output logic [N_SIDES-1:0]           sout,
  // observation
  output logic                         running,
  output logic [idx_w(NUM_STATES)-1:0] state,
  output logic [idx_w(NUM_CTX)-1:0]    ctx_idx,
  output logic                         branch_taken
);

  localparam int unsigned OPD_W  = opsel_w(NUM_DREG);
  localparam int unsigned OPS_W  = opsel_w(NUM_SREG);
  localparam int unsigned OUTD_W = outsel_w(NUM_DREG);
  localparam int unsigned OUTS_W = outsel_w(NUM_SREG);
  localparam int unsigned DIDX_W = idx_w(NUM_DREG);
  localparam int unsigned SIDX_W = idx_w(NUM_SREG);
  localparam int unsigned NCOND  = N_SIDES + NUM_SREG + 1;

  typedef struct packed {
    fu_op_e                          op;
    logic [OPD_W-1:0]                src_a;
    logic [OPD_W-1:0]                src_b;
    logic [OPS_W-1:0]                src_s;
    logic                            dreg_we;
    logic [DIDX_W-1:0]               dreg_dst;
    logic                            sreg_we;
    logic [SIDX_W-1:0]               sreg_dst;
    logic [N_SIDES-1:0][OUTD_W-1:0]  dout_sel;
    logic [N_SIDES-1:0][OUTS_W-1:0]  sout_sel;
  } ctx_t;

  // ---------------------------------------------------------------- boot
  logic                         ctx_we, fsm_we;
  logic [idx_w(NUM_CTX)-1:0]    ctx_waddr;
  logic [idx_w(NUM_STATES)-1:0] fsm_waddr;
  logic [CTX_W-1:0]             ctx_wdata;
  logic [FSM_W-1:0]             fsm_wdata;

  crc_bootcfg #(
    .NUM_PE(NUM_PE), .PE_ID(PE_ID), .NUM_CTX(NUM_CTX),
    .NUM_STATES(NUM_STATES), .CTX_W(CTX_W), .FSM_W(FSM_W)
  ) u_boot (
    .clk, .rst, .cfg_we, .cfg_pe, .cfg_tgt, .cfg_addr, .cfg_wdata, .cfg_start,
    .ctx_we, .ctx_waddr, .ctx_wdata, .fsm_we, .fsm_waddr, .fsm_wdata, .running
  );

  // ------------------------------------------------------ FSM and context
  logic [NCOND-1:0] cond_in;
  logic [CTX_W-1:0] ctx_raw;
  ctx_t             ctx;

  crc_fsm #(
    .NUM_STATES(NUM_STATES), .NUM_CTX(NUM_CTX), .NUM_COND(NCOND)
  ) u_fsm (
    .clk, .rst, .run(running),
    .we(fsm_we), .waddr(fsm_waddr), .wdata(fsm_wdata),
    .cond_in, .state, .ctx(ctx_idx), .taken(branch_taken)
  );

  crc_ctxmem #(.NUM_CTX(NUM_CTX), .CTX_W(CTX_W)) u_ctx (
    .clk, .rst, .we(ctx_we), .waddr(ctx_waddr), .wdata(ctx_wdata),
    .raddr(ctx_idx), .rdata(ctx_raw)
  );

  assign ctx = ctx_t'(ctx_raw);

  // ------------------------------------------------------- register set
  logic [WIDTH-1:0]    dreg [NUM_DREG];
  logic [NUM_SREG-1:0] sreg;
  logic [WIDTH-1:0]    fu_y;
  logic                fu_s;

  crc_regset #(.WIDTH(WIDTH), .NUM_DREG(NUM_DREG), .NUM_SREG(NUM_SREG)) u_regs (
    .clk, .rst,
    .d_we(ctx.dreg_we && running), .d_waddr(ctx.dreg_dst), .d_wdata(fu_y),
    .s_we(ctx.sreg_we && running), .s_waddr(ctx.sreg_dst), .s_wdata(fu_s),
    .dreg, .sreg
  );

  // ------------------------------------------------ FU input multiplexers
  localparam int unsigned NOPD = N_SIDES + NUM_DREG;
  localparam int unsigned NOPS = N_SIDES + NUM_SREG;

  logic [WIDTH-1:0] opd_src [NOPD];
  logic [0:0]       ops_src [NOPS];
  logic [WIDTH-1:0] fu_a, fu_b;
  logic [0:0]       fu_sin;

  always_comb begin
    for (int unsigned i = 0; i < N_SIDES; i++) begin
      opd_src[i] = din[i];
      ops_src[i] = sin[i];
    end
    for (int unsigned i = 0; i < NUM_DREG; i++) opd_src[N_SIDES+i] = dreg[i];
    for (int unsigned i = 0; i < NUM_SREG; i++) ops_src[N_SIDES+i] = sreg[i];
  end

  crc_mux #(.N(NOPD), .WIDTH(WIDTH), .SEL_W(OPD_W)) u_mux_a (
    .in(opd_src), .sel(ctx.src_a), .out(fu_a));
  crc_mux #(.N(NOPD), .WIDTH(WIDTH), .SEL_W(OPD_W)) u_mux_b (
    .in(opd_src), .sel(ctx.src_b), .out(fu_b));
  crc_mux #(.N(NOPS), .WIDTH(1), .SEL_W(OPS_W)) u_mux_s (
    .in(ops_src), .sel(ctx.src_s), .out(fu_sin));

  // ----------------------------------------------------------------- FU
  crc_fu #(.WIDTH(WIDTH)) u_fu (
    .op(ctx.op), .a(fu_a), .b(fu_b), .s_in(fu_sin[0]), .y(fu_y), .s_out(fu_s));

  // FSM conditions: side status inputs, status registers, own FU status.
  always_comb begin
    for (int unsigned i = 0; i < N_SIDES; i++)  cond_in[i] = sin[i];
    for (int unsigned i = 0; i < NUM_SREG; i++) cond_in[N_SIDES+i] = sreg[i];
    cond_in[NCOND-1] = fu_s;
  end

  // ---------------------------------------------- side output multiplexers
  localparam int unsigned NOUTD = NUM_DREG + 1 + N_SIDES;
  localparam int unsigned NOUTS = NUM_SREG + 1 + N_SIDES;

  for (genvar sd = 0; sd < N_SIDES; sd++) begin : g_side
    logic [WIDTH-1:0] od_src [NOUTD];
    logic [0:0]       os_src [NOUTS];
    logic [0:0]       os;

    always_comb begin
      for (int unsigned i = 0; i < NUM_DREG; i++) od_src[i] = dreg[i];
      od_src[NUM_DREG] = fu_y;
      for (int unsigned i = 0; i < N_SIDES; i++) od_src[NUM_DREG+1+i] = din[i];
      for (int unsigned i = 0; i < NUM_SREG; i++) os_src[i] = sreg[i];
      os_src[NUM_SREG] = fu_s;
      for (int unsigned i = 0; i < N_SIDES; i++) os_src[NUM_SREG+1+i] = sin[i];
    end

    crc_mux #(.N(NOUTD), .WIDTH(WIDTH), .SEL_W(OUTD_W)) u_mux_do (
      .in(od_src), .sel(ctx.dout_sel[sd]), .out(dout[sd]));
    crc_mux #(.N(NOUTS), .WIDTH(1), .SEL_W(OUTS_W)) u_mux_so (
      .in(os_src), .sel(ctx.sout_sel[sd]), .out(os));

    assign sout[sd] = os[0];
  end

  initial begin
    assert ($bits(ctx_t) == CTX_W)
      else $fatal(1, "crc_pe: context layout does not match ctx_word_w");
  end

endmodule
