// crc_bootcfg -- boot-time configuration port of a CRC processing element.
//
// All PEs of an array share one configuration bus. A write carries the
// number of the PE it is meant for (cfg_pe), a target (context memory or FSM
// table), an address and a data word. This block recognises writes for its
// own PE_ID, checks the address against the size of the target, and turns
// them into the write strobes of the context memory or of the FSM table; the
// data word is cut to the width of each target. Configuration is accepted
// only during boot, that is before cfg_start: a cfg_start pulse sets the run
// flag, which releases the FSM and enables register writes, and from then on
// configuration writes are ignored until the next reset. Strobes are
// combinational; the memories capture them at the next rising clock edge.
//
// That context memory and FSM are loaded from outside at boot time follows
// the published instances; the addressed broadcast bus, the run flag and
// the locking after start are this design's own choices.
module crc_bootcfg
  import crc_pkg::*;
#(
  parameter int unsigned NUM_PE     = 6,
  parameter int unsigned PE_ID      = 0,
  parameter int unsigned NUM_CTX    = 16,
  parameter int unsigned NUM_STATES = 16,
  parameter int unsigned CTX_W      = 65,
  parameter int unsigned FSM_W      = 17,
  localparam int unsigned PE_W      = idx_w(NUM_PE),
  localparam int unsigned ADDR_W    = max2(idx_w(NUM_CTX), idx_w(NUM_STATES)),
  localparam int unsigned DATA_W    = max2(CTX_W, FSM_W)
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         cfg_we,
  input  logic [PE_W-1:0]              cfg_pe,
  input  cfg_tgt_e                     cfg_tgt,
  input  logic [ADDR_W-1:0]            cfg_addr,
  input  logic [DATA_W-1:0]            cfg_wdata,
  input  logic                         cfg_start,
  output logic                         ctx_we,
  output logic [idx_w(NUM_CTX)-1:0]    ctx_waddr,
  output logic [CTX_W-1:0]             ctx_wdata,
  output logic                         fsm_we,
  output logic [idx_w(NUM_STATES)-1:0] fsm_waddr,
  output logic [FSM_W-1:0]             fsm_wdata,
  output logic                         running
);

  logic mine;

  assign mine      = cfg_we && !running && (32'(cfg_pe) == PE_ID);
  assign ctx_we    = mine && (cfg_tgt == CFG_CTX) && (32'(cfg_addr) < NUM_CTX);
  assign fsm_we    = mine && (cfg_tgt == CFG_FSM) && (32'(cfg_addr) < NUM_STATES);
  assign ctx_waddr = cfg_addr[idx_w(NUM_CTX)-1:0];
  assign fsm_waddr = cfg_addr[idx_w(NUM_STATES)-1:0];
  assign ctx_wdata = cfg_wdata[CTX_W-1:0];
  assign fsm_wdata = cfg_wdata[FSM_W-1:0];

  always_ff @(posedge clk) begin
    if (rst)            running <= 1'b0;
    else if (cfg_start) running <= 1'b1;
  end

  // A write for this PE during boot must address an existing word.
  always_ff @(posedge clk) begin
    if (!rst && mine) begin
      assert (ctx_we || fsm_we)
        else $error("crc_bootcfg: PE %0d configuration address %0d out of range",
                    PE_ID, cfg_addr);
    end
  end

endmodule
