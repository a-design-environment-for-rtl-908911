// crc_array -- top level: an instance of the CRC (Configurable Reconfigurable
// Core) model, a ROWS x COLS array of uniform processing elements.
//
// Every PE (crc_pe) talks only to its four nearest neighbours: the data and
// status output of a PE's east side is the west input of the PE to its
// right, and so on. The inputs and outputs of the PEs at the border of the
// array are the ports of this module (north/south ports are indexed by
// column, west/east ports by row). PE (r, c) has number r*COLS + c on the
// shared boot configuration bus.
//
// Operation: after reset, load every PE's context memory and FSM table over
// the configuration bus (one word per cycle, cfg_we high), then pulse
// cfg_start. From the next rising edge on, all FSMs step once per cycle,
// each selecting the context its PE executes in that cycle. Results leave
// through the border outputs. A border data output is combinational from the
// FSM states and border inputs when the path selects FU results or
// pass-through, so it is valid in the cycle the context is active.
//
// Because side outputs may come combinationally from the FU or from another
// side input, the PE-to-PE wiring contains combinational rings in its
// structure (lint reports them as circular logic). They are intended: they
// make chaining across PEs possible. A loaded configuration must route every
// chain as an acyclic path; reset contexts read registers only.
//
// The array of uniform PEs with a nearest-neighbour network, without the
// memory of the general model, follows the published first instances. The
// array size (2 x 3, as drawn in the model's overview picture), the border
// ports and the configuration bus are this design's own choices.
module crc_array
  import crc_pkg::*;
#(
  parameter int unsigned ROWS       = 2,
  parameter int unsigned COLS       = 3,
  parameter int unsigned WIDTH      = 32,
  parameter int unsigned NUM_DREG   = 12,
  parameter int unsigned NUM_SREG   = 12,
  parameter int unsigned NUM_CTX    = 16,
  parameter int unsigned NUM_STATES = 16,
  localparam int unsigned NUM_PE    = ROWS * COLS,
  localparam int unsigned PE_W      = idx_w(NUM_PE),
  localparam int unsigned ADDR_W    = max2(idx_w(NUM_CTX), idx_w(NUM_STATES)),
  localparam int unsigned DATA_W    = max2(ctx_word_w(NUM_DREG, NUM_SREG),
                                           fsm_word_w(NUM_STATES, NUM_CTX, NUM_SREG))
) (
  input  logic                         clk,
  input  logic                         rst,
  // boot configuration bus
  input  logic                         cfg_we,
  input  logic [PE_W-1:0]              cfg_pe,
  input  cfg_tgt_e                     cfg_tgt,
  input  logic [ADDR_W-1:0]            cfg_addr,
  input  logic [DATA_W-1:0]            cfg_wdata,
  input  logic                         cfg_start,
  // border of the nearest-neighbour network
  input  logic [WIDTH-1:0]             north_din  [COLS],
  input  logic [COLS-1:0]              north_sin,
  output logic [WIDTH-1:0]             north_dout [COLS],
  output logic [COLS-1:0]              north_sout,
  input  logic [WIDTH-1:0]             south_din  [COLS],
  input  logic [COLS-1:0]              south_sin,
  output logic [WIDTH-1:0]             south_dout [COLS],
  output logic [COLS-1:0]              south_sout,
  input  logic [WIDTH-1:0]             west_din   [ROWS],
  input  logic [ROWS-1:0]              west_sin,
  output logic [WIDTH-1:0]             west_dout  [ROWS],
  output logic [ROWS-1:0]              west_sout,
  input  logic [WIDTH-1:0]             east_din   [ROWS],
  input  logic [ROWS-1:0]              east_sin,
  output logic [WIDTH-1:0]             east_dout  [ROWS],
  output logic [ROWS-1:0]              east_sout,
  // observation
  output logic                         running,
  output logic [idx_w(NUM_STATES)-1:0] pe_state [NUM_PE],
  output logic [idx_w(NUM_CTX)-1:0]    pe_ctx   [NUM_PE],
  output logic [NUM_PE-1:0]            pe_taken
);

  logic [WIDTH-1:0]   d_in  [ROWS][COLS][N_SIDES];
  logic [WIDTH-1:0]   d_out [ROWS][COLS][N_SIDES];
  logic [N_SIDES-1:0] s_in  [ROWS][COLS];
  logic [N_SIDES-1:0] s_out [ROWS][COLS];
  logic [NUM_PE-1:0]  pe_running;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned ID = r * COLS + c;

      // North neighbour: row above (its south side) or the border.
      if (r > 0) begin : g_n
        assign d_in[r][c][SIDE_N] = d_out[r-1][c][SIDE_S];
        assign s_in[r][c][SIDE_N] = s_out[r-1][c][SIDE_S];
      end else begin : g_nb
        assign d_in[r][c][SIDE_N] = north_din[c];
        assign s_in[r][c][SIDE_N] = north_sin[c];
        assign north_dout[c]      = d_out[r][c][SIDE_N];
        assign north_sout[c]      = s_out[r][c][SIDE_N];
      end
      // South neighbour.
      if (r < ROWS - 1) begin : g_s
        assign d_in[r][c][SIDE_S] = d_out[r+1][c][SIDE_N];
        assign s_in[r][c][SIDE_S] = s_out[r+1][c][SIDE_N];
      end else begin : g_sb
        assign d_in[r][c][SIDE_S] = south_din[c];
        assign s_in[r][c][SIDE_S] = south_sin[c];
        assign south_dout[c]      = d_out[r][c][SIDE_S];
        assign south_sout[c]      = s_out[r][c][SIDE_S];
      end
      // West neighbour.
      if (c > 0) begin : g_w
        assign d_in[r][c][SIDE_W] = d_out[r][c-1][SIDE_E];
        assign s_in[r][c][SIDE_W] = s_out[r][c-1][SIDE_E];
      end else begin : g_wb
        assign d_in[r][c][SIDE_W] = west_din[r];
        assign s_in[r][c][SIDE_W] = west_sin[r];
        assign west_dout[r]       = d_out[r][c][SIDE_W];
        assign west_sout[r]       = s_out[r][c][SIDE_W];
      end
      // East neighbour.
      if (c < COLS - 1) begin : g_e
        assign d_in[r][c][SIDE_E] = d_out[r][c+1][SIDE_W];
        assign s_in[r][c][SIDE_E] = s_out[r][c+1][SIDE_W];
      end else begin : g_eb
        assign d_in[r][c][SIDE_E] = east_din[r];
        assign s_in[r][c][SIDE_E] = east_sin[r];
        assign east_dout[r]       = d_out[r][c][SIDE_E];
        assign east_sout[r]       = s_out[r][c][SIDE_E];
      end

      crc_pe #(
        .WIDTH(WIDTH), .NUM_DREG(NUM_DREG), .NUM_SREG(NUM_SREG),
        .NUM_CTX(NUM_CTX), .NUM_STATES(NUM_STATES),
        .NUM_PE(NUM_PE), .PE_ID(ID)
      ) u_pe (
        .clk, .rst,
        .cfg_we, .cfg_pe, .cfg_tgt, .cfg_addr, .cfg_wdata, .cfg_start,
        .din(d_in[r][c]), .sin(s_in[r][c]),
        .dout(d_out[r][c]), .sout(s_out[r][c]),
        .running(pe_running[ID]), .state(pe_state[ID]), .ctx_idx(pe_ctx[ID]),
        .branch_taken(pe_taken[ID])
      );
    end
  end

  // All PEs start together; the array runs once every PE does.
  assign running = &pe_running;

endmodule
