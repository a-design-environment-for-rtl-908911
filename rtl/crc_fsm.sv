// crc_fsm -- configurable finite state machine of a CRC processing element.
//
// Implements the control unit produced by C-based synthesis. It holds a
// state register and a table of NUM_STATES entries loaded at boot time. An
// entry is {ctx, cond, next_t, next_f} (most significant field first):
//   ctx     context to execute while in this state
//   cond    index into cond_in, the condition of the branch
//   next_t  next state when cond_in[cond] is 1
//   next_f  next state when it is 0 (equal to next_t for a plain jump)
// Each cycle the current state's entry selects the context (combinational
// from the state register), and at the rising edge the state register takes
// next_t or next_f. While run is low the state register stays in state 0.
//
// The split of context generation into next-state logic, context selection
// by state and the context memory follows the published instances; the
// two-way branch on one status bit, the table layout and state 0 as the
// start state are this design's own choices.
module crc_fsm
  import crc_pkg::*;
#(
  parameter int unsigned NUM_STATES = 16,
  parameter int unsigned NUM_CTX    = 16,
  parameter int unsigned NUM_COND   = 17,
  localparam int unsigned ST_W      = idx_w(NUM_STATES),
  localparam int unsigned CX_W      = idx_w(NUM_CTX),
  localparam int unsigned CD_W      = idx_w(NUM_COND),
  localparam int unsigned ENT_W     = CX_W + CD_W + 2 * ST_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                run,
  // boot-time table write
  input  logic                we,
  input  logic [ST_W-1:0]     waddr,
  input  logic [ENT_W-1:0]    wdata,
  // branch conditions
  input  logic [NUM_COND-1:0] cond_in,
  // outputs
  output logic [ST_W-1:0]     state,
  output logic [CX_W-1:0]     ctx,
  output logic                taken
);

  typedef struct packed {
    logic [CX_W-1:0] ctx;
    logic [CD_W-1:0] cond;
    logic [ST_W-1:0] next_t;
    logic [ST_W-1:0] next_f;
  } entry_t;

  entry_t table_q [NUM_STATES];
  entry_t cur;
  entry_t wentry;
  logic [ST_W-1:0] state_q, state_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NUM_STATES; i++) table_q[i] <= '0;
    end else if (we && (32'(waddr) < NUM_STATES)) begin
      table_q[waddr] <= wentry;
    end
  end

  assign cur   = (32'(state_q) < NUM_STATES) ? table_q[state_q] : '0;
  assign taken = (32'(cur.cond) < NUM_COND) ? cond_in[cur.cond] : 1'b0;

  always_comb begin
    state_d = taken ? cur.next_t : cur.next_f;
    if (32'(state_d) >= NUM_STATES) state_d = '0;
  end

  always_ff @(posedge clk) begin
    if (rst || !run) state_q <= '0;
    else             state_q <= state_d;
  end

  assign state = state_q;
  assign ctx   = cur.ctx;

  assign wentry = entry_t'(wdata);

  // A table entry must name existing states and contexts.
  always_ff @(posedge clk) begin
    if (!rst && we) begin
      assert (32'(wentry.next_t) < NUM_STATES &&
              32'(wentry.next_f) < NUM_STATES &&
              32'(wentry.ctx) < NUM_CTX)
        else $error("crc_fsm: table entry names a missing state or context");
    end
  end

endmodule
