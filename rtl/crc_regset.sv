// crc_regset -- register set of a CRC processing element.
//
// NUM_DREG data registers of WIDTH bits and NUM_SREG one-bit status
// registers. Each group has one write port, driven by the register field of
// the current context, and every register is readable at once: the FU
// operand multiplexers and the side output multiplexers pick from them.
// Writes take effect at the rising clock edge; reads are combinational, so a
// value written in cycle t is visible in cycle t+1. Synchronous active-high
// reset clears all registers.
//
// Twelve data and twelve status registers are the published count; the
// single write port per group and the reset to zero are this design's own.
module crc_regset #(
  parameter int unsigned WIDTH    = 32,
  parameter int unsigned NUM_DREG = 12,
  parameter int unsigned NUM_SREG = 12,
  localparam int unsigned DIDX_W  = (NUM_DREG > 1) ? $clog2(NUM_DREG) : 1,
  localparam int unsigned SIDX_W  = (NUM_SREG > 1) ? $clog2(NUM_SREG) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              d_we,
  input  logic [DIDX_W-1:0] d_waddr,
  input  logic [WIDTH-1:0]  d_wdata,
  input  logic              s_we,
  input  logic [SIDX_W-1:0] s_waddr,
  input  logic              s_wdata,
  output logic [WIDTH-1:0]  dreg [NUM_DREG],
  output logic [NUM_SREG-1:0] sreg
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NUM_DREG; i++) dreg[i] <= '0;
    end else if (d_we && (32'(d_waddr) < NUM_DREG)) begin
      dreg[d_waddr] <= d_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sreg <= '0;
    end else if (s_we && (32'(s_waddr) < NUM_SREG)) begin
      sreg[s_waddr] <= s_wdata;
    end
  end

endmodule
