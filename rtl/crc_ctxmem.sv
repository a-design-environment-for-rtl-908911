// crc_ctxmem -- context memory of a CRC processing element.
//
// NUM_CTX words of CTX_W bits. Each word is one context: the FU operation,
// the operand and output multiplexer selects and the register to write (the
// layout is defined in crc_pe). The word is written only by the boot-time
// configuration port (we/waddr/wdata, rising clock edge) and read
// combinationally at raddr, which the FSM drives, so the context can change
// every cycle. Synchronous reset clears every word; an all-zero context
// writes no register and drives every side output from register 0, so an
// unconfigured array stays quiet.
//
// The memory and its boot-time loading follow the published instances; the
// asynchronous read and the clearing reset are this design's own choices.
module crc_ctxmem #(
  parameter int unsigned NUM_CTX = 16,
  parameter int unsigned CTX_W   = 65,
  localparam int unsigned AW     = (NUM_CTX > 1) ? $clog2(NUM_CTX) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CTX_W-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [CTX_W-1:0] rdata
);

  logic [CTX_W-1:0] mem [NUM_CTX];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NUM_CTX; i++) mem[i] <= '0;
    end else if (we && (32'(waddr) < NUM_CTX)) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < NUM_CTX) ? mem[raddr] : '0;

endmodule
