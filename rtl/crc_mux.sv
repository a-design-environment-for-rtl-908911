// crc_mux -- context-controlled multiplexer of the reconfigurable network.
//
// Selects one of N input words by the select field of the current context.
// A PE uses it for its three FU operand selects (two data, one status) and
// for the data and status output of each of its four sides. A select value
// at or beyond N yields zero, so unused codes of a select field are harmless.
// Combinational; the select comes straight from the context memory.
module crc_mux #(
  parameter int unsigned N     = 16,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SEL_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [WIDTH-1:0] in [N],
  input  logic [SEL_W-1:0] sel,
  output logic [WIDTH-1:0] out
);

  always_comb begin
    out = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == SEL_W'(i)) out = in[i];
    end
  end

endmodule
