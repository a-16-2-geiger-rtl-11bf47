// row_mux: WIDTH-bit 2-to-1 multiplexer.
//
// Passes in0 when sel is 0 and in1 when sel is 1. In the photon counter it
// selects which of the two SPAD rows is presented to the counting adder in the
// current clock. Purely combinational, no latency. The 16-bit width follows
// the published design; the use of the select to alternate rows is this
// design's choice.
module row_mux #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  always_comb begin
    out = sel ? in1 : in0;
  end
endmodule
