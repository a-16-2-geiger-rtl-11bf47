// hit_count: number of set bits in a WIDTH-bit word (population count).
//
// Turns the hit word of one SPAD row into the number of photons it holds, so
// that the counting adder can add it to the running count. Built as a plain
// sum over the bits, which synthesis maps to an adder tree. Purely
// combinational. This helper is this design's own: the published design names
// the multiplexer and adder but not the step between them.
module hit_count #(
  parameter int unsigned WIDTH = 16,
  localparam int unsigned OUT_W = $clog2(WIDTH + 1)
) (
  input  logic [WIDTH-1:0] bits,
  output logic [OUT_W-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < WIDTH; i++) count = count + OUT_W'(bits[i]);
  end
endmodule
