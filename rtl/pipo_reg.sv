// pipo_reg: WIDTH-bit parallel-in parallel-out register.
//
// All bits are captured together from d when load is high and appear together
// on q from the next clock. clr empties the register and wins over load; the
// reset (active low, synchronous) does the same. In the photon counter one
// instance accumulates the running count and a second holds the finished
// frame count for readout. The register type follows the published design;
// the clear, load enable and reset are this design's choice.
module pipo_reg #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk) begin
    if (!rst_n || clr) q <= '0;
    else if (load)     q <= d;
  end
endmodule
