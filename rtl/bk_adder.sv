// bk_adder: WIDTH-bit Brent-Kung parallel-prefix adder.
//
// sum = a + b + cin (mod 2^WIDTH), cout is the carry out of the top bit.
// Each bit first forms a generate g = a&b and propagate p = a^b; the carry in
// is folded into bit 0's generate. The Brent-Kung prefix network then combines
// (g,p) pairs with the operator (g1,p1)o(g0,p0) = (g1 | p1&g0, p1&p0):
//   up-sweep   : level l (l = 0..log2(WIDTH)-1) forms the group signal of the
//                span ending at every bit i with (i+1) % 2^(l+1) == 0;
//   down-sweep : level l (from log2(WIDTH)-2 down to 0) fills in the bits
//                i with (i+1) % 2^l == 0 that are 2^l past such a span end.
// After both sweeps position i holds the carry out of bits 0..i, and
// sum[i] = p[i] ^ carry[i-1]. For 16 bits this is 4 up levels and 3 down
// levels, 26 prefix cells against 49 for a Kogge-Stone network, which is where
// the area saving of this adder comes from. Purely combinational.
// The adder type and width follow the published design; the carry in is this
// design's addition. WIDTH must be a power of two, at least 2.
module bk_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = $clog2(WIDTH);

  logic [WIDTH-1:0] p;     // bit propagate, kept for the sum
  logic [WIDTH-1:0] gg;    // group generate, updated through the network
  logic [WIDTH-1:0] pp;    // group propagate, updated through the network

  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    gg[0] = gg[0] | (p[0] & cin);
    // up-sweep
    for (int l = 0; l < LEVELS; l++) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (((i + 1) % (1 << (l + 1))) == 0) begin
          gg[i] = gg[i] | (pp[i] & gg[i - (1 << l)]);
          pp[i] = pp[i] & pp[i - (1 << l)];
        end
      end
    end
    // down-sweep
    for (int l = LEVELS - 2; l >= 0; l--) begin
      for (int i = 0; i < WIDTH; i++) begin
        if (((i + 1) % (1 << l)) == 0 && ((i + 1) % (1 << (l + 1))) != 0
            && i >= (1 << (l + 1))) begin
          gg[i] = gg[i] | (pp[i] & gg[i - (1 << l)]);
          pp[i] = pp[i] & pp[i - (1 << l)];
        end
      end
    end
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < WIDTH; i++) sum[i] = p[i] ^ gg[i - 1];
    cout = gg[WIDTH - 1];
  end
endmodule
