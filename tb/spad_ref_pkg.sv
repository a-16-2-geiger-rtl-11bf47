// spad_ref_pkg: reference model of the random SPAD pixels, for testbenches.
//
// Written independently of the RTL from its specification: each pixel has a
// 16-bit Fibonacci LFSR with taps 16,14,13,11 that advances 8 steps per
// clock, starts from SEED ^ (k * 0x9E37) (1 if that is zero, k = r*cols+c+1),
// and sees a photon in a clock when its low byte is below the rate.
package spad_ref_pkg;
  function automatic logic [15:0] ref_step(input logic [15:0] s);
    logic [15:0] t = s;
    repeat (8) begin
      logic fb;
      fb = t[15] ^ t[13] ^ t[12] ^ t[10];
      t  = (t << 1) | 16'(fb);
    end
    return t;
  endfunction

  function automatic logic [15:0] ref_seed(input logic [15:0] seed, input int k);
    logic [31:0] m = 32'(k) * 32'h0000_9E37;
    logic [15:0] s = seed ^ m[15:0];
    return (s == 0) ? 16'd1 : s;
  endfunction

  function automatic int ref_popcount(input logic [63:0] v);
    int n = 0;
    for (int i = 0; i < 64; i++) n += int'(v[i]);
    return n;
  endfunction
endpackage
