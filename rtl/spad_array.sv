// spad_array: synthesizable random-photon model of the 16x2 SPAD front end.
//
// Stands in for the Geiger-mode diodes so that the counting back end can be
// simulated and built as one chip. Every pixel owns a 16-bit Fibonacci LFSR
// (taps x^16+x^14+x^13+x^11+1) that advances 8 steps per clock; a photon
// arrives at a pixel in a clock when the low byte of its LFSR is below
// `rate`, so the arrival probability is rate/256 per pixel per clock.
//
// Each pixel behaves like a SPAD with a latching front end: a detected photon
// sets hit[r][c], and the pixel stays dead (further photons are lost) until its
// row is read. Reading row r (row_rd[r] high for one clock) recharges the row at
// the clock edge; a photon arriving in the read clock itself is kept for the
// next read. hit is registered, so a photon drawn in clock t is visible in
// clock t+1.
//
// Reset (active low, synchronous) clears all hits and loads pixel (r,c) with
// seed SEED ^ (k * 16'h9E37) with k = r*N_COLS+c+1, replaced by 1 if zero.
// The array size and the use of a random generator to mimic photons follow
// the published design; the LFSR, the rate encoding and recharge-on-read are
// this design's choices.
module spad_array #(
  parameter int unsigned N_COLS = 16,
  parameter int unsigned N_ROWS = 2,
  parameter logic [15:0] SEED   = 16'hACE1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [7:0]                     rate,
  input  logic [N_ROWS-1:0]              row_rd,
  output logic [N_ROWS-1:0][N_COLS-1:0]  hit
);
  logic [N_ROWS-1:0][N_COLS-1:0][15:0] lfsr_q, lfsr_d;
  logic [N_ROWS-1:0][N_COLS-1:0]       photon;

  function automatic logic [15:0] lfsr_step8(input logic [15:0] s);
    logic [15:0] t;
    t = s;
    for (int k = 0; k < 8; k++) t = {t[14:0], t[15] ^ t[13] ^ t[12] ^ t[10]};
    return t;
  endfunction

  function automatic logic [15:0] pixel_seed(input int unsigned k);
    logic [15:0] s;
    s = SEED ^ 16'(k * 32'h9E37);
    return (s == 16'h0) ? 16'h1 : s;
  endfunction

  always_comb begin
    for (int r = 0; r < N_ROWS; r++) begin
      for (int c = 0; c < N_COLS; c++) begin
        lfsr_d[r][c] = lfsr_step8(lfsr_q[r][c]);
        photon[r][c] = (lfsr_q[r][c][7:0] < rate);
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 0; r < N_ROWS; r++) begin
      for (int c = 0; c < N_COLS; c++) begin
        if (!rst_n) begin
          lfsr_q[r][c] <= pixel_seed(r * N_COLS + c + 1);
          hit[r][c]    <= 1'b0;
        end else begin
          lfsr_q[r][c] <= lfsr_d[r][c];
          hit[r][c]    <= row_rd[r] ? photon[r][c] : (hit[r][c] | photon[r][c]);
        end
      end
    end
  end
endmodule
