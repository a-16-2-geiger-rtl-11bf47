// daq_ctrl: readout sequencer of the photon counting back end.
//
// While `en` is high it steps through the SPAD rows one per clock
// (row 0, row 1, row 0, ...), so that the single counting adder sees every
// row in turn through the 2-to-1 multiplexer, and it raises row_rd for the row
// being read so the array recharges it. A cycle counter divides the run into
// frames of frame_len clocks (a frame_len of 0 or 1 is treated as 1):
// frame_end is high in the last clock of each frame, and frame_no counts the
// finished frames. When `en` is low nothing advances and row_rd is zero.
// Reset (active low, synchronous) restarts at row 0, clock 0 of frame 0.
// Row alternation and the frame structure are this design's choices; the
// published design gives the blocks but not their sequencing.
module daq_ctrl #(
  parameter int unsigned N_ROWS  = 2,
  parameter int unsigned FRAME_W = 20,
  localparam int unsigned SEL_W  = (N_ROWS > 1) ? $clog2(N_ROWS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [FRAME_W-1:0] frame_len,
  output logic [SEL_W-1:0]   row_sel,
  output logic [N_ROWS-1:0]  row_rd,
  output logic               frame_end,
  output logic [15:0]        frame_no
);
  logic [FRAME_W-1:0] cyc_q;

  always_comb begin
    frame_end = en && ((cyc_q + FRAME_W'(1)) >= frame_len);
    row_rd    = '0;
    if (en) row_rd[row_sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_sel  <= '0;
      cyc_q    <= '0;
      frame_no <= '0;
    end else if (en) begin
      row_sel <= (row_sel == SEL_W'(N_ROWS - 1)) ? '0 : row_sel + SEL_W'(1);
      if (frame_end) begin
        cyc_q    <= '0;
        frame_no <= frame_no + 16'd1;
      end else begin
        cyc_q <= cyc_q + FRAME_W'(1);
      end
    end
  end

  // Exactly one row is read per enabled clock, none otherwise.
  always_comb begin
    if (rst_n) assert ($onehot0(row_rd) && (en == (row_rd != '0)))
      else $error("daq_ctrl: row_rd must be one-hot while enabled");
  end
endmodule
