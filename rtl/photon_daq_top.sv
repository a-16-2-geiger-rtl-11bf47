// photon_daq_top: 16x2 SPAD photon counting data acquisition system.
//
// Front end: spad_array, a random-photon model of 2 rows x 16 pixels whose
// pixels latch a detection until their row is read. Back end, all in one
// clock domain:
//   daq_ctrl      reads row 0 and row 1 in alternate clocks and cuts the run
//                 into frames of frame_len clocks;
//   row_mux       16-bit 2-to-1 multiplexer, picks the row read this clock;
//   hit_count     number of photons in that row word (0..16);
//   bk_adder      16-bit Brent-Kung adder, running count + photons;
//   pipo_reg      accumulator register holding the running count, and a
//                 second one holding the finished count for readout.
// A row's photons are added in the clock it is read, with no pipeline. On the
// last clock of a frame the sum including that clock's photons is loaded into
// the readout register and the accumulator starts again from zero; one clock
// later count_out holds the frame's count and count_valid pulses for one
// clock. If the adder carries out, the count saturates at all ones for the
// rest of the frame and overflow_out is set with that frame's count.
// Reset is active low and synchronous.
// The set of blocks, the 16x2 array and the 16-bit adder follow the published
// design; the sequencing, frames, photon count step and saturation are this
// design's choices. N_COLS must be at most 2^COUNT_W - 1.
module photon_daq_top #(
  parameter int unsigned N_COLS  = daq_pkg::N_COLS,
  parameter int unsigned COUNT_W = daq_pkg::COUNT_W,
  parameter int unsigned FRAME_W = daq_pkg::FRAME_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [daq_pkg::RATE_W-1:0] rate,
  input  logic [FRAME_W-1:0] frame_len,
  output logic [COUNT_W-1:0] count_out,
  output logic               overflow_out,
  output logic               count_valid,
  output logic [15:0]        frame_no
);
  localparam int unsigned ROWS  = daq_pkg::N_ROWS;  // the row multiplexer is 2-to-1
  localparam int unsigned HIT_W = $clog2(N_COLS + 1);

  logic [ROWS-1:0][N_COLS-1:0] hit;
  logic [ROWS-1:0]             row_rd;
  logic                        row_sel;
  logic                        frame_end;
  logic [N_COLS-1:0]           row_word;
  logic [HIT_W-1:0]            n_hits;
  logic [COUNT_W-1:0]          acc_q, sum, acc_d;
  logic                        cout;
  logic                        ovf_q, ovf_d;

  spad_array #(.N_COLS(N_COLS), .N_ROWS(ROWS)) u_spad (
    .clk, .rst_n, .rate, .row_rd, .hit
  );

  daq_ctrl #(.N_ROWS(ROWS), .FRAME_W(FRAME_W)) u_ctrl (
    .clk, .rst_n, .en, .frame_len, .row_sel, .row_rd, .frame_end, .frame_no
  );

  row_mux #(.WIDTH(N_COLS)) u_mux (
    .sel(row_sel), .in0(hit[0]), .in1(hit[1]), .out(row_word)
  );

  hit_count #(.WIDTH(N_COLS)) u_hits (.bits(row_word), .count(n_hits));

  bk_adder #(.WIDTH(COUNT_W)) u_add (
    .a(acc_q), .b(COUNT_W'(n_hits)), .cin(1'b0), .sum, .cout
  );

  always_comb begin
    ovf_d = ovf_q | cout;
    acc_d = ovf_d ? '1 : sum;
  end

  pipo_reg #(.WIDTH(COUNT_W)) u_acc (
    .clk, .rst_n, .clr(frame_end), .load(en), .d(acc_d), .q(acc_q)
  );

  pipo_reg #(.WIDTH(COUNT_W)) u_out (
    .clk, .rst_n, .clr(1'b0), .load(frame_end), .d(acc_d), .q(count_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ovf_q        <= 1'b0;
      overflow_out <= 1'b0;
      count_valid  <= 1'b0;
    end else begin
      count_valid <= frame_end;
      if (frame_end) begin
        ovf_q        <= 1'b0;
        overflow_out <= ovf_d;
      end else if (en) begin
        ovf_q <= ovf_d;
      end
    end
  end
endmodule
