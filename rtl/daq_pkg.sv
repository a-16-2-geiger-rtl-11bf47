// daq_pkg: sizes shared by the 16x2 photon counting data acquisition system.
//
// The array is 16 columns by 2 rows of single photon avalanche diodes and the
// counting element is a 16-bit adder; these numbers follow the published
// design. The frame counter width is this design's own choice: 20 bits allow
// frames of up to about one million clocks.
package daq_pkg;
  localparam int unsigned N_COLS  = 16;  // pixels per row
  localparam int unsigned N_ROWS  = 2;   // rows in the array
  localparam int unsigned COUNT_W = 16;  // photon count width (adder width)
  localparam int unsigned FRAME_W = 20;  // frame length counter width
  localparam int unsigned RATE_W  = 8;   // resolution of the photon probability
endpackage
