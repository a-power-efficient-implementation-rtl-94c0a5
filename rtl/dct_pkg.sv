// dct_pkg: constants shared by the 8-point forward DCT.
//
// The word format follows the wordlength analysis of the design: 9-bit
// pixels, two guard bits at the MSB end against the growth of the transform
// (about 2.83 for N = 8) and five extra bits at the LSB end against the
// rounding of the shift-and-add steps, 16 bits in all. A sample x enters
// the datapath as x * 2^F. The pipeline depths of the approximated rotations
// are listed here so that the top can balance its paths.
package dct_pkg;

  localparam int DCT_N    = 8;   // transform size
  localparam int DCT_IN_W = 9;   // input sample width
  localparam int DCT_W    = 16;  // datapath word width
  localparam int DCT_F    = 5;   // fraction bits of the datapath word

  // Pipeline depth, in clock cycles, of each approximated rotation.
  localparam int LAT_PI4    = 6;  // 1 mu-rotation + 5 scaling steps
  localparam int LAT_3PI8   = 4;  // 3 mu-rotations + 1 scaling step
  localparam int LAT_3PI16  = 5;  // 4 mu-rotations + 1 scaling step
  localparam int LAT_7PI16  = 3;  // 3 mu-rotations

  // Input register, B8, pi/4 stage, odd butterfly, 3pi/16 stage.
  localparam int LAT_TOTAL = 1 + 1 + LAT_PI4 + 1 + LAT_3PI16;

endpackage
