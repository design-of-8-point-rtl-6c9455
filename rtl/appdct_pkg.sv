// appdct_pkg -- constants shared by the approximate 2-D DCT design.
//
// The transform is an 8-point one (one 8x8 image block is processed as
// eight row vectors of eight samples).  All adders and all words of the
// transposition memory are 12 bits wide.  The adders are built from
// 4-bit carry look-ahead blocks.  The 8-point size, the 12-bit word and
// the 4-bit block follow the published architecture; the 8-bit signed
// input sample is this design's choice (JPEG level shift, pixel - 128),
// and is what lets 12 bits hold every intermediate and final value
// without overflow.
package appdct_pkg;
  localparam int unsigned N_PT   = 8;   // transform size (points)
  localparam int unsigned DATA_W = 12;  // adder / register word width
  localparam int unsigned BLK_W  = 4;   // carry look-ahead block width
  localparam int unsigned PIX_W  = 8;   // input sample width (signed)
endpackage
