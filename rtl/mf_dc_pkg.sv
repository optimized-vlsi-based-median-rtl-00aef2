// mf_dc_pkg: constants shared by the median-filter modules.
//
// PIXEL_W is the grey-level pixel width (8 bits, 0..255) and WINDOW_SIZE
// the number of pixels in the square filter window (3x3 = 9). Both follow
// the described design; the modules take PIXEL_W as the default of their
// own DATA_W parameter so that other widths can be built.
package mf_dc_pkg;
  localparam int unsigned PIXEL_W     = 8;
  localparam int unsigned WINDOW_SIZE = 9;
endpackage
