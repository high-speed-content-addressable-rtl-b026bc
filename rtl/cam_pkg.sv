// cam_pkg: sizes shared by the CAM macro and its parts.
//
// The macro stores 256 words of 24 bits, organised as two mirrored array
// halves of 128 rows each. Every word is split into a left and a right
// segment of 12 bits, each with its own Hit/Miss line. A 7-bit address selects
// the row; the two write signals of a port select the half. These numbers are
// the macro's published organisation. The bit order of the segments inside a
// word (bits 23:12 left, 11:0 right) is this design's own convention.
package cam_pkg;
  localparam int unsigned HALVES   = 2;    // two array halves, one write signal each
  localparam int unsigned ROWS     = 128;  // rows per half
  localparam int unsigned ADDR_W   = 7;    // row address width
  localparam int unsigned SEG_BITS = 12;   // bits per Hit/Miss line segment

endpackage
