// cam_array: the two CAM array halves, 2 x ROWS entries of 2 x SEG_BITS bits.
//
// Each half holds ROWS words; each word is split into a left segment (bits
// [2*SEG_BITS-1:SEG_BITS]) and a right segment (bits [SEG_BITS-1:0]). The
// array has one write port: at a rising clock edge the word d_data is written
// into the row whose wordline is active, in every half whose write signal is
// set. During a search (cmp_en) every cell compares its bit with comp_data;
// a segment's Hit/Miss line is high when none of its SEG_BITS cells reports a
// mismatch, which is the wired-NOR of the precharged line. With cmp_en low the
// lines stay at their precharged high level. The Hit/Miss lines are
// combinational from the stored words and the compare inputs.
//
// The organisation (two halves, 128 rows, 12 + 12 bits, one write port, a
// left and a right line per entry) follows the published macro; the bit order
// inside a word is this design's choice.
module cam_array #(
  parameter int unsigned ROWS     = cam_pkg::ROWS,
  parameter int unsigned SEG_BITS = cam_pkg::SEG_BITS
) (
  input  logic                                  clk,
  input  logic [ROWS-1:0]                       wl,         // one-hot row select
  input  logic [cam_pkg::HALVES-1:0]            we,         // write signal per half
  input  logic [2*SEG_BITS-1:0]                 d_data,     // write data
  input  logic                                  cmp_en,     // associative search
  input  logic [2*SEG_BITS-1:0]                 comp_data,  // compare data
  output logic [cam_pkg::HALVES-1:0][ROWS-1:0]  hml,        // left Hit/Miss lines
  output logic [cam_pkg::HALVES-1:0][ROWS-1:0]  hmr         // right Hit/Miss lines
);
  localparam int unsigned W = 2 * SEG_BITS;

  for (genvar h = 0; h < cam_pkg::HALVES; h++) begin : g_half
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      logic [W-1:0] mis;
      for (genvar b = 0; b < W; b++) begin : g_bit
        cam_cell u_cell (
          .clk      (clk),
          .wl       (wl[r]),
          .we       (we[h]),
          .d        (d_data[b]),
          .cmp_en   (cmp_en),
          .cd       (comp_data[b]),
          .mismatch (mis[b])
        );
      end
      assign hml[h][r] = ~|mis[W-1:SEG_BITS];
      assign hmr[h][r] = ~|mis[SEG_BITS-1:0];
    end
  end
endmodule
