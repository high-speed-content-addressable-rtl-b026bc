// sram_invalid: the invalid-bit SRAM, 2 x ROWS bits.
//
// One bit per CAM entry, in two halves that mirror the CAM halves. Port 1 is
// a normal write/read port sharing the CAM's wordlines: at a rising clock
// edge, e_data_in is written into the selected row of every half whose write
// signal is set; when re is set instead, the selected row of both halves is
// read and the two bits appear on e_data_out after that edge (bit h from half
// h) and are held until the next read. Port 2 is the set access from the
// enable circuits: every bit whose set line is active at a rising edge
// becomes 1. While any set line is active all wordlines must be inactive; an
// assertion checks this. The read path is the wired bitline of the selected
// column: the OR, over the rows, of wordline and stored bit.
//
// The port widths (1 bit in, 2 bits out, 2 write signals) follow the
// published block diagram. The output register, the read enable and the
// hold-between-reads behaviour are this design's choices.
module sram_invalid #(
  parameter int unsigned ROWS = cam_pkg::ROWS
) (
  input  logic                                  clk,
  input  logic [ROWS-1:0]                       wl,          // one-hot row select
  input  logic [cam_pkg::HALVES-1:0]            we,          // write signal per half
  input  logic                                  re,          // read both halves
  input  logic                                  e_data_in,   // write data
  input  logic [cam_pkg::HALVES-1:0][ROWS-1:0]  set,         // set-invalid signals
  output logic [cam_pkg::HALVES-1:0]            e_data_out   // read data
);
  logic [cam_pkg::HALVES-1:0][ROWS-1:0] q;
  logic [cam_pkg::HALVES-1:0]           bitline;

  for (genvar h = 0; h < cam_pkg::HALVES; h++) begin : g_half
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      sram_cell u_cell (
        .clk (clk),
        .wl  (wl[r]),
        .we  (we[h]),
        .d   (e_data_in),
        .set (set[h][r]),
        .q   (q[h][r])
      );
    end
    assign bitline[h] = |(wl & q[h]);
  end

  always_ff @(posedge clk) begin
    if (re) e_data_out <= bitline;
  end

  // The set transistor may only conduct while every wordline is idle.
  a_set_wl_idle: assert property (@(posedge clk) (|set) |-> (wl == '0))
    else $error("invalid bit set while a wordline is active");
endmodule
