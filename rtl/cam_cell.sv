// cam_cell: one bit of the content addressable array.
//
// The cell stores one bit (the cross-coupled pair of the 6-device cell) and
// compares it with the compare data (the 4-device XOR). A write happens at the
// rising clock edge when the row's wordline and the half's write signal are
// both active; d is the value on the true bitline. During a search the compare
// lines are driven (cmp_en) and the cell's match transistor conducts when the
// stored bit differs from cd: that is the mismatch output, which pulls the
// shared precharged Hit/Miss line low. With the compare lines idle the match
// transistor is off, so an idle cell never discharges its line.
//
// Timing: the stored bit changes at the rising edge after a write; mismatch is
// combinational from q, cmp_en and cd. The storage is a flip-flop standing in
// for the static cell; it has no reset, as the real cell has none.
module cam_cell (
  input  logic clk,
  input  logic wl,        // wordline of the row
  input  logic we,        // write signal of the half (drives the bitlines)
  input  logic d,         // write data (true bitline)
  input  logic cmp_en,    // compare lines active (associative search)
  input  logic cd,        // compare data (true compare line)
  output logic mismatch   // match transistor on: discharges the Hit/Miss line
);
  logic q;  // stored bit

  always_ff @(posedge clk) begin
    if (wl && we) q <= d;
  end

  assign mismatch = cmp_en & (q ^ cd);
endmodule
