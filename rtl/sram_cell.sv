// sram_cell: one invalid bit.
//
// A conventional static bit with one write/read port, plus a set input that
// stands for the extra pull-down transistor T4: when set is active at a rising
// clock edge the bit becomes 1 (invalid). Otherwise it changes only by a
// normal write (wordline and write signal both active, d on the bitline).
// The rule that every wordline is inactive while T4 conducts is checked one
// level up, in the SRAM array. If both occur, set wins. No reset: the system
// writes the bits before use. q is the stored value, read through the array's
// bitline.
module sram_cell (
  input  logic clk,
  input  logic wl,   // wordline of the row
  input  logic we,   // write signal of the half
  input  logic d,    // write data
  input  logic set,  // from the enable circuit: a search matched this entry
  output logic q     // stored bit, 1 = invalid
);
  always_ff @(posedge clk) begin
    if (set)            q <= 1'b1;
    else if (wl && we)  q <= d;
  end
endmodule
