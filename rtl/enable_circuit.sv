// enable_circuit: per-entry combiner between the CAM and the invalid bit.
//
// Each entry has two precharged Hit/Miss lines, one per 12-bit segment (HML
// for the left, HMR for the right); a line stays high only if every cell on it
// matches, so the entry holds the compare data only when both lines are high.
// The enable circuit combines the two lines, lets the result through only
// while ENABLE marks the evaluation window of a search, and amplifies it from
// its internal node X to the output Y that drives the set transistor of the
// entry's invalid bit. Here X is modelled as a node that is high unless a
// full match is seen during ENABLE, and Y as its complement:
// set_inv = enable & hml & hmr. The restore of the match lines at the end of
// each cycle (RESET) has no counterpart: the lines are recomputed from the
// array every cycle. Purely combinational; the invalid bit samples the result
// at the rising clock edge. Driving ENABLE from the search input is the
// macro's choice, not part of this block.
module enable_circuit (
  input  logic enable,    // search evaluation window (ENABLE)
  input  logic hml,       // left Hit/Miss line, high = all 12 bits match
  input  logic hmr,       // right Hit/Miss line, high = all 12 bits match
  output logic set_inv    // Y: set the entry's invalid bit
);
  logic node_x;  // dynamic node, precharged high, discharged on a full match

  assign node_x  = ~(enable & hml & hmr);
  assign set_inv = ~node_x;
endmodule
