// word_decoder: row address to one-hot wordlines.
//
// Decodes an ADDR_W-bit row address to one of 2**ADDR_W wordlines. When en is
// low every wordline stays inactive; the macro uses this to keep the address
// system and all wordlines idle during an associative search. The decoder is
// shared by the CAM arrays and the invalid-bit SRAM, which use the same
// address. Purely combinational.
module word_decoder #(
  parameter int unsigned ADDR_W = cam_pkg::ADDR_W
) (
  input  logic [ADDR_W-1:0]      addr,
  input  logic                   en,
  output logic [2**ADDR_W-1:0]   wl
);
  always_comb begin
    wl = '0;
    if (en) wl[addr] = 1'b1;
  end
endmodule
