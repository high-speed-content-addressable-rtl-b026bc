// cam_macro: content addressable memory with invalid bits, top level.
//
// The macro looks up an address among 256 stored 24-bit words and marks every
// entry that holds it. It has two parts. The CAM part stores 256 words in two
// halves of 128 rows; a write puts d_data into row addr of each half selected
// by write_d. The SRAM part holds one invalid bit per entry; a write puts
// e_data_in into row addr of each half selected by write_e, and a cycle with
// no SRAM write reads row addr of both halves onto e_data_out. When iom is
// high the cycle is an associative search: comp_data is compared with all 256
// words, and every entry whose left and right 12-bit segments both match sets
// its invalid bit through its enable circuit. In a search cycle the address
// system and all wordlines stay idle, so writes and reads requested in that
// cycle are ignored and e_data_out holds.
//
// Timing: every operation is presented during one clock cycle and takes
// effect at the rising edge that ends it. Read data appear on e_data_out
// after that edge and are held until the next read. A search in cycle N can
// therefore be followed by a read of the marked bits in cycle N+1, whose data
// are on e_data_out in cycle N+2.
//
// The ports, widths and the split into CAM array, enable circuits and SRAM
// follow the published block diagram. Entry numbering (entry = half * 128 +
// row), the segment bit order, the read taking place in every non-search
// cycle without an SRAM write, and the suppression of writes during a search
// are this design's reading of the description.
module cam_macro #(
  parameter int unsigned ROWS     = cam_pkg::ROWS,
  parameter int unsigned ADDR_W   = cam_pkg::ADDR_W,
  parameter int unsigned SEG_BITS = cam_pkg::SEG_BITS
) (
  input  logic                          clk,
  input  logic                          iom,         // associative search
  input  logic [cam_pkg::HALVES-1:0]    write_d,     // CAM write signals, one per half
  input  logic [2*SEG_BITS-1:0]         d_data,      // CAM write data
  input  logic [2*SEG_BITS-1:0]         comp_data,   // compare data
  input  logic [ADDR_W-1:0]             addr,        // row address, shared by both parts
  input  logic [cam_pkg::HALVES-1:0]    write_e,     // SRAM write signals, one per half
  input  logic                          e_data_in,   // SRAM write data
  output logic [cam_pkg::HALVES-1:0]    e_data_out   // invalid bits of row addr, both halves
);
  localparam int unsigned NWL = 2 ** ADDR_W;

  logic [NWL-1:0]                        wl_dec;
  logic [ROWS-1:0]                       wl;
  logic [cam_pkg::HALVES-1:0][ROWS-1:0]  hml, hmr, set_inv;

  // The address system idles during a search: no wordline, hence no write.
  word_decoder #(.ADDR_W(ADDR_W)) u_dec (
    .addr (addr),
    .en   (~iom),
    .wl   (wl_dec)
  );
  assign wl = wl_dec[ROWS-1:0];

  cam_array #(.ROWS(ROWS), .SEG_BITS(SEG_BITS)) u_cam (
    .clk       (clk),
    .wl        (wl),
    .we        (write_d),
    .d_data    (d_data),
    .cmp_en    (iom),
    .comp_data (comp_data),
    .hml       (hml),
    .hmr       (hmr)
  );

  for (genvar h = 0; h < cam_pkg::HALVES; h++) begin : g_half
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      enable_circuit u_en (
        .enable  (iom),
        .hml     (hml[h][r]),
        .hmr     (hmr[h][r]),
        .set_inv (set_inv[h][r])
      );
    end
  end

  sram_invalid #(.ROWS(ROWS)) u_sram (
    .clk        (clk),
    .wl         (wl),
    .we         (write_e),
    .re         (~iom && (write_e == '0)),
    .e_data_in  (e_data_in),
    .set        (set_inv),
    .e_data_out (e_data_out)
  );

  initial begin
    assert (ROWS <= NWL) else $error("ROWS exceeds the address range");
  end
endmodule
