// tb_cam_macro: end-to-end test of the CAM macro at its full size.
//
// The macro is used as in its application: the 256 entries hold addresses,
// the invalid bits are cleared, then associative searches mark every entry
// that holds the searched address and reads return the marked bits two at a
// time. Stored words come from a small pool of left and right 12-bit segments,
// so that searches hit one entry, several entries, none, or only one segment
// of an entry. A reference model of both arrays predicts every read.
//
// Checked: every read returns the predicted pair of bits one cycle after the
// read cycle, and e_data_out holds between reads; a search marks the bits so
// that a read in the very next cycle sees them; writes requested during a
// search change nothing; a marked bit stays set until it is written again.
// Each of these mechanisms is counted and must occur at least once.
module tb_cam_macro;
  localparam int unsigned ROWS = cam_pkg::ROWS;
  localparam int unsigned AW   = cam_pkg::ADDR_W;
  localparam int unsigned SEG  = cam_pkg::SEG_BITS;
  localparam int unsigned W    = 2 * SEG;

  logic clk = 1'b0;
  logic iom;
  logic [1:0] write_d, write_e;
  logic [W-1:0] d_data, comp_data;
  logic [AW-1:0] addr;
  logic e_data_in;
  logic [1:0] e_data_out;

  logic [W-1:0] ref_cam [2][ROWS];
  logic         ref_inv [2][ROWS];
  logic [1:0]   last_read;
  bit           out_defined = 0;  // e_data_out is defined after the first read
  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_cam_write = 0, n_sram_write = 0, n_read = 0, n_read_set = 0;
  int n_search_single = 0, n_search_multi = 0, n_search_none = 0;
  int n_partial_left = 0, n_partial_right = 0, n_blocked_write = 0;
  int n_search_then_read = 0, n_set_persists = 0;
  bit sticky_set [2][ROWS];  // set by a search, not rewritten since

  cam_macro dut (
    .clk(clk), .iom(iom), .write_d(write_d), .d_data(d_data), .comp_data(comp_data),
    .addr(addr), .write_e(write_e), .e_data_in(e_data_in), .e_data_out(e_data_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pool_word();
    logic [SEG-1:0] l, r;
    l = SEG'(12'h3C0 + $urandom_range(0, 3));
    r = SEG'(12'hA05 + $urandom_range(0, 3));
    return {l, r};
  endfunction

  task automatic idle_inputs();
    iom = 0; write_d = '0; write_e = '0; d_data = '0; comp_data = '0;
    e_data_in = 0;
  endtask

  // Output check made in the second half of every cycle, before new inputs.
  task automatic check_output();
    if (!out_defined) return;
    checks++;
    if (e_data_out !== last_read) begin
      failures++;
      if (failures < 10) $display("%0t: e_data_out %b expected %b", $time, e_data_out, last_read);
    end
  endtask

  // One cycle of a normal (non-search) operation.
  task automatic op_cycle(input logic [1:0] wd, input logic [W-1:0] dd,
                          input logic [1:0] we, input logic ed, input int row);
    @(negedge clk);
    check_output();
    idle_inputs();
    write_d = wd; d_data = dd; write_e = we; e_data_in = ed; addr = AW'(row);
    @(posedge clk);
    for (int h = 0; h < 2; h++) begin
      if (wd[h]) begin ref_cam[h][row] = dd; n_cam_write++; end
      if (we[h]) begin ref_inv[h][row] = ed; n_sram_write++; sticky_set[h][row] = 0; end
    end
    if (we == '0) begin
      last_read = {ref_inv[1][row], ref_inv[0][row]};
      out_defined = 1;
      n_read++;
      if (|last_read) n_read_set++;
      for (int h = 0; h < 2; h++) if (sticky_set[h][row]) n_set_persists++;
    end
  endtask

  // One search cycle; optionally with write requests that must be ignored.
  task automatic search_cycle(input logic [W-1:0] cd, input bit with_writes);
    int hits;
    @(negedge clk);
    check_output();
    idle_inputs();
    iom = 1; comp_data = cd; addr = AW'($urandom_range(0, ROWS - 1));
    if (with_writes) begin
      write_d = 2'b11; d_data = pool_word(); write_e = 2'b11; e_data_in = 0;
      n_blocked_write++;
    end
    @(posedge clk);
    hits = 0;
    for (int h = 0; h < 2; h++) begin
      for (int r = 0; r < ROWS; r++) begin
        logic ml, mr;
        ml = ref_cam[h][r][W-1:SEG] == cd[W-1:SEG];
        mr = ref_cam[h][r][SEG-1:0] == cd[SEG-1:0];
        if (ml && mr) begin ref_inv[h][r] = 1'b1; sticky_set[h][r] = 1; hits++; end
        else if (ml) n_partial_left++;
        else if (mr) n_partial_right++;
      end
    end
    if (hits == 0) n_search_none++;
    else if (hits == 1) n_search_single++;
    else n_search_multi++;
  endtask

  initial begin
    idle_inputs();
    addr = '0;
    // Load every entry and clear every invalid bit (write both parts at once).
    for (int r = 0; r < ROWS; r++) begin
      op_cycle(2'b01, pool_word(), 2'b11, 1'b0, r);
      op_cycle(2'b10, pool_word(), 2'b00, 1'b0, r);
    end

    // Directed: a unique word in (half 1, row 5), search it, read next cycle.
    op_cycle(2'b10, 24'hFFF_FFF, 2'b10, 1'b0, 5);
    op_cycle(2'b00, '0, 2'b00, 1'b0, 5);   // read: bit still clear
    search_cycle(24'hFFF_FFF, 0);
    op_cycle(2'b00, '0, 2'b00, 1'b0, 5);   // read in the cycle after the search
    @(negedge clk);
    checks++;
    if (e_data_out !== 2'b10) begin
      failures++;
      $display("search-then-read: e_data_out %b expected 10", e_data_out);
    end else n_search_then_read++;
    last_read = e_data_out;

    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      int row;
      row = $urandom_range(0, ROWS - 1);
      case ($urandom_range(0, 9))
        0: op_cycle(2'($urandom_range(1, 3)), pool_word(), 2'b00, 1'b0, row);
        1: op_cycle(2'($urandom_range(0, 3)), pool_word(), 2'($urandom_range(1, 3)), 1'($urandom), row);
        2, 3: search_cycle(($urandom_range(0, 5) == 0) ? W'($urandom) : pool_word(),
                           $urandom_range(0, 3) == 0);
        default: op_cycle(2'b00, '0, 2'b00, 1'b0, row);
      endcase
      // Occasionally clear a whole row so that marks do not saturate.
      if ($urandom_range(0, 7) == 0)
        op_cycle(2'b00, '0, 2'b11, 1'b0, $urandom_range(0, ROWS - 1));
    end
    // Final sweep: read every row once.
    for (int r = 0; r < ROWS; r++) op_cycle(2'b00, '0, 2'b00, 1'b0, r);
    @(negedge clk);
    check_output();

    $display("cam writes %0d, sram writes %0d, reads %0d (with a set bit %0d)",
             n_cam_write, n_sram_write, n_read, n_read_set);
    $display("searches: single hit %0d, multiple hits %0d, no hit %0d",
             n_search_single, n_search_multi, n_search_none);
    $display("left-only entry matches %0d, right-only %0d, writes blocked by search %0d",
             n_partial_left, n_partial_right, n_blocked_write);
    $display("search-then-read %0d, reads of a persisting mark %0d",
             n_search_then_read, n_set_persists);
    if (n_cam_write == 0)        begin failures++; $display("never: cam write"); end
    if (n_sram_write == 0)       begin failures++; $display("never: sram write"); end
    if (n_read_set == 0)         begin failures++; $display("never: read of a set bit"); end
    if (n_search_single == 0)    begin failures++; $display("never: single hit"); end
    if (n_search_multi == 0)     begin failures++; $display("never: multiple hits"); end
    if (n_search_none == 0)      begin failures++; $display("never: no hit"); end
    if (n_partial_left == 0)     begin failures++; $display("never: left-only match"); end
    if (n_partial_right == 0)    begin failures++; $display("never: right-only match"); end
    if (n_blocked_write == 0)    begin failures++; $display("never: write during search"); end
    if (n_search_then_read == 0) begin failures++; $display("never: search then read"); end
    if (n_set_persists == 0)     begin failures++; $display("never: persisting mark"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
