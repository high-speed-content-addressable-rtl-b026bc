// tb_cam_array: self-checking test of the two CAM array halves.
//
// Words are drawn from a small pool of left and right segment values so that
// searches produce full matches, several matches, and matches of one segment
// only. After filling every row of both halves the test mixes random writes
// (to one or both halves) with searches and compares every Hit/Miss line with
// a reference copy of the array. It also checks that all lines stay high
// (precharged) when no search is active, and that a row is not written when
// its wordline is idle.
module tb_cam_array;
  localparam int unsigned ROWS = cam_pkg::ROWS;
  localparam int unsigned SEG  = cam_pkg::SEG_BITS;
  localparam int unsigned W    = 2 * SEG;

  logic clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [1:0] we;
  logic [W-1:0] d_data, comp_data;
  logic cmp_en;
  logic [1:0][ROWS-1:0] hml, hmr;

  logic [W-1:0] ref_mem [2][ROWS];
  int checks = 0, failures = 0;
  int n_full = 0, n_left_only = 0, n_right_only = 0;

  cam_array dut (.clk(clk), .wl(wl), .we(we), .d_data(d_data), .cmp_en(cmp_en),
                 .comp_data(comp_data), .hml(hml), .hmr(hmr));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] pool_word();
    logic [SEG-1:0] l, r;
    l = SEG'(12'h5A0 + $urandom_range(0, 3));
    r = SEG'(12'h0C3 + $urandom_range(0, 3));
    return {l, r};
  endfunction

  task automatic write_row(input int row, input logic [1:0] halves, input logic [W-1:0] v);
    @(negedge clk);
    cmp_en = 0; wl = '0; wl[row] = 1'b1; we = halves; d_data = v;
    @(posedge clk);
    for (int h = 0; h < 2; h++) if (halves[h]) ref_mem[h][row] = v;
    @(negedge clk);
    wl = '0; we = '0;
  endtask

  task automatic check_lines(input logic en);
    for (int h = 0; h < 2; h++) begin
      for (int r = 0; r < ROWS; r++) begin
        logic el, er;
        el = !en || (ref_mem[h][r][W-1:SEG] == comp_data[W-1:SEG]);
        er = !en || (ref_mem[h][r][SEG-1:0] == comp_data[SEG-1:0]);
        if (en && el && er) n_full++;
        if (en && el && !er) n_left_only++;
        if (en && !el && er) n_right_only++;
        checks++;
        if (hml[h][r] !== el || hmr[h][r] !== er) begin
          failures++;
          if (failures < 10)
            $display("half %0d row %0d: hml %b hmr %b expected %b %b", h, r,
                     hml[h][r], hmr[h][r], el, er);
        end
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; we = '0; d_data = '0; comp_data = '0; cmp_en = 0;
    for (int r = 0; r < ROWS; r++) begin
      write_row(r, 2'b01, pool_word());
      write_row(r, 2'b10, pool_word());
    end
    for (int i = 0; i < 300; i++) begin
      case ($urandom_range(0, 3))
        0: write_row($urandom_range(0, ROWS - 1), 2'($urandom_range(1, 3)), pool_word());
        1: begin
          // Write data present but no wordline: nothing may change.
          @(negedge clk);
          wl = '0; we = 2'b11; d_data = pool_word();
          @(posedge clk);
          @(negedge clk);
          we = '0;
        end
        default: ;
      endcase
      @(negedge clk);
      comp_data = ($urandom_range(0, 7) == 0) ? W'($urandom) : pool_word();
      cmp_en = ($urandom_range(0, 4) != 0);
      #1;
      check_lines(cmp_en);
      cmp_en = 0;
    end
    if (n_full == 0 || n_left_only == 0 || n_right_only == 0) begin
      failures++;
      $display("coverage: full %0d left-only %0d right-only %0d", n_full, n_left_only, n_right_only);
    end
    $display("full matches %0d, left-only %0d, right-only %0d", n_full, n_left_only, n_right_only);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
