// tb_sram_invalid: self-checking test of the invalid-bit SRAM.
//
// Mixes writes to one or both halves, two-bit reads and set patterns from the
// enable side (with every wordline idle, as the array requires) and compares
// each read with a reference array. Read data must appear on e_data_out right
// after the edge of the read cycle and hold through cycles without a read.
module tb_sram_invalid;
  localparam int unsigned ROWS = cam_pkg::ROWS;

  logic clk = 1'b0;
  logic [ROWS-1:0] wl;
  logic [1:0] we;
  logic re, e_data_in;
  logic [1:0][ROWS-1:0] set;
  logic [1:0] e_data_out;

  logic ref_bits [2][ROWS];
  logic [1:0] last_read;
  int checks = 0, failures = 0;
  int n_sets = 0, n_read_ones = 0;

  sram_invalid dut (.clk(clk), .wl(wl), .we(we), .re(re), .e_data_in(e_data_in),
                    .set(set), .e_data_out(e_data_out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = '0; we = '0; re = 0; e_data_in = 0; set = '0;
    // Clear every bit, then read once to define the output.
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wl = '0; wl[r] = 1'b1; we = 2'b11; e_data_in = 0;
      @(posedge clk); ref_bits[0][r] = 0; ref_bits[1][r] = 0;
    end
    @(negedge clk); we = '0; re = 1; wl = '0; wl[0] = 1'b1;
    @(posedge clk); last_read = 2'b00;
    for (int i = 0; i < 3000; i++) begin
      int row;
      @(negedge clk);
      #1;
      checks++;
      if (e_data_out !== last_read) begin
        failures++;
        if (failures < 10) $display("cycle %0d: e_data_out %b expected %b", i, e_data_out, last_read);
      end
      row = $urandom_range(0, ROWS - 1);
      wl = '0; we = '0; re = 0; set = '0;
      case ($urandom_range(0, 3))
        0: begin wl[row] = 1'b1; we = 2'($urandom_range(1, 3)); e_data_in = 1'($urandom); end
        1, 2: begin wl[row] = 1'b1; re = 1; end
        default: begin
          for (int h = 0; h < 2; h++)
            for (int r = 0; r < ROWS; r++) set[h][r] = ($urandom_range(0, 15) == 0);
        end
      endcase
      @(posedge clk);
      if (re) begin
        last_read = {ref_bits[1][row], ref_bits[0][row]};
        if (|last_read) n_read_ones++;
      end
      for (int h = 0; h < 2; h++) begin
        if (we[h]) ref_bits[h][row] = e_data_in;
        for (int r = 0; r < ROWS; r++) if (set[h][r]) begin ref_bits[h][r] = 1'b1; n_sets++; end
      end
    end
    if (n_sets == 0 || n_read_ones == 0) begin
      failures++;
      $display("coverage: sets %0d reads of a 1 %0d", n_sets, n_read_ones);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
