// tb_sram_cell: self-checking test of one invalid bit.
//
// Random writes and set pulses; after every edge the stored bit must equal a
// model in which set forces 1, a write (wordline and write signal) stores d,
// and anything else leaves the bit alone.
module tb_sram_cell;
  logic clk = 1'b0;
  logic wl, we, d, set, q;
  logic model;
  int checks = 0, failures = 0;

  sram_cell dut (.clk(clk), .wl(wl), .we(we), .d(d), .set(set), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wl = 1; we = 1; d = 0; set = 0;
    @(posedge clk); model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {wl, we, d} = 3'($urandom);
      set = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (set)           model = 1'b1;
      else if (wl && we) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("cycle %0d: q %b expected %b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
