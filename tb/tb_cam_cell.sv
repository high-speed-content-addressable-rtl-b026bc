// tb_cam_cell: self-checking test of one CAM bit.
//
// Drives random write/compare combinations and checks, one cycle at a time,
// that the bit is written only when wordline and write signal are both active
// and that the mismatch output is high exactly during a compare whose data
// differs from the stored bit.
module tb_cam_cell;
  logic clk = 1'b0;
  logic wl, we, d, cmp_en, cd, mismatch;
  logic model;
  int checks = 0, failures = 0;

  cam_cell dut (.clk(clk), .wl(wl), .we(we), .d(d), .cmp_en(cmp_en), .cd(cd),
                .mismatch(mismatch));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Establish a known value.
    wl = 1; we = 1; d = 0; cmp_en = 0; cd = 0;
    @(posedge clk); model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      {wl, we, d, cmp_en, cd} = 5'($urandom);
      #1;
      checks++;
      if (mismatch !== (cmp_en & (model ^ cd))) begin
        failures++;
        $display("mismatch=%b expected %b (stored %b cd %b cmp %b)", mismatch,
                 cmp_en & (model ^ cd), model, cd, cmp_en);
      end
      @(posedge clk);
      if (wl && we) model = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
