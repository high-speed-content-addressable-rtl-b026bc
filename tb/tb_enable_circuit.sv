// tb_enable_circuit: exhaustive test of the per-entry enable circuit.
//
// The set-invalid output must be active only when ENABLE is active and both
// Hit/Miss lines still signal a match.
module tb_enable_circuit;
  logic enable, hml, hmr, set_inv;
  int checks = 0, failures = 0;

  enable_circuit dut (.enable(enable), .hml(hml), .hmr(hmr), .set_inv(set_inv));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {enable, hml, hmr} = 3'(i);
      #1;
      checks++;
      if (set_inv !== (i == 7)) begin
        failures++;
        $display("enable %b hml %b hmr %b: set_inv %b", enable, hml, hmr, set_inv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
