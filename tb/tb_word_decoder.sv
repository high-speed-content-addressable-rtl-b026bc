// tb_word_decoder: exhaustive test of the row decoder at its default size.
//
// For every address, with the enable high and low, checks that exactly the
// addressed wordline is active, or none.
module tb_word_decoder;
  localparam int unsigned AW = 7;
  logic [AW-1:0]    addr;
  logic             en;
  logic [2**AW-1:0] wl;
  int checks = 0, failures = 0;

  word_decoder dut (.addr(addr), .en(en), .wl(wl));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int a = 0; a < 2**AW; a++) begin
        logic [2**AW-1:0] exp;
        addr = AW'(a); en = e[0];
        exp = '0;
        if (e == 1) exp[a] = 1'b1;
        #1;
        checks++;
        if (wl !== exp) begin
          failures++;
          $display("addr %0d en %0d: wl %h expected %h", a, e, wl, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
