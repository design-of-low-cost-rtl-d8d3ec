// tb_trc2 -- exhaustive test of the 2-bit two-rail checker cell.
//
// For all 16 input combinations it checks the defining property: the output pair
// (f,g) is a code word (f != g) exactly when both input pairs are code words.
// For code-word inputs it also checks that f = 1 exactly when a1 = a2, i.e. the
// cell reports whether the two true rails agree.
module tb_trc2;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a1, b1, a2, b2, f, g;

  trc2 dut (.a1(a1), .b1(b1), .a2(a2), .b2(b2), .f(f), .g(g));

  task automatic check(string name, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%b%b%b%b f=%b g=%b", name, a1, b1, a2, b2, f, g);
    end
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      {a1, b1, a2, b2} = 4'(i);
      #1;
      check("code word out iff code words in", f ^ g, (a1 ^ b1) & (a2 ^ b2));
      if ((a1 ^ b1) & (a2 ^ b2)) check("f = (a1 == a2)", f, a1 ~^ a2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
