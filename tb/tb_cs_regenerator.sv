// tb_cs_regenerator -- test of the check-symbol regenerator in its three modes.
//
// Instances: Mix with n = 10, k = 3 (6-bit symbol), Add with n = 12, k = 4, Sub
// with n = 12, k = 4, and Mix with n = 32, k = 4 (8-bit symbol). The small ones
// see every input, the 32-bit one 5000 random vectors; the expected symbol comes
// from the integer reference model (Mix = {Sub, Add}). The symbol widths are
// checked as well.
module tb_cs_regenerator;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] stim;
  logic [5:0]  m10;
  logic [3:0]  a12, s12;
  logic [7:0]  m32;

  cs_regenerator #(.N(10), .K(3), .MODE(ENC_MIX)) u_m10 (.out_vec(stim[9:0]),  .cs_regen(m10));
  cs_regenerator #(.N(12), .K(4), .MODE(ENC_ADD)) u_a12 (.out_vec(stim[11:0]), .cs_regen(a12));
  cs_regenerator #(.N(12), .K(4), .MODE(ENC_SUB)) u_s12 (.out_vec(stim[11:0]), .cs_regen(s12));
  cs_regenerator #(.N(32), .K(4), .MODE(ENC_MIX)) u_m32 (.out_vec(stim),       .cs_regen(m32));

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s stim=%h got=%0h exp=%0h", name, stim, got, exp);
    end
  endtask

  function automatic longint r(logic [31:0] x, int n, int k, int mode);
    vec_t v = vec_t'(x) & ((vec_t'(1) << n) - 1);
    return longint'(ref_cs(v, n, k, mode));
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("Mix k=3 width", cs_width(ENC_MIX, 3), 6);
    check("Add k=4 width", cs_width(ENC_ADD, 4), 4);
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); stim = 32'(i); #1;
      if (i < 1024) check("mix n10 k3", m10, r(stim, 10, 3, 2));
      check("add n12 k4", a12, r(stim, 12, 4, 0));
      check("sub n12 k4", s12, r(stim, 12, 4, 1));
    end
    // The low half of the Mix symbol is the plain Add symbol of the worked example.
    @(negedge clk); stim = 32'b1011010001; #1;
    check("mix n10 add half", m10[2:0], 3'b101);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk); stim = $urandom; #1;
      check("mix n32 k4", m32, r(stim, 32, 4, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
