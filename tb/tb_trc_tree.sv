// tb_trc_tree -- exhaustive test of two-rail checker trees of 1, 2, 3, 5, 6 and
// 8 pairs.
//
// Every combination of the 2P input rails is applied (4**P values); the output
// must be a code word (f != g) exactly when every input pair is a code word
// (a[i] != b[i] for all i).
module tb_trc_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] stim;
  logic [7:0]  ra, rb;
  logic [5:0]  fo, go;

  assign ra = stim[15:8];
  assign rb = stim[7:0];

  trc_tree #(.P(1)) u1 (.a(ra[0:0]), .b(rb[0:0]), .f(fo[0]), .g(go[0]));
  trc_tree #(.P(2)) u2 (.a(ra[1:0]), .b(rb[1:0]), .f(fo[1]), .g(go[1]));
  trc_tree #(.P(3)) u3 (.a(ra[2:0]), .b(rb[2:0]), .f(fo[2]), .g(go[2]));
  trc_tree #(.P(5)) u5 (.a(ra[4:0]), .b(rb[4:0]), .f(fo[3]), .g(go[3]));
  trc_tree #(.P(6)) u6 (.a(ra[5:0]), .b(rb[5:0]), .f(fo[4]), .g(go[4]));
  trc_tree #(.P(8)) u8 (.a(ra),      .b(rb),      .f(fo[5]), .g(go[5]));

  int sizes [6] = '{1, 2, 3, 5, 6, 8};

  initial begin : watchdog
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] m;
    logic       all_cw;
    for (int i = 0; i < 65536; i++) begin
      @(negedge clk); stim = 16'(i); #1;
      for (int t = 0; t < 6; t++) begin
        m = 8'((16'd1 << sizes[t]) - 1);
        // Only check each size on inputs whose unused rails are zero.
        if (((ra | rb) & ~m) == 0) begin
          all_cw = (((ra ^ rb) & m) == m);
          checks++;
          if ((fo[t] ^ go[t]) != all_cw) begin
            failures++;
            if (failures < 10)
              $display("FAIL P=%0d a=%b b=%b f=%b g=%b", sizes[t], ra, rb, fo[t], go[t]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
