// tb_cs_stage -- exhaustive test of one compression stage.
//
// Six stage instances (widths 4, 5, 7 and 10, adding and subtracting) see every
// input value. The expected output is computed with integer division and modulo:
// A = x / 2**floor(W/2), B = x mod 2**floor(W/2), and A + B or A - B + 2**ceil(W/2).
// The output width ceil(W/2)+1 is checked too. The stage is combinational, so
// each value is checked one time step after it is applied.
module tb_cs_stage;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] stim;
  logic [2:0] o4a, o4s;
  logic [3:0] o5s;
  logic [4:0] o7a, o7s;
  logic [5:0] o10a;

  cs_stage #(.W(4),  .SUB(1'b0)) u4a  (.din(stim[3:0]), .dout(o4a));
  cs_stage #(.W(4),  .SUB(1'b1)) u4s  (.din(stim[3:0]), .dout(o4s));
  cs_stage #(.W(5),  .SUB(1'b1)) u5s  (.din(stim[4:0]), .dout(o5s));
  cs_stage #(.W(7),  .SUB(1'b0)) u7a  (.din(stim[6:0]), .dout(o7a));
  cs_stage #(.W(7),  .SUB(1'b1)) u7s  (.din(stim[6:0]), .dout(o7s));
  cs_stage #(.W(10), .SUB(1'b0)) u10a (.din(stim),      .dout(o10a));

  function automatic int expect_stage(int x, int w, bit sub);
    int wa = (w + 1) / 2;
    int wb = w / 2;
    int v  = x % (1 << w);
    int a  = v / (1 << wb);
    int b  = v % (1 << wb);
    return sub ? (a - b + (1 << wa)) : (a + b);
  endfunction

  task automatic check(string name, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s stim=%0d got=%0d exp=%0d", name, stim, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("width W=4",  $bits(o4a),  3);
    check("width W=5",  $bits(o5s),  4);
    check("width W=7",  $bits(o7a),  5);
    check("width W=10", $bits(o10a), 6);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      stim = 10'(i);
      #1;
      if (i < 16) begin
        check("W4 add", int'(o4a), expect_stage(i, 4, 1'b0));
        check("W4 sub", int'(o4s), expect_stage(i, 4, 1'b1));
      end
      if (i < 32)  check("W5 sub", int'(o5s), expect_stage(i, 5, 1'b1));
      if (i < 128) begin
        check("W7 add", int'(o7a), expect_stage(i, 7, 1'b0));
        check("W7 sub", int'(o7s), expect_stage(i, 7, 1'b1));
      end
      check("W10 add", int'(o10a), expect_stage(i, 10, 1'b0));
    end
    // Worked stage values: 0100|110 -> 01010 and 10110|10001 -> 100111.
    @(negedge clk); stim = 10'b0000100110; #1; check("0100110 add", int'(o7a), 5'b01010);
    @(negedge clk); stim = 10'b1011010001; #1; check("1011010001 add", int'(o10a), 6'b100111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
