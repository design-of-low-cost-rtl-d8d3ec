// tb_sc_checker -- end-to-end test of the checker at its default parameters
// (n = 7 outputs, k = 3, Mix: a 6-bit check symbol).
//
// Part 1 applies every pair of output vector (128) and incoming check symbol (64)
// and requires the two-rail indication to be a code word exactly when the symbol
// equals the reference symbol of the vector, and CS' to equal that reference.
// Part 2 plays the role of a fault-free check symbol generator: for every vector
// v it supplies CS = reference(v) and then shows the checker every single- and
// double-bit corruption of v, counting errors caught and errors masked (aliases).
// The indication must agree with the reference in every case.
//
// Mechanisms that must each happen at least once: indication 01 and 10 for a
// match, 00 and 11 for a mismatch, an error caught only by the Add half of the
// symbol, one caught only by the Sub half, one caught by both, and a masked error.
module tb_sc_checker;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 7;
  localparam int K = 3;
  localparam int CSW = 2 * K;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   out_vec;
  logic [CSW-1:0] cs, cs_regen;
  logic           err_f, err_g;

  sc_checker dut (
    .out_vec  (out_vec),
    .cs       (cs),
    .cs_regen (cs_regen),
    .err_f    (err_f),
    .err_g    (err_g)
  );

  // Mechanism counters.
  int ok01 = 0, ok10 = 0, err00 = 0, err11 = 0;
  int add_only = 0, sub_only = 0, both_halves = 0, masked = 0;
  int single_err = 0, single_det = 0, double_err = 0, double_det = 0;

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s out_vec=%b cs=%b got=%0d exp=%0d", name, out_vec, cs, got, exp);
    end
  endtask

  function automatic logic [CSW-1:0] r(logic [N-1:0] v);
    return CSW'(ref_cs(vec_t'(v), N, K, 2));
  endfunction

  task automatic count(string name, int value);
    checks++;
    $display("  %-28s %0d", name, value);
    if (value == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0]   bad;
    logic [CSW-1:0] good_cs, bad_cs;
    logic           detected;

    check("symbol width", $bits(cs_regen), CSW);

    // Part 1: every vector against every incoming symbol.
    for (int v = 0; v < (1 << N); v++) begin
      for (int c = 0; c < (1 << CSW); c++) begin
        @(negedge clk);
        out_vec = N'(v);
        cs      = CSW'(c);
        #1;
        if (c == 0) check("CS'", cs_regen, r(out_vec));
        check("indication", err_f ^ err_g, cs == r(out_vec));
        case ({err_f, err_g})
          2'b01: ok01++;
          2'b10: ok10++;
          2'b00: err00++;
          default: err11++;
        endcase
      end
    end

    // Part 2: single- and double-bit errors on the output vector.
    for (int v = 0; v < (1 << N); v++) begin
      good_cs = r(N'(v));
      for (int i = 0; i < N; i++) begin
        for (int j = i; j < N; j++) begin
          bad = N'(v);
          bad[i] = ~bad[i];
          if (j != i) bad[j] = ~bad[j];
          bad_cs = r(bad);
          @(negedge clk);
          out_vec = bad;
          cs      = good_cs;
          #1;
          detected = ~(err_f ^ err_g);
          check("error detection", detected, bad_cs != good_cs);
          if (j == i) begin
            single_err++;
            single_det += int'(detected);
          end else begin
            double_err++;
            double_det += int'(detected);
          end
          if (!detected) masked++;
          else if (bad_cs[K-1:0] != good_cs[K-1:0] && bad_cs[CSW-1:K] == good_cs[CSW-1:K]) add_only++;
          else if (bad_cs[K-1:0] == good_cs[K-1:0]) sub_only++;
          else both_halves++;
        end
      end
    end

    $display("single-bit errors caught: %0d of %0d", single_det, single_err);
    $display("double-bit errors caught: %0d of %0d", double_det, double_err);
    $display("mechanisms:");
    count("match, indication 01", ok01);
    count("match, indication 10", ok10);
    count("mismatch, indication 00", err00);
    count("mismatch, indication 11", err11);
    count("caught by Add half only", add_only);
    count("caught by Sub half only", sub_only);
    count("caught by both halves", both_halves);
    count("masked error (alias)", masked);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
