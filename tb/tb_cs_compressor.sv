// tb_cs_compressor -- test of the compression chain.
//
// Checks, against the integer reference model of tb_ref_pkg:
//  * the two worked examples with k = 3: 0100110 -> 001 and 1011010001 -> 101;
//  * the distribution of the 16 four-bit vectors over the eight 3-bit symbols for
//    Add and Sub, and that two vectors sharing a symbol always differ in at least
//    two bits (Add: 1,2,3,4,3,2,1,0 vectors on 000..111; Sub: 0,1,2,3,4,3,2,1);
//  * every input of chains with n = 7, 10 and 12 and k = 3 and 4, add and sub;
//  * the full-adder counts of the chain for n = 6, 12, 28, 54:
//    Add(3) 5, 15, 32, 59 and Add(4) 3, 13, 30, 57.
module tb_cs_compressor;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [11:0] stim;
  logic [2:0] c4a, c4s, c7a3, c7s3, c10a3, c12a3, c12s3;
  logic [3:0] c7a4, c10s4, c12a4;

  cs_compressor #(.N(4),  .K(3), .SUB(1'b0)) u4a   (.out_vec(stim[3:0]), .cs_regen(c4a));
  cs_compressor #(.N(4),  .K(3), .SUB(1'b1)) u4s   (.out_vec(stim[3:0]), .cs_regen(c4s));
  cs_compressor #(.N(7),  .K(3), .SUB(1'b0)) u7a3  (.out_vec(stim[6:0]), .cs_regen(c7a3));
  cs_compressor #(.N(7),  .K(3), .SUB(1'b1)) u7s3  (.out_vec(stim[6:0]), .cs_regen(c7s3));
  cs_compressor #(.N(7),  .K(4), .SUB(1'b0)) u7a4  (.out_vec(stim[6:0]), .cs_regen(c7a4));
  cs_compressor #(.N(10), .K(3), .SUB(1'b0)) u10a3 (.out_vec(stim[9:0]), .cs_regen(c10a3));
  cs_compressor #(.N(10), .K(4), .SUB(1'b1)) u10s4 (.out_vec(stim[9:0]), .cs_regen(c10s4));
  cs_compressor #(.N(12), .K(3), .SUB(1'b0)) u12a3 (.out_vec(stim),      .cs_regen(c12a3));
  cs_compressor #(.N(12), .K(3), .SUB(1'b1)) u12s3 (.out_vec(stim),      .cs_regen(c12s3));
  cs_compressor #(.N(12), .K(4), .SUB(1'b0)) u12a4 (.out_vec(stim),      .cs_regen(c12a4));

  task automatic check(string name, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s stim=%b got=%0d exp=%0d", name, stim, got, exp);
    end
  endtask

  function automatic longint r(int x, int n, int k, bit sub);
    vec_t v = vec_t'(x) & ((vec_t'(1) << n) - 1);
    return longint'(ref_compress(v, n, k, sub));
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int add_cnt [8];
  int sub_cnt [8];
  int add_sym [16];
  int sub_sym [16];
  int add_hd  [8];
  int sub_hd  [8];
  int exp_add [8] = '{1, 2, 3, 4, 3, 2, 1, 0};
  int exp_sub [8] = '{0, 1, 2, 3, 4, 3, 2, 1};

  initial begin
    // Worked examples.
    @(negedge clk); stim = 12'b0000_0100110; #1;
    check("example n=7", c7a3, 3'b001);
    @(negedge clk); stim = 12'b00_1011010001; #1;
    check("example n=10", c10a3, 3'b101);

    // Symbol distribution for n = 4, k = 3.
    for (int s = 0; s < 8; s++) begin
      add_cnt[s] = 0; sub_cnt[s] = 0; add_hd[s] = 99; sub_hd[s] = 99;
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); stim = 12'(i); #1;
      add_sym[i] = int'(c4a);
      sub_sym[i] = int'(c4s);
      add_cnt[c4a]++;
      sub_cnt[c4s]++;
    end
    for (int i = 0; i < 16; i++)
      for (int j = i + 1; j < 16; j++) begin
        if (add_sym[i] == add_sym[j] && $countones(i ^ j) < add_hd[add_sym[i]])
          add_hd[add_sym[i]] = $countones(i ^ j);
        if (sub_sym[i] == sub_sym[j] && $countones(i ^ j) < sub_hd[sub_sym[i]])
          sub_hd[sub_sym[i]] = $countones(i ^ j);
      end
    for (int s = 0; s < 8; s++) begin
      check($sformatf("Add count of symbol %0d", s), add_cnt[s], exp_add[s]);
      check($sformatf("Sub count of symbol %0d", s), sub_cnt[s], exp_sub[s]);
      if (exp_add[s] >= 2) check($sformatf("Add distance of symbol %0d", s), add_hd[s], 2);
      if (exp_sub[s] >= 2) check($sformatf("Sub distance of symbol %0d", s), sub_hd[s], 2);
    end

    // Every input against the reference model.
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk); stim = 12'(i); #1;
      if (i < 128) begin
        check("n7 add k3", c7a3, r(i, 7, 3, 1'b0));
        check("n7 sub k3", c7s3, r(i, 7, 3, 1'b1));
        check("n7 add k4", c7a4, r(i, 7, 4, 1'b0));
      end
      if (i < 1024) begin
        check("n10 add k3", c10a3, r(i, 10, 3, 1'b0));
        check("n10 sub k4", c10s4, r(i, 10, 4, 1'b1));
      end
      check("n12 add k3", c12a3, r(i, 12, 3, 1'b0));
      check("n12 sub k3", c12s3, r(i, 12, 3, 1'b1));
      check("n12 add k4", c12a4, r(i, 12, 4, 1'b0));
    end

    // Full-adder count of the chain.
    check("FA n6 k3",  fa_count(6, 3),  5);
    check("FA n12 k3", fa_count(12, 3), 15);
    check("FA n28 k3", fa_count(28, 3), 32);
    check("FA n54 k3", fa_count(54, 3), 59);
    check("FA n6 k4",  fa_count(6, 4),  3);
    check("FA n12 k4", fa_count(12, 4), 13);
    check("FA n28 k4", fa_count(28, 4), 30);
    check("FA n54 k4", fa_count(54, 4), 57);
    check("stages n7 k3", num_stages(7, 3), 3);
    check("stages n10 k3", num_stages(10, 3), 3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
