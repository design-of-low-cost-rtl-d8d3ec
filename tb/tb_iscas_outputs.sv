// tb_iscas_outputs -- checkers sized for the output counts of the ISCAS-85
// combinational benchmarks, run on random output vectors with random errors.
//
// The ten benchmark circuits have 7, 22, 25, 26, 32, 107, 123 and 140 outputs
// (C432; C3540; C1908; C880; C499, C1355 and C6288; C7552; C5315; C2670). For each
// width a Mix(6) checker (k = 3) and a Mix(8) checker (k = 4) are built. Each sees
// 10000 random fault-free vectors v with CS = reference(v), then the same vector
// with 1 to 4 randomly chosen bits flipped. The indication must be a code word for
// v and must flag the corrupted vector exactly when the reference symbols differ.
// The fraction of corrupted vectors caught by the Add half, the Sub half and the
// whole Mix symbol is printed per width. Two trends are checked as well: Mix
// catches at least what each half catches, and Mix(8) catches more than Mix(6). The benchmark netlists themselves are not
// modelled, so these are detection rates for random errors of small weight, not
// for stuck-at faults inside the circuits.
module tb_iscas_outputs;
  import sc_pkg::*;
  import tb_ref_pkg::*;

  localparam int NW = 8;
  localparam int WIDTHS [NW] = '{7, 22, 25, 26, 32, 107, 123, 140};
  localparam int VECTORS = 10000;

  int checks = 0, failures = 0, done = 0;
  int mix_det [NW][2];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2 * VECTORS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t random_vec(int n);
    vec_t v = '0;
    for (int i = 0; i < 8; i++) v[i*32 +: 32] = $urandom;
    return v & ((vec_t'(1) << n) - 1);
  endfunction

  for (genvar w = 0; w < NW; w++) begin : g_width
    for (genvar kk = 3; kk <= 4; kk++) begin : g_k
      localparam int N = WIDTHS[w];
      localparam int CSW = 2 * kk;

      logic [N-1:0]   out_vec;
      logic [CSW-1:0] cs, cs_regen;
      logic           err_f, err_g;

      sc_checker #(.N(N), .K(kk), .MODE(ENC_MIX)) dut (
        .out_vec  (out_vec),
        .cs       (cs),
        .cs_regen (cs_regen),
        .err_f    (err_f),
        .err_g    (err_g)
      );

      initial begin
        vec_t v, bad;
        logic [CSW-1:0] good_cs, bad_cs;
        int nflip, pos, det_add, det_sub, det_mix, local_fail;
        det_add = 0; det_sub = 0; det_mix = 0; local_fail = 0;
        for (int t = 0; t < VECTORS; t++) begin
          v       = random_vec(N);
          good_cs = CSW'(ref_cs(v, N, kk, 2));
          bad     = v;
          nflip   = 1 + int'($urandom_range(3));
          for (int f = 0; f < nflip; f++) begin
            pos = int'($urandom_range(N - 1));
            bad[pos] = ~bad[pos];
          end
          if (bad == v) bad[0] = ~bad[0];
          bad_cs = CSW'(ref_cs(bad, N, kk, 2));

          @(negedge clk);
          out_vec = N'(v);
          cs      = good_cs;
          #1;
          checks++;
          if (!(err_f ^ err_g) || cs_regen != good_cs) local_fail++;

          @(negedge clk);
          out_vec = N'(bad);
          #1;
          checks++;
          if ((err_f ^ err_g) != (bad_cs == good_cs)) local_fail++;
          det_add += int'(bad_cs[kk-1:0] != good_cs[kk-1:0]);
          det_sub += int'(bad_cs[CSW-1:kk] != good_cs[CSW-1:kk]);
          det_mix += int'(bad_cs != good_cs);
        end
        checks++;
        if (det_mix < det_add || det_mix < det_sub) local_fail++;
        mix_det[w][kk-3] = det_mix;
        failures += local_fail;
        $display("n=%3d  Add(%0d) %6.2f%%  Sub(%0d) %6.2f%%  Mix(%0d) %6.2f%%  mismatches=%0d",
                 N, kk, 100.0 * det_add / VECTORS, kk, 100.0 * det_sub / VECTORS,
                 CSW, 100.0 * det_mix / VECTORS, local_fail);
        done++;
      end
    end
  end

  initial begin
    wait (done == 2 * NW);
    for (int w = 0; w < NW; w++) begin
      checks++;
      if (mix_det[w][1] <= mix_det[w][0]) begin
        failures++;
        $display("FAIL n=%0d: Mix(8) caught %0d, Mix(6) caught %0d", WIDTHS[w], mix_det[w][1], mix_det[w][0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
