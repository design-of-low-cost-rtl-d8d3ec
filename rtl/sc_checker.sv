// sc_checker -- checker of the low-cost self-checking structure.
//
// A functional circuit produces an N-bit output vector and a separate check
// symbol generator predicts a check symbol CS for it. This checker regenerates
// the symbol CS' from the output vector by repeatedly splitting it in halves and
// adding (or subtracting) them until K bits remain (cs_regenerator), then compares CS'
// with CS bit by bit in a two-rail checker (trc_tree). Pair i of the checker is
// (cs[i], ~cs_regen[i]), which is a two-rail code word exactly when the two bits
// agree; the inverters are this design's way of turning a comparison into two-rail
// pairs. The error indication (err_f, err_g) is 01 or 10 when CS' = CS and 00 or
// 11 when they differ, so a single stuck-at fault on the indication lines cannot
// hide an error.
//
// MODE selects Add(K), Sub(K) or Mix(2K); in Mix mode cs and cs_regen are 2K bits
// wide with the Add symbol in the low K bits. The defaults (N = 7, K = 3, Mix)
// match a 7-output circuit with the 6-bit mixed symbol. The functional circuit
// and the check symbol generator are outside this module: their outputs are its
// inputs. Purely combinational, no clock.
module sc_checker
  import sc_pkg::*;
#(
  parameter int unsigned N    = 7,
  parameter int unsigned K    = 3,
  parameter enc_mode_e   MODE = ENC_MIX,
  localparam int unsigned CSW = cs_width(MODE, K)
) (
  input  logic [N-1:0]   out_vec,
  input  logic [CSW-1:0] cs,
  output logic [CSW-1:0] cs_regen,
  output logic           err_f,
  output logic           err_g
);

  cs_regenerator #(.N(N), .K(K), .MODE(MODE)) u_regen (
    .out_vec  (out_vec),
    .cs_regen (cs_regen)
  );

  trc_tree #(.P(CSW)) u_trc (
    .a (cs),
    .b (~cs_regen),
    .f (err_f),
    .g (err_g)
  );

endmodule
