// cs_regenerator -- check-symbol regenerator for the three encoding schemes: Add(k),
// Sub(k) and Mix(2k).
//
// ENC_ADD and ENC_SUB use one compression chain (cs_compressor) whose stages all
// add or all subtract. ENC_MIX runs both chains on the same output vector and
// concatenates their results into a 2K-bit symbol; the Add result sits in the low
// K bits and the Sub result in the high K bits (the bit order is this design's
// choice). The regenerated symbol is CSW = cs_width(MODE, K) bits wide.
//
// Combinational.
module cs_regenerator
  import sc_pkg::*;
#(
  parameter int unsigned N    = 7,
  parameter int unsigned K    = 3,
  parameter enc_mode_e   MODE = ENC_MIX,
  localparam int unsigned CSW = cs_width(MODE, K)
) (
  input  logic [N-1:0]   out_vec,
  output logic [CSW-1:0] cs_regen
);

  if (MODE == ENC_MIX) begin : g_mix
    logic [K-1:0] cs_add, cs_sub;

    cs_compressor #(.N(N), .K(K), .SUB(1'b0)) u_add (
      .out_vec  (out_vec),
      .cs_regen (cs_add)
    );
    cs_compressor #(.N(N), .K(K), .SUB(1'b1)) u_sub (
      .out_vec  (out_vec),
      .cs_regen (cs_sub)
    );

    assign cs_regen = {cs_sub, cs_add};
  end else begin : g_single
    cs_compressor #(.N(N), .K(K), .SUB(MODE == ENC_SUB)) u_chain (
      .out_vec  (out_vec),
      .cs_regen (cs_regen)
    );
  end

endmodule
