// cs_compressor -- chain of compression stages that turns an N-bit output vector
// into a K-bit regenerated check symbol (the adder chain of the proposed
// structure).
//
// Stage s takes the w-bit result of stage s-1, splits it into halves and adds or
// subtracts them (see cs_stage), giving ceil(w/2)+1 bits. Stages are added while
// the width is above K; for K = 3 or 4 the chain always ends at exactly K bits.
// If the last stage, or the vector itself, is narrower than K, the result is
// zero-extended to K bits; that corner is this design's choice. All stages use the
// same operation (SUB = 0: add, SUB = 1: subtract). K must be at least 3, because
// a 3-bit stage input gives a 3-bit output.
//
// Combinational; the depth is num_stages(N, K) adders.
module cs_compressor
  import sc_pkg::*;
#(
  parameter int unsigned N   = 7,
  parameter int unsigned K   = 3,
  parameter bit          SUB = 1'b0
) (
  input  logic [N-1:0] out_vec,
  output logic [K-1:0] cs_regen
);

  localparam int unsigned NS = num_stages(N, K);
  localparam int unsigned WF = width_at(N, NS);

  // v[s] holds the value entering stage s in its low width_at(N,s) bits.
  logic [N-1:0] v [NS+1];

  assign v[0] = out_vec;

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int unsigned WI = width_at(N, s);
    localparam int unsigned WO = stage_out_width(WI);
    logic [WO-1:0] so;

    cs_stage #(.W(WI), .SUB(SUB)) u_stage (
      .din  (v[s][WI-1:0]),
      .dout (so)
    );

    assign v[s+1] = N'(so);
  end

  assign cs_regen = K'(v[NS][WF-1:0]);

  initial begin
    assert (K >= 3) else $error("cs_compressor: K must be at least 3");
  end

endmodule
