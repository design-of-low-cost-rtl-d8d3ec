// trc_tree -- P-pair two-rail checker built as a tree of trc2 cells.
//
// Pair i is (a[i], b[i]). Each level combines neighbouring pairs two at a time in
// trc2 cells; an odd pair left over at a level is passed to the next level
// unchanged. After clog2(P) levels one pair (f,g) remains: it is a code word (01
// or 10) exactly when every input pair is a code word. The tree needs P-1 trc2
// cells. Building larger checkers from the 2-bit cell is the standard
// construction; the tree shape is this design's choice.
//
// Combinational, clog2(P) cell delays deep.
module trc_tree #(
  parameter int unsigned P = 6
) (
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic         f,
  output logic         g
);

  localparam int unsigned NL = (P > 1) ? $clog2(P) : 0;

  // Number of pairs at level l: ceil(P / 2**l).
  function automatic int unsigned pairs_at(int unsigned l);
    return (P + (1 << l) - 1) >> l;
  endfunction

  logic [P-1:0] la [NL+1];
  logic [P-1:0] lb [NL+1];

  assign la[0] = a;
  assign lb[0] = b;

  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int unsigned CI = pairs_at(l);
    localparam int unsigned CO = pairs_at(l + 1);

    for (genvar i = 0; i < CI / 2; i++) begin : g_cell
      trc2 u_cell (
        .a1 (la[l][2*i]),
        .b1 (lb[l][2*i]),
        .a2 (la[l][2*i+1]),
        .b2 (lb[l][2*i+1]),
        .f  (la[l+1][i]),
        .g  (lb[l+1][i])
      );
    end

    if (CI % 2 == 1) begin : g_pass
      assign la[l+1][CO-1] = la[l][CI-1];
      assign lb[l+1][CO-1] = lb[l][CI-1];
    end

    if (CO < P) begin : g_unused
      assign la[l+1][P-1:CO] = '0;
      assign lb[l+1][P-1:CO] = '0;
    end
  end

  assign f = la[NL][0];
  assign g = lb[NL][0];

endmodule
