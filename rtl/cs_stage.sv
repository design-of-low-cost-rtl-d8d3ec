// cs_stage -- one compression stage of the check-symbol regenerator (one "adder"
// box of the chain).
//
// The W-bit input is split into an upper part A of WA = ceil(W/2) bits and a lower
// part B of WB = floor(W/2) bits. With SUB = 0 the stage outputs A + B; with
// SUB = 1 it outputs A - B + 2**WA, which is what an adder gives when B is
// zero-extended to WA bits, inverted and added with a carry-in of 1, the carry-out
// being kept as the top bit. Either way the result is WA+1 bits wide and never
// overflows. Splitting, carry keeping and the add/subtract choice follow the
// scheme; the exact subtract offset (2**WA) is this design's reading of how an
// adder subtracts, and it reproduces the published distribution of symbols for
// n = 4, k = 3.
//
// Purely combinational: the output follows the input in the same cycle. The
// adder is WA full adders wide.
module cs_stage #(
  parameter int unsigned W   = 7,
  parameter bit          SUB = 1'b0,
  localparam int unsigned WA = (W + 1) / 2,
  localparam int unsigned WB = W / 2,
  localparam int unsigned WO = WA + 1
) (
  input  logic [W-1:0]  din,
  output logic [WO-1:0] dout
);

  logic [WA-1:0] a;        // upper part
  logic [WA-1:0] b;        // lower part, zero-extended to WA bits
  logic [WA-1:0] b_op;     // second adder operand
  logic          cin;

  always_comb begin
    a    = din[W-1 -: WA];
    b    = WA'(din[WB-1:0]);
    b_op = SUB ? ~b : b;
    cin  = SUB;
    dout = {1'b0, a} + {1'b0, b_op} + WO'(cin);
  end

  initial begin
    assert (W >= 2) else $error("cs_stage: W must be at least 2");
  end

endmodule
