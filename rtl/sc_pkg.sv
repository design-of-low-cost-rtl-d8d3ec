// sc_pkg -- shared types and elaboration-time helpers for the output-compression
// self-checking scheme.
//
// The check symbol CS' is regenerated from an n-bit output vector by a chain of
// adder stages. Each stage splits its w-bit input into an upper part of ceil(w/2)
// bits and a lower part of floor(w/2) bits and adds (or subtracts) them, keeping
// the carry, so that it produces ceil(w/2)+1 bits. Stages repeat while the width
// is above the check-symbol length k. The functions below work out that width
// sequence, the number of stages and the number of full adders the chain needs
// (one full adder per bit of the upper part), which is how the scheme's checker
// cost is counted. The stopping rule for a chain that ends below k bits (the
// result is then zero-extended to k bits) and the enum encoding are choices of
// this design.
package sc_pkg;

  // Encoding scheme of the regenerated check symbol.
  //   ENC_ADD : every stage adds upper + lower                (k-bit symbol)
  //   ENC_SUB : every stage computes upper - lower + 2**wa    (k-bit symbol)
  //   ENC_MIX : an ADD chain and a SUB chain side by side     (2k-bit symbol,
  //             ADD result in the low k bits, SUB result in the high k bits)
  typedef enum logic [1:0] {
    ENC_ADD = 2'd0,
    ENC_SUB = 2'd1,
    ENC_MIX = 2'd2
  } enc_mode_e;

  // Upper bound on stages; a chain with k >= 3 never gets close to it.
  localparam int unsigned MAX_STAGES = 64;

  // Width produced by one stage with a w-bit input.
  function automatic int unsigned stage_out_width(int unsigned w);
    return (w + 1) / 2 + 1;
  endfunction

  // Number of adder stages needed to bring n bits down to at most k bits.
  function automatic int unsigned num_stages(int unsigned n, int unsigned k);
    int unsigned w = n;
    int unsigned s = 0;
    while (w > k && s < MAX_STAGES) begin
      w = stage_out_width(w);
      s++;
    end
    return s;
  endfunction

  // Width entering stage s (s = 0 is the output vector itself; s = num_stages
  // is the width of the final result before zero-extension to k bits).
  function automatic int unsigned width_at(int unsigned n, int unsigned s);
    int unsigned w = n;
    for (int unsigned i = 0; i < s; i++) w = stage_out_width(w);
    return w;
  endfunction

  // Full adders in one chain: ceil(w/2) per stage.
  function automatic int unsigned fa_count(int unsigned n, int unsigned k);
    int unsigned w = n;
    int unsigned c = 0;
    int unsigned s = 0;
    while (w > k && s < MAX_STAGES) begin
      c += (w + 1) / 2;
      w = stage_out_width(w);
      s++;
    end
    return c;
  endfunction

  // Length of the check symbol for a scheme with chain length k.
  function automatic int unsigned cs_width(enc_mode_e m, int unsigned k);
    return (m == ENC_MIX) ? 2 * k : k;
  endfunction

endpackage
