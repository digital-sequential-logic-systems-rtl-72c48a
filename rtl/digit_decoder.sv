// digit_decoder - decoder D: M P-valued digits to P^M one-hot lines.
//
// Line Z_j is 1 exactly when the digit code V_{M-1}..V_0 has the base-P value
// j; all other lines are 0. In the sequential machines the input is the
// state digit code held by the T-gates and line Z_j is then the indicator of
// present state number j. A digit outside 0..P-1 (possible only when P is not
// a power of two) drives no line. Purely combinational.
//
// The decoder's place and its P^M outputs follow the block diagram of the
// machine; the line numbering by base-P value is this design's choice.
module digit_decoder #(
  parameter int unsigned P = 2,
  parameter int unsigned M = 3,
  localparam int unsigned N  = P ** M,
  localparam int unsigned DW = sdls_pkg::digit_width(P)
) (
  input  logic [M-1:0][DW-1:0] v,      // V_{M-1} .. V_0
  output logic [N-1:0]         lines   // Z_0 .. Z_{N-1}
);

  logic valid;

  // Base-P value of the code; N (out of range) for an invalid digit.
  function automatic int unsigned code_index(logic [M-1:0][DW-1:0] code);
    int unsigned idx = 0;
    for (int k = M - 1; k >= 0; k--) begin
      if (int'(code[k]) >= int'(P)) return N;
      idx = idx * P + int'(code[k]);
    end
    return idx;
  endfunction

  always_comb begin
    valid = (code_index(v) < N);
    for (int j = 0; j < int'(N); j++) begin
      lines[j] = (code_index(v) == j);
    end
  end

  // A valid code drives exactly one line.
  always_comb begin
    if (valid) assert ($onehot(lines)) else $error("decoder: lines not one-hot");
  end

endmodule
