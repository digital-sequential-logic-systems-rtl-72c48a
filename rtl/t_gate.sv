// t_gate - the T-gate building block over GF(P^M).
//
// The T-gate has P^M data inputs I_0..I_{P^M-1}, each one P-valued digit, and
// a control digit code a_{M-1}..a_0 of M P-valued digits. It passes input
// I_j to its output Z, where j = sum(a_k * P^k) is the value of the control
// code read as a base-P number. A control digit outside 0..P-1 (possible
// only when P is not a power of two) selects nothing and gives Z = 0.
//
// With REG_OUT = 1 (the default, as used in the sequential machines) the
// output is held in a register that takes the selected input at each rising
// clock edge, so Z(t+1) = I_{a(t)}(t); this register is the state store of
// one state digit. It resets synchronously (rst_n low) to digit 0. With
// REG_OUT = 0 the gate is a pure selector and clk/rst_n are unused.
//
// The selecting function, the input count P^M and the M-digit control code
// come from the description of the building block; the output register, its
// reset value and the binary wire encoding of a digit are choices of this
// design.
module t_gate #(
  parameter int unsigned P       = 2,
  parameter int unsigned M       = 3,
  parameter bit          REG_OUT = 1'b1,
  localparam int unsigned N  = P ** M,
  localparam int unsigned DW = sdls_pkg::digit_width(P)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0][DW-1:0]  i_data,  // I_0 .. I_{N-1}
  input  logic [M-1:0][DW-1:0]  ctrl,    // a_{M-1} .. a_0
  output logic [DW-1:0]         z
);

  logic [DW-1:0] sel;

  // Base-P value of the control code; N (out of range) for an invalid digit.
  function automatic int unsigned code_index(logic [M-1:0][DW-1:0] code);
    int unsigned idx = 0;
    for (int k = M - 1; k >= 0; k--) begin
      if (int'(code[k]) >= int'(P)) return N;
      idx = idx * P + int'(code[k]);
    end
    return idx;
  endfunction

  always_comb begin
    sel = '0;
    for (int j = 0; j < int'(N); j++) begin
      if (code_index(ctrl) == j) sel = i_data[j];
    end
  end

  if (REG_OUT) begin : g_reg
    always_ff @(posedge clk) begin
      if (!rst_n) z <= '0;
      else        z <= sel;
    end
  end else begin : g_comb
    assign z = sel;
  end

endmodule
