// gfp_adder - addition in GF(P) of N_IN P-valued digits.
//
// sum = (a_0 + a_1 + ... + a_{N_IN-1}) mod P. For P = 2 this is the
// exclusive-or of the inputs. In the sequential machines it forms the state
// sums (S_a + S_b + ...) that feed a T-gate input, and the output function
// from decoded state lines; as at most one state line is 1 at a time, the
// sum of indicators is 1 exactly when the machine is in one of the summed
// states. Inputs are reduced mod P first, so a digit outside 0..P-1 is
// read as its residue. Purely combinational.
module gfp_adder #(
  parameter int unsigned P    = 2,
  parameter int unsigned N_IN = 2,
  localparam int unsigned DW = sdls_pkg::digit_width(P)
) (
  input  logic [N_IN-1:0][DW-1:0] a,
  output logic [DW-1:0]           sum
);

  function automatic logic [DW-1:0] sum_mod_p(logic [N_IN-1:0][DW-1:0] x);
    int unsigned acc = 0;
    for (int i = 0; i < int'(N_IN); i++) begin
      acc = (acc + (int'(x[i]) % P)) % P;
    end
    return DW'(acc);
  endfunction

  assign sum = sum_mod_p(a);

endmodule
