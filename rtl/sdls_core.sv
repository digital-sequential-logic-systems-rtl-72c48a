// sdls_core - general structure of a sequential logic system built from
// T-gates and a decoder, over GF(P^M).
//
// One T-gate per state digit V_k (k = M-1..0). All T-gates share the control
// digit code ctrl, which carries the present input symbol. Input I_i of the
// T-gate for V_k receives the value that digit V_k of the next state must
// take when the input symbol is number i, expressed as a function of the
// present state (the sum of the present-state indicators of all predecessor
// states, per the state equation). At each rising clock edge every T-gate
// stores its selected input, so the M stored digits become the next state
// code. The decoder D turns the stored code into P^M one-hot lines Z_j, the
// present-state indicators, from which the caller builds the T-gate inputs
// and the output function.
//
// Interface: tg_in[k][i] is input I_i of the T-gate for V_k; v is the present
// state code (V_{M-1}..V_0); lines[j] is decoder output Z_j. Timing: one
// state step per clock, synchronous active-low reset to code 0 (all digits
// 0). The arrangement (M T-gates sharing a control code and feeding one
// decoder) follows the block diagram of the machine; the use of clock edges
// for the state step and the reset are this design's choices.
module sdls_core #(
  parameter int unsigned P = 2,
  parameter int unsigned M = 3,
  localparam int unsigned N  = P ** M,
  localparam int unsigned DW = sdls_pkg::digit_width(P)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [M-1:0][DW-1:0]          ctrl,   // control digit code (input symbol)
  input  logic [M-1:0][N-1:0][DW-1:0]   tg_in,  // T-gate data inputs
  output logic [M-1:0][DW-1:0]          v,      // present state digit code
  output logic [N-1:0]                  lines   // decoder lines Z_0..Z_{N-1}
);

  for (genvar k = 0; k < int'(M); k++) begin : g_tg
    t_gate #(.P(P), .M(M), .REG_OUT(1'b1)) u_tg (
      .clk    (clk),
      .rst_n  (rst_n),
      .i_data (tg_in[k]),
      .ctrl   (ctrl),
      .z      (v[k])
    );
  end

  digit_decoder #(.P(P), .M(M)) u_dec (
    .v     (v),
    .lines (lines)
  );

endmodule
