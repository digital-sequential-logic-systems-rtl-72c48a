// sdls_top - the five-state example machine over GF(2^3), built from three
// T-gates, a decoder and GF(2) adders.
//
// States S0, S1, S2, S3 and S6 carry the 3-bit codes V2 V1 V0 = 000, 001,
// 010, 100 and 011. The input symbol e_i (i = 0..7) is applied as the
// control digit code d2 d1 d0 = binary i; the machine uses e_0..e_3.
// Transitions (present state, input -> next state):
//   S0: e0->S2 e1->S1 e2->S0 e3->S3     S1: e0->S1 e1->S2 e2->S6 e3->S0
//   S2: e0->S1 e1->S2 e2->S6 e3->S0     S3: e1->S1 e2->S0 e3->S3
//   S6: e0->S2 e1->S1 e3->S3
// Every digit of the next state is one T-gate whose data inputs are sums of
// decoded present-state lines (next-state equations):
//   V2(t+1) = (S0+S3+S6)*I3
//   V1(t+1) = (S0+S6)*I0 + (S1+S2)*I1 + (S1+S2)*I2
//   V0(t+1) = (S1+S2)*I0 + (S0+S3+S6)*I1 + (S1+S2)*I2
// so three adders (S0+S3+S6, S0+S6, S1+S2) serve all three T-gates, and the
// T-gate inputs not named in an equation are tied to 0. A pair (state,
// input) with no transition in the list, an input e_4..e_7, or one of the
// unused codes 101, 110, 111 therefore leads to code 000, state S0.
//
// The output is the Moore function Z = sum of the decoder lines selected
// by Z_LINES; the default selects lines Z1 and Z2, Z = S1 + S2. Set
// Z_LINES = 8'b0000_1100 for Z = S2 + S6.
//
// Timing: in_sym is sampled at each rising edge of clk and the new state
// appears after that edge; z and the state outputs depend only on the
// present state. rst_n low at a rising edge puts the machine in the start
// state S0 (code 000).
//
// The state codes, the transitions, the next-state equations, the sharing
// of the adder outputs among the T-gates and the output Z = S1 + S2 follow
// the worked example; the binary input encoding, the reset, the handling of
// unlisted pairs (which is what the tied-off T-gate inputs give) and the
// Z_LINES option are this design's choices.
module sdls_top #(
  parameter logic [7:0] Z_LINES = 8'b0000_0110
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] in_sym,       // d2 d1 d0: input symbol number
  output logic [2:0] state_code,   // V2 V1 V0
  output logic [7:0] state_lines,  // decoder lines Z0..Z7
  output logic       z
);

  import sdls_pkg::*;

  localparam int unsigned P = EX_P;
  localparam int unsigned M = EX_M;
  localparam int unsigned N = P ** M;

  logic [M-1:0][N-1:0][0:0] tg_in;
  logic [M-1:0][0:0]        v;
  logic [N-1:0]             lines;

  // Present-state indicators
  logic s0, s1, s2, s3, s6;
  assign s0 = lines[CODE_S0];
  assign s1 = lines[CODE_S1];
  assign s2 = lines[CODE_S2];
  assign s3 = lines[CODE_S3];
  assign s6 = lines[CODE_S6];

  // State sums shared by the T-gate inputs
  logic sum_s0_s3_s6, sum_s0_s6, sum_s1_s2;

  gfp_adder #(.P(P), .N_IN(3)) u_add_036 (.a({s0, s3, s6}), .sum(sum_s0_s3_s6));
  gfp_adder #(.P(P), .N_IN(2)) u_add_06  (.a({s0, s6}),     .sum(sum_s0_s6));
  gfp_adder #(.P(P), .N_IN(2)) u_add_12  (.a({s1, s2}),     .sum(sum_s1_s2));

  // T-gate data inputs, I_7 down to I_0; inputs not in an equation are 0
  assign tg_in[2] = {4'b0000, sum_s0_s3_s6, 3'b000};                   // V2
  assign tg_in[1] = {5'b00000, sum_s1_s2, sum_s1_s2, sum_s0_s6};        // V1
  assign tg_in[0] = {5'b00000, sum_s1_s2, sum_s0_s3_s6, sum_s1_s2};     // V0

  sdls_core #(.P(P), .M(M)) u_core (
    .clk   (clk),
    .rst_n (rst_n),
    .ctrl  (in_sym),
    .tg_in (tg_in),
    .v     (v),
    .lines (lines)
  );

  // Output function: GF(2) sum of the selected decoder lines
  gfp_adder #(.P(P), .N_IN(N)) u_add_out (.a(lines & Z_LINES), .sum(z));

  assign state_code  = v;
  assign state_lines = lines;

endmodule
