// sdls_pkg - types and constants shared by the T-gate sequential logic blocks.
//
// A P-valued digit (an element of GF(P)) is carried on DW = digit_width(P)
// wires as an unsigned binary number 0..P-1; for P = 2 that is one wire. A
// digit code of m digits is a packed array [m-1:0] of such digits, element
// [m-1] being the most significant digit (MSD) and [0] the least significant
// (LSD). The code selects line / input number sum(a_k * P^k).
//
// The state codes of the GF(2^3) example machine follow the state
// assignment table of that example (S0=000, S1=001, S2=010, S3=100,
// S6=011, written V2 V1 V0). Using the digit's binary value as the wire
// encoding and the base-P value of a code as its line number are choices
// of this design.
package sdls_pkg;

  // Number of wires that carry one P-valued digit.
  function automatic int unsigned digit_width(int unsigned p);
    return (p <= 2) ? 1 : $clog2(p);
  endfunction

  // GF(2^3) example machine
  localparam int unsigned EX_P = 2;
  localparam int unsigned EX_M = 3;

  typedef logic [EX_M-1:0] ex_code_t;   // V2 V1 V0

  localparam ex_code_t CODE_S0 = 3'b000;
  localparam ex_code_t CODE_S1 = 3'b001;
  localparam ex_code_t CODE_S2 = 3'b010;
  localparam ex_code_t CODE_S3 = 3'b100;
  localparam ex_code_t CODE_S6 = 3'b011;

endpackage
