// sdls_ref_pkg - reference model of the five-state GF(2^3) example machine,
// for the testbenches.
//
// The next state is found the way the predecessor table is read: for each
// final state and input symbol there is a list of previous states; the
// machine moves to the final state whose list for the applied symbol holds
// the present state. A pair found in no list (and every symbol e_4..e_7)
// leads to S0, which is what the circuit does with its unused T-gate inputs
// tied to 0. The state codes are V2 V1 V0 = S0 000, S1 001, S2 010, S3 100,
// S6 011.
package sdls_ref_pkg;

  typedef enum int { R_S0, R_S1, R_S2, R_S3, R_S6 } rstate_t;

  localparam int NUM_RSTATES = 5;

  function automatic logic [2:0] rcode(rstate_t s);
    case (s)
      R_S0: return 3'b000;
      R_S1: return 3'b001;
      R_S2: return 3'b010;
      R_S3: return 3'b100;
      default: return 3'b011;   // R_S6
    endcase
  endfunction

  function automatic int rnum(rstate_t s);   // printed state number
    case (s)
      R_S0: return 0;
      R_S1: return 1;
      R_S2: return 2;
      R_S3: return 3;
      default: return 6;
    endcase
  endfunction

  // Predecessor table: is 'prev' listed under final state 'fin', input 'sym'?
  function automatic bit listed(rstate_t fin, int sym, rstate_t prev);
    case (fin)
      R_S0: case (sym)
              2: return prev inside {R_S0, R_S3};
              3: return prev inside {R_S1, R_S2};
              default: return 1'b0;
            endcase
      R_S1: case (sym)
              0: return prev inside {R_S1, R_S2};
              1: return prev inside {R_S0, R_S3, R_S6};
              default: return 1'b0;
            endcase
      R_S2: case (sym)
              0: return prev inside {R_S0, R_S6};
              1: return prev inside {R_S1, R_S2};
              default: return 1'b0;
            endcase
      R_S3: return (sym == 3) && (prev inside {R_S0, R_S3, R_S6});
      default: return (sym == 2) && (prev inside {R_S1, R_S2});   // R_S6
    endcase
  endfunction

  // Next state; 'defined' is 1 when the pair appears in the table.
  function automatic rstate_t rnext(rstate_t cur, int sym, output bit defined);
    defined = 1'b0;
    for (int f = 0; f < NUM_RSTATES; f++) begin
      if (listed(rstate_t'(f), sym, cur)) begin
        defined = 1'b1;
        return rstate_t'(f);
      end
    end
    return R_S0;
  endfunction

endpackage
