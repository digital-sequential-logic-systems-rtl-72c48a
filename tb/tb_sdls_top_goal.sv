// tb_sdls_top_goal - end-to-end test of the five-state GF(2^3) example machine
// with the output taken from the two double-circled goal states of the state
// diagram, Z = S2 + S6 (Z_LINES = 8'b0000_1100).
//
// Same stimulus, reference model and coverage counts as tb_sdls_top; only
// the expected output function differs.
module tb_sdls_top_goal;

  import sdls_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] in_sym;
  logic [2:0] state_code;
  logic [7:0] state_lines;
  logic       z;
  int         checks = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  sdls_top #(.Z_LINES(8'b0000_1100)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_sym(in_sym),
    .state_code(state_code), .state_lines(state_lines), .z(z));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0d expected %0d", what, $time, got, exp);
    end
  endtask

  rstate_t cur, nxt;
  bit      defd;
  int      sym;
  int      pair_hits [NUM_RSTATES][4];
  int      unlisted_hits = 0, high_sym_hits = 0, reset_hits = 0;
  int      z1_hits = 0, z0_hits = 0;

  task automatic check_state(rstate_t s);
    logic [2:0] c;
    c = rcode(s);
    check("state code", int'(state_code), int'(c));
    check("decoder lines", int'(state_lines), 1 << int'(c));
    check("output Z", int'(z), (s inside {R_S2, R_S6}) ? 1 : 0);
    if (z) z1_hits++; else z0_hits++;
  endtask

  initial begin
    foreach (pair_hits[i, j]) pair_hits[i][j] = 0;
    rst_n  = 1'b0;
    in_sym = 3'd0;
    @(posedge clk);
    #1;
    rst_n = 1'b1;
    cur = R_S0;
    check_state(cur);

    for (int t = 0; t < 4000; t++) begin
      if ($urandom_range(0, 79) == 0) begin
        if (cur != R_S0) reset_hits++;
        rst_n  = 1'b0;
        in_sym = 3'($urandom);
        @(posedge clk);
        #1;
        rst_n = 1'b1;
        cur = R_S0;
      end else begin
        sym = ($urandom_range(0, 9) == 0) ? $urandom_range(4, 7) : $urandom_range(0, 3);
        in_sym = 3'(sym);
        nxt = rnext(cur, sym, defd);
        if (sym >= 4) high_sym_hits++;
        else if (defd) pair_hits[cur][sym]++;
        else unlisted_hits++;
        @(posedge clk);
        #1;
        cur = nxt;
      end
      check_state(cur);
    end

    // Every listed transition must have been taken.
    for (int s = 0; s < NUM_RSTATES; s++) begin
      for (int i = 0; i < 4; i++) begin
        bit d;
        void'(rnext(rstate_t'(s), i, d));
        if (d) begin
          checks++;
          if (pair_hits[s][i] == 0) begin
            failures++;
            $display("FAIL transition S%0d --e%0d--> never taken", rnum(rstate_t'(s)), i);
          end
        end
      end
    end
    checks += 5;
    if (unlisted_hits == 0) begin failures++; $display("FAIL no unlisted pair applied"); end
    if (high_sym_hits == 0) begin failures++; $display("FAIL no symbol e4..e7 applied"); end
    if (reset_hits == 0)    begin failures++; $display("FAIL no reset from a non-start state"); end
    if (z1_hits == 0)       begin failures++; $display("FAIL Z never 1"); end
    if (z0_hits == 0)       begin failures++; $display("FAIL Z never 0"); end
    $display("unlisted=%0d high_sym=%0d resets=%0d z1=%0d z0=%0d",
             unlisted_hits, high_sym_hits, reset_hits, z1_hits, z0_hits);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
