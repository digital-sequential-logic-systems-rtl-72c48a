// tb_gfp_adder - self-checking test of the GF(P) adder.
//
// GF(2) with 3 inputs, exhaustive (the result must be the parity); GF(3)
// with 4 inputs and GF(5) with 3 inputs, random digits in 0..P-1, compared
// with the integer sum taken mod P.
module tb_gfp_adder;

  int checks = 0;
  int failures = 0;

  logic [2:0][0:0] a2;
  logic [0:0]      s2;
  logic [3:0][1:0] a3;
  logic [1:0]      s3;
  logic [2:0][2:0] a5;
  logic [2:0]      s5;

  gfp_adder #(.P(2), .N_IN(3)) u_p2 (.a(a2), .sum(s2));
  gfp_adder #(.P(3), .N_IN(4)) u_p3 (.a(a3), .sum(s3));
  gfp_adder #(.P(5), .N_IN(3)) u_p5 (.a(a5), .sum(s5));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int tot;
    for (int c = 0; c < 8; c++) begin
      a2 = 3'(c);
      #1;
      check("GF(2) sum", int'(s2), $countones(3'(c)) % 2);
    end
    for (int t = 0; t < 300; t++) begin
      tot = 0;
      for (int i = 0; i < 4; i++) begin
        a3[i] = 2'($urandom_range(0, 2));
        tot += int'(a3[i]);
      end
      #1;
      check("GF(3) sum", int'(s3), tot % 3);
      tot = 0;
      for (int i = 0; i < 3; i++) begin
        a5[i] = 3'($urandom_range(0, 4));
        tot += int'(a5[i]);
      end
      #1;
      check("GF(5) sum", int'(s5), tot % 5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
