// tb_digit_decoder - self-checking test of decoder D.
//
// Exhaustive over all codes for GF(2^3) (8 lines) and for GF(3^2) (9 lines,
// 2-bit digits, including the unused digit value 3, which must drive no
// line). The expected line number is the code read in base P.
module tb_digit_decoder;

  int checks = 0;
  int failures = 0;

  logic [2:0][0:0] v8;
  logic [7:0]      l8;
  logic [1:0][1:0] v9;
  logic [8:0]      l9;

  digit_decoder #(.P(2), .M(3)) u_bin  (.v(v8), .lines(l8));
  digit_decoder #(.P(3), .M(2)) u_tern (.v(v9), .lines(l9));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < 8; c++) begin
      v8 = 3'(c);
      #1;
      check("GF(2^3) decode", int'(l8), 1 << c);
    end
    for (int hi = 0; hi < 4; hi++) begin
      for (int lo = 0; lo < 4; lo++) begin
        v9[1] = 2'(hi);
        v9[0] = 2'(lo);
        #1;
        if (hi < 3 && lo < 3) check("GF(3^2) decode", int'(l9), 1 << (3 * hi + lo));
        else                  check("GF(3^2) invalid digit", int'(l9), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
