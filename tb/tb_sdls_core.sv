// tb_sdls_core - self-checking test of the T-gate/decoder state structure.
//
// Two instances, GF(2^3) and GF(3^2). Each cycle random T-gate data inputs
// and a random control code are applied; after the clock edge the state code
// must equal, digit by digit, the data input that the control code selects
// in each T-gate (one state step per clock), and the decoder lines must be
// the one-hot image of the state code. Reset must give code 0 and line Z_0.
module tb_sdls_core;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [2:0][0:0]      c2;
  logic [2:0][7:0][0:0] t2;
  logic [2:0][0:0]      v2;
  logic [7:0]           l2;

  logic [1:0][1:0]      c3;
  logic [1:0][8:0][1:0] t3;
  logic [1:0][1:0]      v3;
  logic [8:0]           l3;

  sdls_core #(.P(2), .M(3)) u_bin (
    .clk(clk), .rst_n(rst_n), .ctrl(c2), .tg_in(t2), .v(v2), .lines(l2));
  sdls_core #(.P(3), .M(2)) u_tern (
    .clk(clk), .rst_n(rst_n), .ctrl(c3), .tg_in(t3), .v(v3), .lines(l3));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int e2 [3];
  int e3 [2];
  int n;

  initial begin
    rst_n = 1'b0;
    c2 = '1;
    t2 = '1;
    c3 = '0;
    t3 = '0;
    @(posedge clk);
    #1;
    check("binary reset code", int'(v2), 0);
    check("binary reset line", int'(l2), 1);
    check("ternary reset code", int'(v3), 0);
    check("ternary reset line", int'(l3), 1);
    rst_n = 1'b1;

    for (int t = 0; t < 500; t++) begin
      c2 = 3'($urandom);
      t2 = 24'($urandom);
      n = 4 * int'(c2[2]) + 2 * int'(c2[1]) + int'(c2[0]);
      for (int k = 0; k < 3; k++) e2[k] = int'(t2[k][n]);

      for (int k = 0; k < 2; k++) begin
        c3[k] = 2'($urandom_range(0, 2));
        for (int i = 0; i < 9; i++) t3[k][i] = 2'($urandom_range(0, 2));
      end
      n = 3 * int'(c3[1]) + int'(c3[0]);
      for (int k = 0; k < 2; k++) e3[k] = int'(t3[k][n]);

      @(posedge clk);
      #1;
      check("binary next code", int'(v2), 4 * e2[2] + 2 * e2[1] + e2[0]);
      check("binary lines", int'(l2), 1 << (4 * e2[2] + 2 * e2[1] + e2[0]));
      check("ternary next code V1", int'(v3[1]), e3[1]);
      check("ternary next code V0", int'(v3[0]), e3[0]);
      check("ternary lines", int'(l3), 1 << (3 * e3[1] + e3[0]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
