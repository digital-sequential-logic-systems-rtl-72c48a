// tb_t_gate - self-checking test of the T-gate selector.
//
// Three instances: GF(2^3) with the output register (8 inputs, 3 binary
// control digits), the same without the register, and GF(3^2) without the
// register (9 ternary inputs on 2-bit digits, 2 control digits). Random data
// and control codes are applied; the expected output is the input whose
// number is the control code read in base P, worked out here from the flat
// data word. For the registered gate the output must show the selection of
// the previous cycle (one clock of latency) and must be 0 after reset. For
// GF(3^2), control digits equal to 3 must give 0.
module tb_t_gate;

  logic clk = 1'b0;
  logic rst_n;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  // GF(2^3)
  logic [7:0][0:0] d8;
  logic [2:0][0:0] c8;
  logic            z8r, z8c;

  t_gate #(.P(2), .M(3), .REG_OUT(1'b1)) u_reg (
    .clk(clk), .rst_n(rst_n), .i_data(d8), .ctrl(c8), .z(z8r));
  t_gate #(.P(2), .M(3), .REG_OUT(1'b0)) u_comb (
    .clk(clk), .rst_n(rst_n), .i_data(d8), .ctrl(c8), .z(z8c));

  // GF(3^2)
  logic [8:0][1:0] d9;
  logic [1:0][1:0] c9;
  logic [1:0]      z9;

  t_gate #(.P(3), .M(2), .REG_OUT(1'b0)) u_tern (
    .clk(clk), .rst_n(rst_n), .i_data(d9), .ctrl(c9), .z(z9));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref8(logic [7:0] data, logic [2:0] code);
    int n;
    n = 4 * int'(code[2]) + 2 * int'(code[1]) + int'(code[0]);
    return int'(data[n]);
  endfunction

  function automatic int ref9(logic [17:0] data, logic [3:0] code);
    int hi, lo;
    hi = int'(code[3:2]);
    lo = int'(code[1:0]);
    if (hi > 2 || lo > 2) return 0;
    return int'(data[2 * (3 * hi + lo) +: 2]);
  endfunction

  int exp_reg;
  int seen_invalid = 0;

  initial begin
    rst_n = 1'b0;
    d8 = '1;
    c8 = '0;
    d9 = '0;
    c9 = '0;
    @(posedge clk);
    #1;
    check("registered output after reset", int'(z8r), 0);
    rst_n = 1'b1;

    for (int t = 0; t < 400; t++) begin
      d8 = 8'($urandom);
      c8 = 3'($urandom);
      for (int i = 0; i < 9; i++) d9[i] = 2'($urandom_range(0, 2));
      c9 = 4'($urandom);
      if (c9[1] == 2'd3 || c9[0] == 2'd3) seen_invalid++;
      #1;
      check("GF(2^3) selector", int'(z8c), ref8(d8, c8));
      check("GF(3^2) selector", int'(z9), ref9(d9, c9));
      exp_reg = ref8(d8, c8);
      @(posedge clk);
      #1;
      check("GF(2^3) registered selector", int'(z8r), exp_reg);
    end

    // Exhaustive sweep of the GF(2^3) control code with one-hot data
    for (int s = 0; s < 8; s++) begin
      for (int c = 0; c < 8; c++) begin
        d8 = 8'(1 << s);
        c8 = 3'(c);
        #1;
        check("GF(2^3) one-hot sweep", int'(z8c), (s == c) ? 1 : 0);
      end
    end

    if (seen_invalid == 0) begin
      failures++;
      $display("FAIL invalid ternary control digit never applied");
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
