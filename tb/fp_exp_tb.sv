// fp_exp_tb: checks the CORDIC exponential against the real exp() over the
// range used by the neuron models (|x| up to about 80), requiring a relative
// error within 4 ulp, plus the special cases exp(0) = 1, overflow to
// infinity and underflow to zero, and the 170-cycle latency.
module fp_exp_tb;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, out_valid;
  logic [31:0] opa = 0, res;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fp_exp dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] a, logic [31:0] exp_bits, logic use_bits);
    int c0;
    real e;
    while (!in_ready) @(posedge clk);
    opa <= a; in_valid <= 1;
    c0 = cyc + 1;
    @(posedge clk);
    in_valid <= 0;
    while (!out_valid) @(posedge clk);
    checks++;
    if (cyc - c0 != 170) begin failures++; $display("FAIL latency %0d", cyc - c0); end
    checks++;
    if (use_bits) begin
      if (res !== exp_bits) begin failures++; $display("FAIL exp(%h) = %h, exp %h", a, res, exp_bits); end
    end else begin
      e = $exp(f2r(a));
      if (ulps(res, r2f(e)) > 4) begin
        failures++;
        $display("FAIL exp(%g) = %g, exp %g", f2r(a), f2r(res), e);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(32'h00000000, 32'h3F800000, 1);   // exp(0) = 1
    run(32'h43000000, 32'h7F800000, 1);   // exp(128) = inf
    run(32'hC3000000, 32'h00000000, 1);   // exp(-128) = 0
    run(32'h3F800000, 0, 0);              // exp(1)
    run(32'hBF800000, 0, 0);              // exp(-1)
    for (int i = 0; i < 150; i++) begin
      real x;
      x = (real'($urandom_range(160000)) - 80000.0) / 1000.0;
      run(r2f(x), 0, 0);
    end
    for (int i = 0; i < 50; i++) run(rand_f(100, 126), 0, 0);  // small arguments
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
