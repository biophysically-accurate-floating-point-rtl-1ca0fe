// fp_add_tb: checks the floating point adder/subtractor against double
// precision arithmetic rounded to single (at most 1 ulp apart, allowing for
// double rounding), including zeros, cancellation and large exponent gaps.
// Issues one operation per cycle and checks the 8-cycle latency.
module fp_add_tb;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, sub = 0, out_valid;
  logic [31:0] opa = 0, opb = 0, res;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fp_add dut (.*);

  logic [31:0] expq [$];
  int          issue_cyc [$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    int ic;
    e  = expq.pop_front();
    ic = issue_cyc.pop_front();
    checks++;
    if (ulps(res, e) > 1) begin
      failures++;
      $display("FAIL add: got %h exp %h", res, e);
    end
    checks++;
    if (cyc - ic != 8) begin
      failures++;
      $display("FAIL latency %0d", cyc - ic);
    end
  end

  task automatic push(logic [31:0] a, logic [31:0] b, logic s);
    real r;
    opa <= a; opb <= b; sub <= s; in_valid <= 1;
    r = s ? f2r(a) - f2r(b) : f2r(a) + f2r(b);
    expq.push_back(r2f(r));
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(32'h3F800000, 32'h40000000, 0);   // 1 + 2
    push(32'h3F800000, 32'h3F800000, 1);   // 1 - 1
    push(32'h00000000, 32'hC2C80000, 0);   // 0 + -100
    push(32'h4B800000, 32'h3F800000, 0);   // 2^24 + 1 (tie)
    push(32'h3F800001, 32'h3F800000, 1);   // cancellation
    push(32'h7F000000, 32'h7F000000, 0);   // overflow to inf
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] a, b;
      a = rand_f(100, 150);
      b = (i % 3 == 0) ? {1'($urandom), a[30:23], 23'($urandom)} : rand_f(100, 150);
      push(a, b, 1'($urandom));
    end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
