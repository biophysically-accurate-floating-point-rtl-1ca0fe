// fp_mul_tb: checks the floating point multiplier bit-exactly against the
// double precision product rounded to single (the product of two singles is
// exact in double), including zeros, overflow and underflow, and the 8-cycle
// latency with one operation per cycle.
module fp_mul_tb;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid;
  logic [31:0] opa = 0, opb = 0, res;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fp_mul dut (.*);

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
    if (res !== e && !(res[30:0] == 0 && e[30:0] == 0)) begin
      failures++;
      $display("FAIL mul: got %h exp %h", res, e);
    end
    checks++;
    if (cyc - ic != 8) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  task automatic push(logic [31:0] a, logic [31:0] b);
    opa <= a; opb <= b; in_valid <= 1;
    expq.push_back(r2f(f2r(a) * f2r(b)));
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(32'h3FC00000, 32'h40000000);  // 1.5 * 2
    push(32'h00000000, 32'h40000000);  // 0 * 2
    push(32'hBF800000, 32'h3F800000);  // -1 * 1
    push(32'h7F000000, 32'h40000000);  // overflow
    push(32'h00800000, 32'h3F000000);  // underflow to zero
    push(32'h3FFFFFFF, 32'h3FFFFFFF);  // carry on rounding
    for (int i = 0; i < 3000; i++) push(rand_f(70, 180), rand_f(70, 180));
    in_valid <= 0;
    repeat (20) @(posedge clk);
    if (expq.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
