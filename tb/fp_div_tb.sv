// fp_div_tb: checks the floating point divider against double precision
// division rounded to single (at most 1 ulp apart), division by zero and
// zero dividends, the 26-cycle latency and that in_ready blocks a second
// operation while one is in flight.
module fp_div_tb;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, in_ready, out_valid;
  logic [31:0] opa = 0, opb = 0, res;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fp_div dut (.*);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [31:0] a, logic [31:0] b);
    logic [31:0] e;
    int c0;
    while (!in_ready) @(posedge clk);
    opa <= a; opb <= b; in_valid <= 1;
    c0 = cyc + 1;
    @(posedge clk);
    in_valid <= 0;
    checks++;
    #1;
    if (in_ready) begin failures++; $display("FAIL in_ready while busy"); end
    while (!out_valid) @(posedge clk);
    checks++;
    if (cyc - c0 != 26) begin failures++; $display("FAIL latency %0d", cyc - c0); end
    if (b[30:23] == 0) e = {a[31] ^ b[31], 8'hFF, 23'd0};
    else e = r2f(f2r(a) / f2r(b));
    checks++;
    if (ulps(res, e) > 1 && !(res[30:0] == 0 && e[30:0] == 0)) begin
      failures++;
      $display("FAIL div %h / %h: got %h exp %h", a, b, res, e);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(32'h40400000, 32'h40000000);   // 3 / 2
    run(32'h3F800000, 32'h40400000);   // 1 / 3
    run(32'h00000000, 32'h40400000);   // 0 / 3
    run(32'h3F800000, 32'h00000000);   // 1 / 0
    run(32'hC1200000, 32'h3F000000);   // -10 / 0.5
    for (int i = 0; i < 400; i++) run(rand_f(90, 160), rand_f(90, 160));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
