// fp_cmp_tb: checks the floating point comparator flags against real
// comparison for random numbers of both signs, equal pairs, pairs differing
// only in the mantissa, and +0/-0; checks the 1.0/0.0 result word and the
// 3-cycle latency with one comparison per cycle.
module fp_cmp_tb;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid, lt, eq, gt;
  logic [31:0] opa = 0, opb = 0, res;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fp_cmp dut (.*);

  logic [2:0] expq [$];
  int         issue_cyc [$];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [2:0] e;
    int ic;
    e  = expq.pop_front();
    ic = issue_cyc.pop_front();
    checks += 3;
    if ({lt, eq, gt} !== e) begin failures++; $display("FAIL cmp got %b exp %b", {lt, eq, gt}, e); end
    if (res !== (gt ? 32'h3F800000 : 32'h0)) begin failures++; $display("FAIL res word"); end
    if (cyc - ic != 3) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  task automatic push(logic [31:0] a, logic [31:0] b);
    real ra, rb;
    ra = f2r(a); rb = f2r(b);
    opa <= a; opb <= b; in_valid <= 1;
    expq.push_back({ra < rb, ra == rb, ra > rb});
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(32'h00000000, 32'h80000000);
    push(32'h3F800000, 32'h3F800000);
    push(32'hBF800000, 32'hBF800001);
    push(32'h3F800001, 32'h3F800000);
    push(32'hC0000000, 32'h3F800000);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] a, b;
      a = rand_f(100, 140);
      unique case (i % 4)
        0: b = a;
        1: b = {a[31:23], 23'($urandom)};
        2: b = {~a[31], a[30:0]};
        default: b = rand_f(100, 140);
      endcase
      push(a, b);
    end
    in_valid <= 0;
    repeat (8) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
