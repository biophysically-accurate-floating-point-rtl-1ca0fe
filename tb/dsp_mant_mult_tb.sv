// dsp_mant_mult_tb: checks the four-slice mantissa multiplier against the
// exact 48-bit product for random and corner operands, one per cycle, and
// checks its 6-cycle latency.
module dsp_mant_mult_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid;
  logic [23:0] man_a = 0, man_b = 0;
  logic [49:0] prod;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  dsp_mant_mult dut (.*);

  logic [49:0] expq [$];
  int          issue_cyc [$];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [49:0] e;
    int ic;
    e  = expq.pop_front();
    ic = issue_cyc.pop_front();
    checks += 2;
    if (prod !== e) begin failures++; $display("FAIL prod %h exp %h", prod, e); end
    if (cyc - ic != 6) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  task automatic push(logic [23:0] a, logic [23:0] b);
    man_a <= a; man_b <= b; in_valid <= 1;
    expq.push_back(50'(a) * 50'(b));
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(24'hFFFFFF, 24'hFFFFFF);
    push(24'h800000, 24'h800000);
    push(24'h000FFF, 24'hFFF000);
    push(24'hFFF000, 24'h000FFF);
    for (int i = 0; i < 2000; i++) push(24'($urandom), 24'($urandom));
    in_valid <= 0;
    repeat (12) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
