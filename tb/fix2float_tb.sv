// fix2float_tb: checks fixed (Q15.16) to float conversion against the real
// value rounded to single, for random and corner codes, one per cycle, and
// the 3-cycle latency.
module fix2float_tb;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, out_valid;
  logic [31:0] fix_in = 0, res;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  fix2float dut (.*);

  logic [31:0] expq [$];
  int          issue_cyc [$];

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    int ic;
    e = expq.pop_front();
    ic = issue_cyc.pop_front();
    checks += 2;
    if (res !== e) begin failures++; $display("FAIL fix2float got %h exp %h", res, e); end
    if (cyc - ic != 3) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  task automatic push(logic [31:0] x);
    fix_in <= x; in_valid <= 1;
    expq.push_back(r2f(real'($signed(x)) / 65536.0));
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(32'h0); push(32'h00010000); push(32'hFFFF0000); push(32'h80000000); push(32'h7FFFFFFF); push(32'h1);
    for (int i = 0; i < 2000; i++) push(($urandom % 2) ? $urandom : ($urandom >> ($urandom % 31)));
    in_valid <= 0;
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
