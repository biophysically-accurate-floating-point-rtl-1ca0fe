// float2fix_tb: checks float to fixed (Q15.16) conversion, truncating toward
// zero and saturating, against a real-number model, one per cycle, and the
// 3-cycle latency.
module float2fix_tb;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        in_valid = 0, out_valid;
  logic [31:0] fp_in = 0, fix_out;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  float2fix dut (.*);

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
    if (fix_out !== e) begin failures++; $display("FAIL float2fix got %h exp %h", fix_out, e); end
    if (cyc - ic != 3) begin failures++; $display("FAIL latency %0d", cyc - ic); end
  end

  function automatic logic [31:0] model(logic [31:0] f);
    real s;
    longint q;
    s = f2r(f) * 65536.0;
    if (s >= 2147483647.0) return 32'h7FFFFFFF;
    if (s <= -2147483648.0) return 32'h80000000;
    q = longint'(s);             // rounds to nearest
    if (real'(q) > s && s > 0) q = q - 1;   // truncate toward zero
    if (real'(q) < s && s < 0) q = q + 1;
    return 32'(q);
  endfunction

  task automatic push(logic [31:0] x);
    fp_in <= x; in_valid <= 1;
    expq.push_back(model(x));
    issue_cyc.push_back(cyc + 1);
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    push(32'h0); push(32'h3F800000); push(32'hC2820000); push(32'h47000000); push(32'hC7000000);
    push(32'h4F000000); push(32'h37000000);
    for (int i = 0; i < 2000; i++) push(rand_f(100, 145));
    in_valid <= 0;
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
