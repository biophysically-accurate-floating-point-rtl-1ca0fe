// np_ctrl_tb: checks the neuroprocessor control logic: CONFIG1 capture, start
// decode (bit 0 of word 0, ignored while running), stepping through 1 to 4
// virtual cells on cell_done with the right parameter base (8 + 62 k), and
// the done flag.
module np_ctrl_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        wr_evt = 0, cell_done = 0, run, done;
  logic [7:0]  wr_addr = 0, cell_base;
  logic [31:0] wr_data = 0, config1;
  logic [1:0]  cell_idx;
  int checks = 0, failures = 0;

  np_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    wr_evt <= 1; wr_addr <= a; wr_data <= d;
    @(posedge clk);
    wr_evt <= 0;
  endtask

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 1; n <= 4; n++) begin
      wr(8'd1, 32'(n - 1));
      wr(8'd0, 32'd0);           // bit 0 clear: no start
      #1 check(!run, "start without bit 0");
      wr(8'd0, 32'd1);
      #1 check(run && !done && cell_idx == 0, "started");
      check(config1 == 32'(n - 1), "config1");
      for (int c = 0; c < n; c++) begin
        #1 check(cell_idx == 2'(c) && cell_base == 8'(8 + 62 * c), "cell base");
        repeat (3) @(posedge clk);
        if (c == 0) begin wr(8'd0, 32'd1); #1 check(cell_idx == 0 && run, "restart ignored"); end
        cell_done <= 1;
        @(posedge clk);
        cell_done <= 0;
      end
      #1 check(!run && done, "done after last cell");
      repeat (2) @(posedge clk);
      #1 check(done, "done holds");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
