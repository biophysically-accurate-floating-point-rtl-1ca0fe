// nnwsynch_tb: raises the done flags of four processors in random order and
// checks that exactly one sync pulse follows the last one, that none occurs
// while any unmasked flag is low, that it re-arms on the next step, and that
// masked processors are ignored.
module nnwsynch_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] done = 0, mask = 0;
  logic sync_out;
  int checks = 0, failures = 0, pulses = 0;

  nnwsynch #(.N(4)) dut (.*);

  always @(posedge clk) if (rst_n && sync_out) pulses++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int step = 0; step < 20; step++) begin
      mask <= (step >= 10) ? 4'b0100 : 4'b0000;
      done <= 0;
      repeat (3) @(posedge clk);
      pulses = 0;
      while ((done | mask) != 4'hF) begin
        done[$urandom % 4] <= 1'b1;
        repeat (1 + $urandom % 4) @(posedge clk);
        checks++;
        if ((done | mask) != 4'hF && pulses != 0) begin failures++; $display("FAIL early pulse"); end
      end
      repeat (5) @(posedge clk);
      checks++;
      if (pulses != 1) begin failures++; $display("FAIL pulses=%0d step %0d", pulses, step); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
