// dpram_tb: writes random words through both ports of the dual-port RAM and
// reads them back through the other port, checks the one-cycle read latency
// and that port B wins a same-address write collision.
module dpram_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        a_we = 0, b_we = 0;
  logic [7:0]  a_addr = 0, b_addr = 0;
  logic [31:0] a_wdata = 0, b_wdata = 0, a_rdata, b_rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  dpram dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      if (i % 2 == 0) begin a_we <= 1; a_addr <= 8'(i); a_wdata <= model[i]; b_we <= 0; end
      else            begin b_we <= 1; b_addr <= 8'(i); b_wdata <= model[i]; a_we <= 0; end
      @(posedge clk);
    end
    a_we <= 0; b_we <= 0;
    for (int i = 0; i < 256; i++) begin
      a_addr <= 8'(i); b_addr <= 8'(255 - i);
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata !== model[i])       begin failures++; $display("FAIL A %0d", i); end
      if (b_rdata !== model[255 - i]) begin failures++; $display("FAIL B %0d", i); end
    end
    // collision: both ports write address 7
    a_we <= 1; b_we <= 1; a_addr <= 8'd7; b_addr <= 8'd7; a_wdata <= 32'hAAAA; b_wdata <= 32'hBBBB;
    @(posedge clk);
    a_we <= 0; b_we <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (a_rdata !== 32'hBBBB) begin failures++; $display("FAIL collision %h", a_rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
