// ahb_mem_ctrl_tb: drives AHB-lite single and back-to-back transfers into the
// memory controller attached to a dual-port RAM: zero-wait writes, reads with
// exactly one wait state, idle cycles, unselected transfers that must be
// ignored, and the write snoop output.
module ahb_mem_ctrl_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        hsel = 0, hwrite = 0, hready_out, hresp;
  logic [1:0]  htrans = 0;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic        ram_we, wr_evt;
  logic [7:0]  ram_addr, wr_addr;
  logic [31:0] ram_wdata, ram_rdata, wr_data, b_rdata;
  logic [31:0] model [256];
  int checks = 0, failures = 0, snoops = 0, waits = 0;

  ahb_mem_ctrl dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready(hready_out),
                    .hready_out, .hrdata, .hresp, .ram_we, .ram_addr, .ram_wdata, .ram_rdata,
                    .wr_evt, .wr_addr, .wr_data);
  dpram ram (.clk, .a_we(ram_we), .a_addr(ram_addr), .a_wdata(ram_wdata), .a_rdata(ram_rdata),
             .b_we(1'b0), .b_addr(8'd0), .b_wdata(32'd0), .b_rdata);

  always @(posedge clk) if (rst_n && wr_evt) begin
    snoops++;
    if (wr_data !== model[wr_addr]) begin failures++; $display("FAIL snoop"); end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // All bus signals change 1 time unit after a clock edge. A write is an
  // address phase followed by a zero-wait data phase; a read's data phase
  // lasts until hready_out is seen high.
  task automatic ahb_write(logic [7:0] w, logic [31:0] d);
    hsel = 1; htrans = 2'b10; hwrite = 1; haddr = {22'd0, w, 2'b00};
    @(posedge clk); #1;
    hsel = 0; htrans = 2'b00; hwdata = d;
    while (!hready_out) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  task automatic ahb_read(logic [7:0] w, output logic [31:0] d);
    int n;
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = {22'd0, w, 2'b00};
    @(posedge clk); #1;
    hsel = 0; htrans = 2'b00;
    n = 0;
    while (!hready_out) begin @(posedge clk); #1; n++; end
    d = hrdata;
    if (n == 1) waits++;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      model[i] = $urandom;
      ahb_write(8'(i), model[i]);
    end
    // an IDLE transfer with hsel high must not write
    hsel = 1; htrans = 2'b00; hwrite = 1; haddr = 32'h0;
    @(posedge clk); #1;
    hsel = 0; hwdata = 32'hDEAD;
    @(posedge clk); #1;
    for (int i = 0; i < 256; i++) begin
      int w;
      w = (i * 37) % 256;
      ahb_read(8'(w), d);
      checks++;
      if (d !== model[w]) begin failures++; $display("FAIL read %0d: %h exp %h", w, d, model[w]); end
      checks++;
      if (hresp !== 1'b0) begin failures++; $display("FAIL hresp"); end
    end
    checks += 2;
    if (waits != 256) begin failures++; $display("FAIL wait states %0d", waits); end
    if (snoops != 256) begin failures++; $display("FAIL snoops %0d", snoops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
