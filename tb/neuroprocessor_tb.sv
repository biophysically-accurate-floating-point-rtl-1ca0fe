// neuroprocessor_tb: checks the generic neuroprocessor's bus and control
// behaviour, using the dendritic micro-program: parameter memory readback
// over the bus, CONFIG1 choosing how many virtual cells run (cells beyond it
// must stay untouched), a start written while a step is running is ignored,
// done rises once per step, and the time per step grows with the number of
// multiplexed cells. It also counts sequencer stall cycles and checks that
// ALUs were busy in parallel.
module neuroprocessor_tb;
  import np_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // AHB-lite host signals (driven 1 time unit after each clock edge)
  logic        hsel = 0, hwrite = 0, hready_out, hresp;
  logic [1:0]  htrans = 0;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic ahb_write(logic [31:0] a, logic [31:0] d);
    hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(posedge clk); #1;
    hsel = 0; htrans = 2'b00; hwdata = d;
    while (!hready_out) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  task automatic ahb_read(logic [31:0] a, output logic [31:0] d);
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(posedge clk); #1;
    hsel = 0; htrans = 2'b00;
    while (!hready_out) begin @(posedge clk); #1; end
    d = hrdata;
    @(posedge clk); #1;
  endtask

  // word w of processor at byte base pb
  task automatic wr_word(int pb, int w, logic [31:0] d);
    ahb_write(32'(pb + 4 * w), d);
  endtask
  task automatic wr_real(int pb, int w, real r);
    ahb_write(32'(pb + 4 * w), r2f(r));
  endtask
  task automatic rd_real(int pb, int w, output real r);
    logic [31:0] d;
    ahb_read(32'(pb + 4 * w), d);
    r = f2r(d);
  endtask

  task automatic check_close(string what, real got, real exp, real tol);
    real d;
    checks++;
    d = got - exp;
    if (d < 0) d = -d;
    if (d > tol * ((exp < 0 ? -exp : exp) > 1.0 ? (exp < 0 ? -exp : exp) : 1.0)) begin
      failures++;
      $display("FAIL %s: got %g expected %g", what, got, exp);
    end
  endtask

  task automatic check(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int cw(int cidx, int off);  // word address of a cell parameter
    return 8 + 62 * cidx + off;
  endfunction

  fp32_t ext_in [4][4], ext_out [4][4];
  logic  done;

  neuroprocessor #(.KIND(KIND_DEND)) dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata,
                 .hready(hready_out), .hready_out, .hrdata, .hresp, .ext_in, .ext_out, .done);

  // sequencer activity
  int stalls = 0, overlap = 0;
  always @(posedge clk) begin
    if (dut.run && !dut.issue) stalls++;
    if ((dut.u_div.busy || dut.u_exp.busy) && dut.add_iv) overlap++;
  end

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int c0, t [4];
    real v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int c = 0; c < 4; c++) begin
      ext_in[c][0] = r2f(-60.0); ext_in[c][1] = r2f(-60.0); ext_in[c][2] = FP_ZERO; ext_in[c][3] = FP_ZERO;
    end
    // fill the whole memory, read it back
    for (int w = 1; w < 256; w++) wr_word(0, w, 32'h1000_0000 + 32'(w * 7));
    for (int w = 1; w < 256; w++) begin
      ahb_read(32'(4 * w), d);
      check(d == 32'h1000_0000 + 32'(w * 7), $sformatf("readback %0d", w));
    end
    for (int c = 0; c < 4; c++) begin
      wr_real(0, cw(c, 12), -65.0); wr_real(0, cw(c, 13), 1.0); wr_real(0, cw(c, 14), 0.1);
      wr_real(0, cw(c, 15), 0.1);   wr_real(0, cw(c, 16), -70.0); wr_real(0, cw(c, 17), 0.0);
      wr_real(0, cw(c, 18), 0.0);   wr_real(0, cw(c, 19), 0.0);
      wr_word(0, cw(c, 0), 32'd0);
    end
    for (int n = 1; n <= 4; n++) begin
      for (int c = 0; c < 4; c++) wr_real(0, cw(c, 12), -65.0);
      wr_word(0, 1, 32'(n - 1));
      wr_word(0, 0, 32'd1);
      c0 = cyc;
      wr_word(0, 0, 32'd1);            // ignored: already running
      while (!done) begin @(posedge clk); #1; end
      t[n-1] = cyc - c0;
      for (int c = 0; c < 4; c++) begin
        rd_real(0, cw(c, 12), v);
        if (c < n) check(v < -65.0 && v > -70.0, $sformatf("cell %0d updated (%g)", c, v));
        else       check(v == -65.0, $sformatf("cell %0d untouched (%g)", c, v));
      end
      $display("%0d virtual cell(s): %0d cycles", n, t[n-1]);
    end
    check(t[1] > t[0] && t[2] > t[1] && t[3] > t[2], "time grows with the number of cells");
    check(stalls > 0, "sequencer stalled on dependencies");
    check(overlap > 0, "adder issued while divider/exponential busy");
    $display("stall cycles %0d, overlapped issues %0d", stalls, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
