// hh_soma_proc_tb: numerical test of the Hodgkin-Huxley somatic processor.
// One soma with the classic squid-axon constants (rest near -65 mV, time step
// 0.1 ms) is driven by a step current through the stimulus wire. Each time
// step the state read back (V, m, h, n) feeds a double precision model of the
// same exponential Euler update and the new state is compared. The run must
// produce at least one action potential (V above 0 mV). Reports the cycles
// per update.
module hh_soma_proc_tb;
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

  hh_soma_proc dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready(hready_out),
                    .hready_out, .hrdata, .hresp, .ext_in, .ext_out, .done);

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rate constants per gate: a, a0, th, 1/b, c (rational form); a, b1, th (exponential form)
  real RC [3][8] = '{'{-0.1, 0.0, -40.0, -0.1, -1.0, 4.0, -1.0 / 18.0, -65.0},
                     '{0.0, 1.0, -35.0, -0.1, 1.0, 0.07, -0.05, -65.0},
                     '{-0.01, 0.0, -55.0, -0.1, -1.0, 0.125, -0.0125, -65.0}};

  function automatic real rat(int g, real v);
    return (RC[g][0] * (v - RC[g][2]) + RC[g][1]) / ($exp((v - RC[g][2]) * RC[g][3]) + RC[g][4]);
  endfunction
  function automatic real ex(int g, real v);
    return RC[g][5] * $exp(RC[g][6] * (v - RC[g][7]));
  endfunction

  initial begin
    int c0, cycles;
    real dt, V, x [3], xn [3], al, be, S, xinf, hw, gna, gk, G, I, vinf, vn, stim, vmax;
    real C, gL, EL, ENa, gNa, EK, gK;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    dt = 0.1; C = 1.0; gL = 0.3; EL = -54.387; ENa = 50.0; gNa = 120.0; EK = -77.0; gK = 36.0;
    wr_real(0, cw(0, 12), -65.0); wr_real(0, cw(0, 13), C);  wr_real(0, cw(0, 14), dt);
    wr_real(0, cw(0, 15), gL);    wr_real(0, cw(0, 16), EL); wr_real(0, cw(0, 17), 0.5);
    wr_real(0, cw(0, 18), ENa);   wr_real(0, cw(0, 19), gNa); wr_real(0, cw(0, 20), EK);
    wr_real(0, cw(0, 21), gK);    wr_real(0, cw(0, 22), 0.0);
    wr_real(0, cw(0, 23), 0.0529); wr_real(0, cw(0, 24), 0.5961); wr_real(0, cw(0, 25), 0.3177);
    for (int g = 0; g < 3; g++)
      for (int k = 0; k < 8; k++) wr_real(0, cw(0, 26 + 8 * g + k), RC[g][k]);
    wr_word(0, cw(0, 0), 32'd4 | 32'd2);   // stimulus input on, no dendrite attached
    wr_word(0, 1, 32'd0);
    for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) ext_in[c][k] = FP_ZERO;
    vmax = -100.0;
    for (int step = 0; step < 60; step++) begin
      stim = (step >= 5) ? 10.0 : 0.0;
      ext_in[0][1] = r2f(stim);
      rd_real(0, cw(0, 12), V);
      for (int g = 0; g < 3; g++) rd_real(0, cw(0, 23 + g), x[g]);
      wr_word(0, 0, 32'd1);
      c0 = cyc;
      while (!done) begin @(posedge clk); #1; end
      cycles = cyc - c0;
      if (step == 0) $display("HH soma update: %0d cycles", cycles);
      for (int g = 0; g < 3; g++) begin
        if (g == 1) begin al = ex(g, V); be = rat(g, V); end
        else        begin al = rat(g, V); be = ex(g, V); end
        S = al + be; xinf = al / S;
        xn[g] = xinf + (x[g] - xinf) * $exp(-S * dt);
        rd_real(0, cw(0, 23 + g), hw);
        check_close($sformatf("gate %0d step %0d", g, step), hw, xn[g], 1e-5);
      end
      gna = gNa * xn[0] * xn[0] * xn[0] * xn[1];
      gk  = gK * xn[2] * xn[2] * xn[2] * xn[2];
      G = gna + gk + gL;
      I = gna * ENa + gk * EK + gL * EL + stim;
      vinf = I / G;
      vn = vinf + (V - vinf) * $exp(-G * dt / C);
      rd_real(0, cw(0, 12), hw);
      check_close($sformatf("V step %0d", step), hw, vn, 1e-4);
      if (hw > vmax) vmax = hw;
    end
    $display("peak membrane voltage %g mV", vmax);
    check(vmax > 0.0, "action potential produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
