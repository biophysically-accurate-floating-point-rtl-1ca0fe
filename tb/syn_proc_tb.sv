// syn_proc_tb: numerical test of the synaptic processor. Two virtual synapses
// with different receptor populations see a spike train containing spikes
// inside the dead time. Each step the state read back (time since the last
// accepted spike and the three receptor states) feeds a double precision model
// of the same update; the new states, total conductance and current and the
// spike-accepted flag are compared. Counts accepted and rejected spikes and
// requires both to occur.
module syn_proc_tb;
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

  syn_proc dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready(hready_out),
                .hready_out, .hrdata, .hresp, .ext_in, .ext_out, .done);

  initial begin
    #80000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receptor constants: alpha (/mM/ms), beta (/ms), gmax, reversal (mV)
  real AL [3] = '{1.1, 0.072, 5.0};
  real BE [3] = '{0.19, 0.0066, 0.18};
  real GM [3] = '{0.00035, 0.0001, 0.00025};
  real ER [3] = '{0.0, 0.0, -80.0};
  real NN [2][3] = '{'{60.0, 60.0, 10.0}, '{30.0, 0.0, 10.0}};
  int accepted = 0, rejected = 0;

  initial begin
    int cycles, c0;
    real dt, tmax, tdur, dead, V;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    dt = 0.1; tmax = 1.0; tdur = 1.0; dead = 2.0;
    for (int c = 0; c < 2; c++) begin
      wr_real(0, cw(c, 12), 100.0); wr_real(0, cw(c, 13), dt); wr_real(0, cw(c, 14), tmax);
      wr_real(0, cw(c, 15), tdur);  wr_real(0, cw(c, 16), dead);
      for (int k = 0; k < 3; k++) begin
        wr_real(0, cw(c, 20 + 6 * k), AL[k]); wr_real(0, cw(c, 21 + 6 * k), BE[k]);
        wr_real(0, cw(c, 22 + 6 * k), GM[k]); wr_real(0, cw(c, 23 + 6 * k), NN[c][k]);
        wr_real(0, cw(c, 24 + 6 * k), ER[k]); wr_real(0, cw(c, 25 + 6 * k), 0.0);
      end
      ext_in[c][2] = FP_ZERO; ext_in[c][3] = FP_ZERO;
    end
    wr_word(0, 1, 32'd1);   // two virtual synapses
    for (int step = 0; step < 40; step++) begin
      real ts [2], r [2][3], sp [2];
      for (int c = 0; c < 2; c++) begin
        rd_real(0, cw(c, 12), ts[c]);
        for (int k = 0; k < 3; k++) rd_real(0, cw(c, 25 + 6 * k), r[c][k]);
        // spikes at steps 2, 3 (inside dead time), 5, 30, 31; synapse 1 shifted by one
        sp[c] = (step - c == 2 || step - c == 3 || step - c == 5 || step - c == 30 || step - c == 31) ? 1.0 : 0.0;
        V = -65.0 + 5.0 * real'(c) + 0.5 * real'(step % 7);
        ext_in[c][0] = r2f(V);
        ext_in[c][1] = r2f(sp[c]);
      end
      wr_word(0, 0, 32'd1);
      c0 = cyc;
      while (!done) begin @(posedge clk); #1; end
      cycles = cyc - c0;
      if (step == 0) $display("2 virtual synapses: %0d cycles", cycles);
      for (int c = 0; c < 2; c++) begin
        real t2, ok, acc, T, gs, is, rn, hw, s, rinf;
        V  = -65.0 + 5.0 * real'(c) + 0.5 * real'(step % 7);
        t2 = ts[c] + dt;
        ok = (t2 > dead) ? 1.0 : 0.0;
        acc = sp[c] * ok;
        if (sp[c] > 0.5) begin
          if (acc > 0.5) accepted++; else rejected++;
        end
        t2 = t2 * (1.0 - acc);
        T  = (tdur > t2) ? tmax : 0.0;
        gs = 0.0; is = 0.0;
        rd_real(0, cw(c, 12), hw);
        check_close("time since spike", hw, t2, 1e-6);
        check(ext_out[c][2] == r2f(acc), "spike accepted flag");
        for (int k = 0; k < 3; k++) begin
          s    = AL[k] * T + BE[k];
          rinf = AL[k] * T / s;
          rn   = rinf + (r[c][k] - rinf) * $exp(-s * dt);
          rd_real(0, cw(c, 25 + 6 * k), hw);
          check_close($sformatf("r[%0d] step %0d syn %0d", k, step, c), hw, rn, 2e-6);
          gs = gs + GM[k] * NN[c][k] * rn;
          is = is + GM[k] * NN[c][k] * rn * (V - ER[k]);
        end
        rd_real(0, cw(c, 8), hw); check_close("g total", hw, gs, 1e-5);
        rd_real(0, cw(c, 9), hw); check_close("i total", hw, is, 1e-5);
        check_close("ext_out g", f2r(ext_out[c][0]), gs, 1e-5);
        check_close("ext_out i", f2r(ext_out[c][1]), is, 1e-5);
      end
    end
    $display("spikes accepted %0d, rejected in dead time %0d", accepted, rejected);
    check(accepted > 0 && rejected > 0, "dead time filtering exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
