// dend_proc_tb: numerical test of the dendritic processor. Four virtual
// compartments get random passive properties, neighbour voltages and
// synaptic currents. For several time steps the exponential Euler update is
// compared with a double precision evaluation of the same formula from the
// state read back over the bus (the first and last compartments are marked
// sealed in their configuration words, which must cancel their stored axial
// conductances); then CONFIG1 selects backward Euler and the
// four matrix coefficients per compartment are compared. Finally CONFIG1
// switches the compartments to the active (calcium) mode: for 40 steps the
// calcium, Ca-activated potassium and AHP gates, the calcium concentration
// and the voltage are compared with a double precision model, and the
// comparator decisions (voltage threshold of the K-C rate, the two minimum
// functions) must each go both ways at least once; one active backward Euler
// step checks the coefficients with the channel terms. Also reports the
// cycles per time step and checks that all modes ran.
module dend_proc_tb;
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

  dend_proc dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready(hready_out),
                 .hready_out, .hrdata, .hresp, .ext_in, .ext_out, .done);

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real P [4][53];
  real Vl [4], Vr [4], Is [4];
  int n_exp = 0, n_back = 0;

  task automatic run_step(output int cycles);
    int c0;
    wr_word(0, 0, 32'd1);
    c0 = cyc;
    while (!done) begin @(posedge clk); #1; end
    cycles = cyc - c0;
  endtask

  // active compartment parameters (cell words 24..51): gCa, ECa, gKC, gAHP,
  // EK, Ca activation rates (rational form: a, a0, th, 1/b, c), the two K-C
  // rate branches (exponential form: a, b1, th), their voltage threshold,
  // 1/250, the AHP rate slope and cap, its closing rate, calcium gain and decay
  real AP [28] = '{10.0, 80.0, 15.0, 0.8, -75.0,
                   0.0, 1.6, 5.0, -0.072, 1.0,
                   0.02, 0.0, -8.9, 0.2, -1.0,
                   1.0 / 18.975, 1.0 / 11.0 - 1.0 / 27.0, -(50.0 / 11.0 - 53.5 / 27.0) / (1.0 / 11.0 - 1.0 / 27.0),
                   2.0, -1.0 / 27.0, -53.5, -10.0,
                   1.0 / 250.0, 2.0e-5, 0.01, 0.001, -0.13, 0.075};
  int n_vhi = 0, n_vlo = 0, n_chi_sat = 0, n_chi_lin = 0, n_q_sat = 0, n_q_lin = 0, n_act = 0;

  function automatic real arat(int b, real v);
    return (AP[b] * (v - AP[b + 2]) + AP[b + 1]) / ($exp((v - AP[b + 2]) * AP[b + 3]) + AP[b + 4]);
  endfunction
  function automatic real aexp(int b, real v);
    return AP[b] * $exp(AP[b + 1] * (v - AP[b + 2]));
  endfunction
  function automatic real egate(real x, real al, real be, real dt);
    real S, xi;
    S = al + be; xi = al / S;
    return xi + (x - xi) * $exp(-S * dt);
  endfunction

  // one active update from state st = {s, c, q, Ca}; returns the new state and
  // the total conductance and current (without the neighbour terms)
  task automatic active_ref(int c, real V, real st [4], output real nst [4], output real G, output real I0);
    real dt, gca, ica, xi, al, be, e1, e2, chi, gk;
    dt = P[c][14];
    nst[0] = egate(st[0], arat(5, V), arat(10, V), dt);
    gca = AP[0] * nst[0] * nst[0];
    ica = gca * (V - AP[1]);
    xi = AP[26] * ica / AP[27];
    nst[3] = xi + (st[3] - xi) * $exp(-AP[27] * dt);
    e1 = aexp(15, V); e2 = aexp(18, V);
    if (V > AP[21]) begin al = e2; n_vhi++; end else begin al = e1; n_vlo++; end
    be = e2 - al;
    nst[1] = egate(st[1], al, be, dt);
    chi = nst[3] * AP[22];
    if (chi > 1.0) begin chi = 1.0; n_chi_sat++; end else n_chi_lin++;
    al = nst[3] * AP[23];
    if (al > AP[24]) begin al = AP[24]; n_q_sat++; end else n_q_lin++;
    nst[2] = egate(st[2], al, AP[25], dt);
    gk = AP[2] * nst[1] * chi + AP[3] * nst[2];
    G  = P[c][15] + P[c][17] + P[c][18] + gca + gk;
    I0 = P[c][19] + P[c][15] * P[c][16] - Is[c] + gca * AP[1] + gk * AP[4];
  endtask

  initial begin
    int cycles;
    real v, G, I0, I, vinf, exp_v, r;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int c = 0; c < 4; c++) begin
      P[c][12] = -65.0 + 10.0 * real'($urandom_range(100)) / 100.0;   // V
      P[c][13] = 0.5 + real'($urandom_range(100)) / 100.0;            // C
      P[c][14] = 0.1;                                                 // dt
      P[c][15] = 0.05 + real'($urandom_range(100)) / 1000.0;          // gL
      P[c][16] = -70.0;                                               // EL
      P[c][17] = 0.2 + real'($urandom_range(100)) / 500.0;            // gl
      P[c][18] = 0.3;                                                 // gr
      P[c][19] = real'($urandom_range(100)) / 50.0;                   // Ie
      for (int k = 12; k <= 19; k++) wr_real(0, cw(c, k), P[c][k]);
      // cell configuration: the end compartments are sealed, which must
      // override the nonzero axial conductances stored for them
      wr_word(0, cw(c, 0), (c == 0) ? 32'd1 : (c == 3) ? 32'd2 : 32'd0);
      if (c == 0) P[c][17] = 0.0;
      if (c == 3) P[c][18] = 0.0;
      Vl[c] = -60.0 + real'(c); Vr[c] = -58.0 - real'(c); Is[c] = 0.1 * real'(c) - 0.15;
      ext_in[c][0] = r2f(Vl[c]); ext_in[c][1] = r2f(Vr[c]);
      ext_in[c][2] = FP_ZERO;    ext_in[c][3] = r2f(Is[c]);
    end
    wr_word(0, 1, 32'd3);                 // four virtual cells, exponential Euler
    for (int step = 0; step < 5; step++) begin
      real vold [4];
      for (int c = 0; c < 4; c++) rd_real(0, cw(c, 12), vold[c]);
      run_step(cycles);
      n_exp++;
      if (step == 0) $display("exponential Euler, 4 compartments: %0d cycles", cycles);
      for (int c = 0; c < 4; c++) begin
        G  = P[c][15] + P[c][17] + P[c][18];
        I  = P[c][19] + P[c][15] * P[c][16] - Is[c] + P[c][17] * Vl[c] + P[c][18] * Vr[c];
        vinf  = I / G;
        exp_v = vinf + (vold[c] - vinf) * $exp(-G * P[c][14] / P[c][13]);
        rd_real(0, cw(c, 12), v);
        check_close($sformatf("V step %0d cell %0d", step, c), v, exp_v, 2e-6);
        check_close("ext_out V", f2r(ext_out[c][0]), exp_v, 2e-6);
      end
    end
    // backward Euler: matrix row coefficients
    wr_word(0, 1, 32'd3 | 32'd4);
    begin
      real vold [4];
      for (int c = 0; c < 4; c++) rd_real(0, cw(c, 12), vold[c]);
      run_step(cycles);
      n_back++;
      $display("backward Euler, 4 compartments: %0d cycles", cycles);
      for (int c = 0; c < 4; c++) begin
        G  = P[c][15] + P[c][17] + P[c][18];
        I0 = P[c][19] + P[c][15] * P[c][16] - Is[c];
        rd_real(0, cw(c, 8), r);  check_close("coef a", r, -P[c][17], 1e-6);
        rd_real(0, cw(c, 9), r);  check_close("coef b", r, P[c][13] / P[c][14] + G, 1e-6);
        rd_real(0, cw(c, 10), r); check_close("coef c", r, -P[c][18], 1e-6);
        rd_real(0, cw(c, 11), r); check_close("coef d", r, P[c][13] / P[c][14] * vold[c] + I0, 2e-6);
        rd_real(0, cw(c, 12), r); check_close("V unchanged", r, vold[c], 0.0);
      end
    end
    // active compartments: strong injected currents drive calcium spikes
    for (int c = 0; c < 4; c++) begin
      for (int k = 0; k < 28; k++) wr_real(0, cw(c, 24 + k), AP[k]);
      wr_real(0, cw(c, 20), 0.01); wr_real(0, cw(c, 21), 0.01);
      wr_real(0, cw(c, 22), 0.01); wr_real(0, cw(c, 23), (c == 3) ? 600.0 : 0.2);
      P[c][19] = 25.0 * real'(c);
      wr_real(0, cw(c, 19), P[c][19]);
    end
    wr_word(0, 1, 32'd3 | 32'd8);
    for (int step = 0; step < 40; step++) begin
      real vold [4], st [4][4], nst [4], Ga, I0a, Ia;
      for (int c = 0; c < 4; c++) begin
        rd_real(0, cw(c, 12), vold[c]);
        for (int k = 0; k < 4; k++) rd_real(0, cw(c, 20 + k), st[c][k]);
      end
      run_step(cycles);
      n_act++;
      if (step == 0) $display("active exponential Euler, 4 compartments: %0d cycles", cycles);
      for (int c = 0; c < 4; c++) begin
        active_ref(c, vold[c], st[c], nst, Ga, I0a);
        for (int k = 0; k < 4; k++) begin
          rd_real(0, cw(c, 20 + k), r);
          check_close($sformatf("active state %0d step %0d cell %0d", k, step, c), r, nst[k], (k == 3) ? 1e-4 : 1e-5);
        end
        Ia = I0a + P[c][17] * Vl[c] + P[c][18] * Vr[c];
        vinf = Ia / Ga;
        exp_v = vinf + (vold[c] - vinf) * $exp(-Ga * P[c][14] / P[c][13]);
        rd_real(0, cw(c, 12), v);
        check_close($sformatf("active V step %0d cell %0d", step, c), v, exp_v, 1e-4);
      end
    end
    // one active backward Euler step
    wr_word(0, 1, 32'd3 | 32'd4 | 32'd8);
    begin
      real vold [4], st [4][4], nst [4], Ga, I0a;
      for (int c = 0; c < 4; c++) begin
        rd_real(0, cw(c, 12), vold[c]);
        for (int k = 0; k < 4; k++) rd_real(0, cw(c, 20 + k), st[c][k]);
      end
      run_step(cycles);
      $display("active backward Euler, 4 compartments: %0d cycles", cycles);
      for (int c = 0; c < 4; c++) begin
        active_ref(c, vold[c], st[c], nst, Ga, I0a);
        rd_real(0, cw(c, 9), r);  check_close("active coef b", r, P[c][13] / P[c][14] + Ga, 1e-5);
        rd_real(0, cw(c, 11), r); check_close("active coef d", r, P[c][13] / P[c][14] * vold[c] + I0a, 1e-5);
      end
    end
    $display("active mode: V above/below K-C threshold %0d/%0d, chi saturated/linear %0d/%0d, AHP rate capped/linear %0d/%0d",
             n_vhi, n_vlo, n_chi_sat, n_chi_lin, n_q_sat, n_q_lin);
    check(n_vhi > 0 && n_vlo > 0, "K-C rate threshold taken both ways");
    check(n_chi_sat > 0 && n_chi_lin > 0, "calcium saturation of K-C taken both ways");
    check(n_q_sat > 0 && n_q_lin > 0, "AHP rate cap taken both ways");
    check(n_exp > 0 && n_back > 0 && n_act > 0, "all integration modes ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
