// cable8_tb: the eight-compartment neuron (one Hodgkin-Huxley soma and a
// seven-compartment passive dendrite) run on three processors. One
// hh_soma_proc holds the soma; one dend_proc holds compartments 1..4 as four
// virtual cells, a second holds compartments 5..7 as three. The testbench is
// the wiring between them: at the start of every 0.1 ms step it samples all
// voltage outputs and holds them on the neighbour inputs for the whole step,
// so every compartment sees its neighbours' voltages of the previous step.
// The far end is sealed through its cell configuration word (bit 1), which
// must cancel the nonzero axial conductance stored for it. The soma gets a
// constant stimulus current. Checked: each dendritic voltage against a double
// precision exponential Euler update from the voltages read back before the
// step; every step finishing within the 10,000-cycle real-time budget of a
// 100 MHz clock; the soma firing (counted spikes must be nonzero) and the
// depolarisation spreading down the chain. Each processor has its own
// AHB-lite select; address, data and control are shared.
module cable8_tb;
  import np_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0]  hsel = '0;
  logic        hwrite = 0;
  logic [1:0]  htrans = 0;
  logic [31:0] haddr = 0, hwdata = 0;
  logic [2:0]  hready_out, hresp, done;
  logic [31:0] hrdata [3];
  logic        hready;
  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign hready = &hready_out;

  fp32_t s_in [NCELL_MAX][4], s_out [NCELL_MAX][4];
  fp32_t a_in [NCELL_MAX][4], a_out [NCELL_MAX][4];
  fp32_t b_in [NCELL_MAX][4], b_out [NCELL_MAX][4];

  hh_soma_proc u_soma (.clk, .rst_n, .hsel(hsel[0]), .htrans, .hwrite, .haddr, .hwdata, .hready,
                       .hready_out(hready_out[0]), .hrdata(hrdata[0]), .hresp(hresp[0]),
                       .ext_in(s_in), .ext_out(s_out), .done(done[0]));
  dend_proc u_da (.clk, .rst_n, .hsel(hsel[1]), .htrans, .hwrite, .haddr, .hwdata, .hready,
                  .hready_out(hready_out[1]), .hrdata(hrdata[1]), .hresp(hresp[1]),
                  .ext_in(a_in), .ext_out(a_out), .done(done[1]));
  dend_proc u_db (.clk, .rst_n, .hsel(hsel[2]), .htrans, .hwrite, .haddr, .hwdata, .hready,
                  .hready_out(hready_out[2]), .hrdata(hrdata[2]), .hresp(hresp[2]),
                  .ext_in(b_in), .ext_out(b_out), .done(done[2]));

  task automatic ahb_write(int p, int w, logic [31:0] d);
    hsel = 3'(1 << p); htrans = 2'b10; hwrite = 1; haddr = 32'(4 * w);
    @(posedge clk); #1;
    hsel = '0; htrans = 2'b00; hwdata = d;
    while (!hready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
  endtask

  task automatic ahb_read(int p, int w, output logic [31:0] d);
    hsel = 3'(1 << p); htrans = 2'b10; hwrite = 0; haddr = 32'(4 * w);
    @(posedge clk); #1;
    hsel = '0; htrans = 2'b00;
    while (!hready) begin @(posedge clk); #1; end
    d = hrdata[p];
    @(posedge clk); #1;
  endtask

  task automatic wr_real(int p, int w, real r);
    ahb_write(p, w, r2f(r));
  endtask
  task automatic rd_real(int p, int w, output real r);
    logic [31:0] d;
    ahb_read(p, w, d);
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

  function automatic int cw(int cidx, int off);
    return 8 + 62 * cidx + off;
  endfunction

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NSTEP = 250;
  localparam real GL = 0.1, EL = -65.0, CM = 1.0, DT = 0.1, GAX = 0.4;

  // compartment j (1..7) lives on processor pj(j), virtual cell cj(j)
  function automatic int pj(int j);
    return (j <= 4) ? 1 : 2;
  endfunction
  function automatic int cj(int j);
    return (j <= 4) ? j - 1 : j - 5;
  endfunction

  real RC [3][8] = '{'{-0.1, 0.0, -40.0, -0.1, -1.0, 4.0, -1.0 / 18.0, -65.0},
                     '{0.0, 1.0, -35.0, -0.1, 1.0, 0.07, -0.05, -65.0},
                     '{-0.01, 0.0, -55.0, -0.1, -1.0, 0.125, -0.0125, -65.0}};

  // held neighbour voltages: vh[0] = soma, vh[1..7] = compartments
  fp32_t vh [8];
  always_comb begin
    for (int c = 0; c < NCELL_MAX; c++)
      for (int k = 0; k < 4; k++) begin
        s_in[c][k] = FP_ZERO; a_in[c][k] = FP_ZERO; b_in[c][k] = FP_ZERO;
      end
    s_in[0][0] = vh[1];
    s_in[0][1] = r2f(15.0);
    for (int j = 1; j <= 7; j++) begin
      if (j <= 4) begin
        a_in[j - 1][0] = vh[j - 1];
        a_in[j - 1][1] = (j < 7) ? vh[j + 1] : FP_ZERO;
      end else begin
        b_in[j - 5][0] = vh[j - 1];
        b_in[j - 5][1] = (j < 7) ? vh[j + 1] : vh[j - 1];  // far end: ignored when sealed
      end
    end
  end

  int n_spike = 0, n_steps_ok = 0, max_cycles = 0;

  initial begin
    real v [8], vold [8], vinf, gsum, isum, exp_v, vmax7;
    logic above;
    int c0, cycles;
    for (int j = 0; j < 8; j++) vh[j] = r2f(-65.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // soma: one virtual cell, HH parameters, stimulus input on
    ahb_write(0, 1, 32'd0);
    wr_real(0, cw(0, 12), -65.0); wr_real(0, cw(0, 13), 1.0);  wr_real(0, cw(0, 14), DT);
    wr_real(0, cw(0, 15), 0.3);   wr_real(0, cw(0, 16), -54.387); wr_real(0, cw(0, 17), GAX);
    wr_real(0, cw(0, 18), 50.0);  wr_real(0, cw(0, 19), 120.0); wr_real(0, cw(0, 20), -77.0);
    wr_real(0, cw(0, 21), 36.0);  wr_real(0, cw(0, 22), 0.0);
    wr_real(0, cw(0, 23), 0.0529); wr_real(0, cw(0, 24), 0.5961); wr_real(0, cw(0, 25), 0.3177);
    for (int g = 0; g < 3; g++)
      for (int k = 0; k < 8; k++) wr_real(0, cw(0, 26 + 8 * g + k), RC[g][k]);
    ahb_write(0, cw(0, 0), 32'd4);
    // dendrite: four plus three passive compartments, exponential Euler
    ahb_write(1, 1, 32'd3);
    ahb_write(2, 1, 32'd2);
    for (int j = 1; j <= 7; j++) begin
      wr_real(pj(j), cw(cj(j), 12), -65.0); wr_real(pj(j), cw(cj(j), 13), CM);
      wr_real(pj(j), cw(cj(j), 14), DT);    wr_real(pj(j), cw(cj(j), 15), GL);
      wr_real(pj(j), cw(cj(j), 16), EL);    wr_real(pj(j), cw(cj(j), 17), GAX);
      wr_real(pj(j), cw(cj(j), 18), GAX);   wr_real(pj(j), cw(cj(j), 19), 0.0);
      ahb_write(pj(j), cw(cj(j), 0), (j == 7) ? 32'd2 : 32'd0);
    end
    above = 1'b0;
    vmax7 = -65.0;
    for (int step = 0; step < NSTEP; step++) begin
      // sample the outputs of the last step onto the held neighbour wires
      rd_real(0, cw(0, 12), vold[0]);
      for (int j = 1; j <= 7; j++) rd_real(pj(j), cw(cj(j), 12), vold[j]);
      for (int j = 0; j < 8; j++) vh[j] = r2f(vold[j]);
      for (int p = 0; p < 3; p++) ahb_write(p, 0, 32'd1);
      c0 = cyc;
      while (done != 3'b111) begin @(posedge clk); #1; end
      cycles = cyc - c0;
      if (cycles > max_cycles) max_cycles = cycles;
      checks++;
      if (cycles < 10000) n_steps_ok++;
      else begin failures++; $display("FAIL step %0d took %0d cycles", step, cycles); end
      for (int j = 1; j <= 7; j++) begin
        real vl, vr, gr;
        vl = vold[j - 1];
        vr = (j < 7) ? vold[j + 1] : 0.0;
        gr = (j < 7) ? GAX : 0.0;
        gsum = GL + GAX + gr;
        isum = GL * EL + GAX * vl + gr * vr;
        vinf = isum / gsum;
        exp_v = vinf + (vold[j] - vinf) * $exp(-gsum * DT / CM);
        rd_real(pj(j), cw(cj(j), 12), v[j]);
        check_close($sformatf("step %0d compartment %0d", step, j), v[j], exp_v, 1e-5);
      end
      rd_real(0, cw(0, 12), v[0]);
      if (v[0] > 0.0 && !above) n_spike++;
      above = (v[0] > 0.0);
      if (v[7] > vmax7) vmax7 = v[7];
    end
    $display("8 compartments: %0d cycles per step (slowest), %0d soma spikes, distal peak %g mV",
             max_cycles, n_spike, vmax7);
    check(n_spike > 0, "soma never fired");
    check(vmax7 > -64.8, "depolarisation did not reach the distal compartment");
    check(n_steps_ok == NSTEP, "a step exceeded the real-time budget");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
