// neuro_top_hh_tb: end-to-end run of the two-neuron network built with
// Hodgkin-Huxley somata (SOMA_KIND = KIND_HH) and passive dendrites. The testbench
// plays the host processor: over the AHB-lite port it loads the somata
// (Hodgkin-Huxley), the two three-compartment passive dendrites and the two
// synapses, then for every 0.1 ms time step writes the start registers of all
// four processors, waits for the synchroniser interrupt and reads results.
// Neuron 0 gets a constant stimulus current through the fixed-point input;
// its spikes must reach the synapse on neuron 1, where a long dead time makes
// some of them be rejected. For a few steps the dendrites switch to backward
// Euler and the host solves the two tridiagonal systems from the returned
// coefficients. Counted mechanisms, each of which must occur: interrupts,
// spikes, accepted and rejected spikes, backward-Euler steps, sequencer stalls,
// multiplexed virtual cells, DAC samples matching the soma voltage, and bus
// read wait states. The network size is the top's default.
module neuro_top_hh_tb;
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

  logic        irq;
  fp32_t       spike_threshold;
  logic [1:0]  spike;
  logic [31:0] stim_fix [2], dac_vm [2];
  logic [1:0]  dac_valid;

  neuro_top #(.SOMA_KIND(KIND_HH)) dut (.clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready(hready_out),
                 .hready_out, .hrdata, .hresp, .irq, .spike_threshold, .spike,
                 .stim_fix, .dac_vm, .dac_valid);

  localparam int SOMA = 0, DEND0 = 1024, DEND1 = 2048, SYN = 3072;
  localparam int NSTEP = 420;

  int n_irq = 0, n_spike = 0, n_acc = 0, n_rej = 0, n_back = 0, n_stall = 0;
  int n_cells = 0, n_dac = 0, n_dac_ok = 0, n_wait = 0;
  logic [1:0] spike_q = 0;

  always @(posedge clk) if (rst_n) begin
    if (irq) n_irq++;
    if (spike[0] && !spike_q[0]) n_spike++;
    spike_q <= spike;
    if (dut.g_hh.u_soma.u_np.run && !dut.g_hh.u_soma.u_np.issue) n_stall++;
    if (dut.u_dend0.u_np.cell_done) n_cells++;
    if (dac_valid[0]) n_dac++;
    if (!hready_out) n_wait++;
  end

  initial begin
    #900000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real RC [3][8] = '{'{-0.1, 0.0, -40.0, -0.1, -1.0, 4.0, -1.0 / 18.0, -65.0},
                     '{0.0, 1.0, -35.0, -0.1, 1.0, 0.07, -0.05, -65.0},
                     '{-0.01, 0.0, -55.0, -0.1, -1.0, 0.125, -0.0125, -65.0}};
  real SAL [3] = '{1.1, 0.072, 5.0};
  real SBE [3] = '{0.19, 0.0066, 0.18};
  real SGM [3] = '{0.01, 0.002, 0.005};
  real SER [3] = '{0.0, 0.0, -80.0};
  real SNN [3] = '{60.0, 60.0, 10.0};

  task automatic start_all();
    wr_word(SOMA, 0, 1); wr_word(DEND0, 0, 1); wr_word(DEND1, 0, 1); wr_word(SYN, 0, 1);
  endtask

  // host side of the backward Euler step: solve a V(j-1) + b V(j) + c V(j+1) = d
  task automatic solve_chain(int pb, real vsoma);
    real a [3], b [3], c [3], d [3], cp [3], dp [3], v [3], m;
    for (int j = 0; j < 3; j++) begin
      rd_real(pb, cw(j, 8), a[j]);  rd_real(pb, cw(j, 9), b[j]);
      rd_real(pb, cw(j, 10), c[j]); rd_real(pb, cw(j, 11), d[j]);
    end
    d[0] = d[0] - a[0] * vsoma;    // the soma voltage is the known left boundary
    cp[0] = c[0] / b[0]; dp[0] = d[0] / b[0];
    for (int j = 1; j < 3; j++) begin
      m = b[j] - a[j] * cp[j-1];
      cp[j] = c[j] / m;
      dp[j] = (d[j] - a[j] * dp[j-1]) / m;
    end
    v[2] = dp[2];
    v[1] = dp[1] - cp[1] * v[2];
    v[0] = dp[0] - cp[0] * v[1];
    for (int j = 0; j < 3; j++) begin
      check(v[j] > -90.0 && v[j] < 60.0, "backward Euler voltage in range");
      wr_real(pb, cw(j, 12), v[j]);
    end
  endtask

  initial begin
    real vs0, vd, g1;
    logic [31:0] w;
    repeat (3) @(posedge clk);
    spike_threshold = r2f(0.0);
    stim_fix[0] = 32'(20 * 65536);     // 20 uA/cm2 into soma 0
    stim_fix[1] = 32'd0;
    rst_n = 1;
    @(posedge clk); #1;
    // somata
    wr_word(SOMA, 1, 32'd1);
    for (int c = 0; c < 2; c++) begin
      wr_real(SOMA, cw(c, 12), -65.0); wr_real(SOMA, cw(c, 13), 1.0);  wr_real(SOMA, cw(c, 14), 0.1);
      wr_real(SOMA, cw(c, 15), 0.3);   wr_real(SOMA, cw(c, 16), -54.387); wr_real(SOMA, cw(c, 17), 0.1);
      wr_real(SOMA, cw(c, 18), 50.0);  wr_real(SOMA, cw(c, 19), 120.0); wr_real(SOMA, cw(c, 20), -77.0);
      wr_word(SOMA, cw(c, 0), 32'd4);   // stimulus input on, dendrite attached
      wr_real(SOMA, cw(c, 21), 36.0);  wr_real(SOMA, cw(c, 22), 0.0);
      wr_real(SOMA, cw(c, 23), 0.0529); wr_real(SOMA, cw(c, 24), 0.5961); wr_real(SOMA, cw(c, 25), 0.3177);
      for (int g = 0; g < 3; g++)
        for (int k = 0; k < 8; k++) wr_real(SOMA, cw(c, 26 + 8 * g + k), RC[g][k]);
    end
    // dendrites: three passive compartments per neuron
    for (int p = 1; p <= 2; p++) begin
      wr_word(1024 * p, 1, 32'd2);
      for (int c = 0; c < 3; c++) begin
        wr_real(1024 * p, cw(c, 12), -65.0); wr_real(1024 * p, cw(c, 13), 1.0);
        wr_real(1024 * p, cw(c, 14), 0.1);   wr_real(1024 * p, cw(c, 15), 0.3);
        wr_real(1024 * p, cw(c, 16), -65.0); wr_real(1024 * p, cw(c, 17), (c == 0) ? 0.1 : 0.5);
        wr_real(1024 * p, cw(c, 18), 0.5);
        wr_real(1024 * p, cw(c, 19), 0.0);
        wr_word(1024 * p, cw(c, 0), (c == 2) ? 32'd2 : 32'd0);   // distal end sealed
      end
    end
    // synapses, dead time 20 ms
    wr_word(SYN, 1, 32'd1);
    for (int c = 0; c < 2; c++) begin
      wr_real(SYN, cw(c, 12), 100.0); wr_real(SYN, cw(c, 13), 0.1); wr_real(SYN, cw(c, 14), 1.0);
      wr_real(SYN, cw(c, 15), 1.0);   wr_real(SYN, cw(c, 16), 20.0);
      for (int k = 0; k < 3; k++) begin
        wr_real(SYN, cw(c, 20 + 6 * k), SAL[k]); wr_real(SYN, cw(c, 21 + 6 * k), SBE[k]);
        wr_real(SYN, cw(c, 22 + 6 * k), SGM[k]); wr_real(SYN, cw(c, 23 + 6 * k), SNN[k]);
        wr_real(SYN, cw(c, 24 + 6 * k), SER[k]); wr_real(SYN, cw(c, 25 + 6 * k), 0.0);
      end
    end
    for (int step = 0; step < NSTEP; step++) begin
      logic back, sp_in;
      int n0;
      back = (step == 100 || step == 101);
      if (back) begin
        wr_word(DEND0, 1, 32'd2 | 32'd4); wr_word(DEND1, 1, 32'd2 | 32'd4);
      end
      n0 = n_irq;
      sp_in = (dut.syn_in[1][1] == FP_ONE);   // spike the synapse will see this step
      start_all();
      while (n_irq == n0) begin @(posedge clk); #1; end
      if (back) begin
        rd_real(SOMA, cw(0, 12), vs0);
        solve_chain(DEND0, vs0);
        rd_real(SOMA, cw(1, 12), vs0);
        solve_chain(DEND1, vs0);
        wr_word(DEND0, 1, 32'd2); wr_word(DEND1, 1, 32'd2);
        n_back++;
      end
      // DAC output must be the soma voltage in Q15.16
      @(posedge clk); #1;
      ahb_read(32'(SOMA + 4 * cw(0, 12)), w);
      n_dac_ok += (dac_vm[0] == 32'($rtoi(f2r(w) * 65536.0))) ? 1 : 0;
      // synapse on neuron 1: accepted/rejected spike bookkeeping
      if (sp_in) begin
        if (dut.syn_out[1][2] == FP_ONE) n_acc++; else n_rej++;
      end
      if (step % 60 == 0) begin
        rd_real(DEND0, cw(2, 12), vd);
        rd_real(SYN, cw(1, 8), g1);
        $display("step %0d: soma0 %g mV, distal dendrite0 %g mV, synapse1 g %g", step, f2r(w), vd, g1);
      end
    end
    $display("irq %0d, spikes %0d, accepted %0d, rejected %0d, backward steps %0d",
             n_irq, n_spike, n_acc, n_rej, n_back);
    $display("soma stall cycles %0d, dendrite cells run %0d, DAC samples %0d (%0d matching), bus wait cycles %0d",
             n_stall, n_cells, n_dac, n_dac_ok, n_wait);
    check(n_irq == NSTEP, "one interrupt per time step");
    check(n_spike >= 2, "soma 0 fired repeatedly");
    check(n_acc >= 1, "spike accepted by the other neuron's synapse");
    check(n_rej >= 1, "spike rejected inside the dead time");
    check(n_back == 2, "backward Euler steps");
    check(n_stall > 0, "sequencer stalls");
    check(n_cells == 3 * NSTEP, "three virtual compartments per step");
    check(n_dac >= NSTEP && n_dac_ok == NSTEP, "DAC output follows soma voltage");
    check(n_wait > 0, "bus read wait states");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
