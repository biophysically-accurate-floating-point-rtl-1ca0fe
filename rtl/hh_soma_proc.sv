// hh_soma_proc: Hodgkin-Huxley somatic neuroprocessor.
//
// The generic neuroprocessor without comparator, running the hh_ucode
// micro-program: per virtual soma and time step it updates the sodium
// activation m, inactivation h and potassium activation n gates and the
// membrane voltage by exponential Euler (10 exponentials per cell), with the
// axial current from the attached dendrite on ext_in[c][0]. Cell parameter
// words (offset in the 62-word cell block): 0 cell configuration (bit 1 =
// dendrite side sealed, gives zero axial conductance; bit 2 = stimulus input
// ext_in[c][1] used, otherwise ignored), 12 V, 13 C, 14 dt, 15 gL, 16 EL,
// 17 axial conductance, 18 ENa, 19 gNa, 20 EK, 21 gK, 22 injected current,
// 23..25 m, h, n, 26..49 the rate constants of the three gates (8 words each:
// a, a0, th, 1/b, c of the rational form, a, b1, th of the exponential form).
// ext_in[c][1] adds an external stimulus current (the analogue input) when
// configuration bit 2 is set.
// Outputs: ext_out[c][0] = new V. Bus, start and done as in neuroprocessor.
// Offset 18 for ENa follows the original memory map; the other offsets are
// this implementation's own.
module hh_soma_proc
  import np_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hsel,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] haddr,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hready_out,
  output logic [31:0] hrdata,
  output logic        hresp,
  input  fp32_t       ext_in  [NCELL_MAX][4],
  output fp32_t       ext_out [NCELL_MAX][4],
  output logic        done
);

  neuroprocessor #(.KIND(KIND_HH)) u_np (.*);

endmodule
