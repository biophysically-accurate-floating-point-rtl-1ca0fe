// syn_proc: synaptic neuroprocessor.
//
// The generic neuroprocessor with comparator, running syn_ucode: per virtual
// synapse and time step it advances the time since the last accepted spike,
// accepts an incoming spike (ext_in[c][1] = 1.0) only if that time exceeds
// the dead time (comparator), holds the transmitter at Tmax for Tdur after an
// accepted spike, and integrates AMPA, NMDA and GABAa receptor states by
// exponential Euler. It returns the total conductance and current at the
// dendritic voltage ext_in[c][0] on ext_out[c][0..1] and words 8, 9, and the
// spike-accepted flag on ext_out[c][2]. Cell words: 12 time since spike,
// 13 dt, 14 Tmax, 15 Tdur, 16 dead time, then per receptor (20, 26, 32):
// alpha, beta, peak conductance, population, reversal potential, state r.
module syn_proc
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

  neuroprocessor #(.KIND(KIND_SYN)) u_np (.*);

endmodule
