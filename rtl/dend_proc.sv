// dend_proc: dendritic neuroprocessor (active or passive compartment).
//
// The generic neuroprocessor with comparator, running dend_ucode: per virtual
// compartment and time step it evaluates the discretised cable equation with
// the left/right neighbour voltages on ext_in[c][0..1] and the synaptic
// current on ext_in[c][3]. CONFIG1 bit 3 adds the channels of the active
// dendrite of the reduced Traub model: high-threshold calcium current
// (gCa s^2), calcium-activated potassium (gKC c chi, chi = min(Ca/250, 1)),
// after-hyperpolarisation potassium (gAHP q, rate min(k Ca, cap)) and the
// calcium concentration. The comparator makes the threshold decisions of that
// model (the voltage branch of the K-C rate and the two minimum functions).
// CONFIG1 bit 2 selects exponential Euler (new V to word 12 and ext_out[c][0])
// or backward Euler (four matrix-row coefficients to words 8..11 for the host
// to solve; the channel conductances are then folded into b and d).
// Cell words: 0 cell configuration (bit 0 = left end sealed, bit 1 = right
// end sealed; a sealed end uses zero axial conductance), 12 V, 13 C, 14 dt, 15 gL, 16 EL, 17 gl, 18 gr (axial
// conductances, 0 at a sealed end), 19 injected current; active mode:
// 20..23 states s, c, q, Ca, 24..51 channel constants (see np_ucode_pkg),
// 52 calcium current (result).
// Following the original: passive/active selection by register, the two
// integration methods, the comparator for membrane-potential and calcium
// thresholds, the synaptic input wire, up to four compartments. Own choices:
// the channel kinetics (the published reduced Traub dendrite) and the word
// layout.
module dend_proc
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

  neuroprocessor #(.KIND(KIND_DEND)) u_np (.*);

endmodule
