// traub_soma_proc: somatic neuroprocessor for the reduced Traub model.
//
// The generic neuroprocessor with four ALUs (adder, multiplier, divider,
// exponential; no comparator), running traub_ucode: per virtual soma and time
// step it evaluates the fast sodium current with instantaneous activation
// (gNa minf^2 h) and the delayed-rectifier potassium current (gK n), advances
// h, n and the membrane voltage by exponential Euler (9 exponentials per
// cell), and adds the axial current from the attached dendrite (ext_in[c][0])
// and the stimulus wire (ext_in[c][1]). Calcium channels belong to the
// dendrite in this model and are not part of the soma.
// Cell words: 0 cell configuration (bit 1 = dendrite side sealed, bit 2 =
// stimulus wire used), 12 V, 13 C, 14 dt, 15 gL, 16 EL, 17 axial conductance, 18 ENa,
// 19 gNa, 20 EK, 21 gK, 22 injected current, 23 minf (result), 24 h, 25 n,
// 26..51 rate constants (see np_ucode_pkg). Output ext_out[c][0] = new V.
// Bus, start and done as in neuroprocessor.
// The channel set, the ALU set and the multiplexing of up to four somata
// follow the original; the channel kinetics are those of the published
// reduced Traub (Pinsky-Rinzel) soma and the word layout is this design's own.
module traub_soma_proc
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

  neuroprocessor #(.KIND(KIND_TRAUB)) u_np (.*);

endmodule
