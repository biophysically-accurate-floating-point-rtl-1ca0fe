// neuro_top: a two-neuron network of floating point neuroprocessors on one
// AHB-lite bus, arranged as in the two-cell experiment of the original.
//
// Each neuron is a soma followed by three dendritic compartments, with a
// synapse on the distal compartment; the spike of each soma drives the synapse
// of the other neuron. Processors and virtual cells:
//   u_soma  (traub_soma_proc, or hh_soma_proc when SOMA_KIND = KIND_HH)
//                           cell 0 = soma of neuron 0, cell 1 = soma of neuron 1
//   u_dend0 (dend_proc)     cells 0..2 = proximal..distal dendrite of neuron 0
//   u_dend1 (dend_proc)     cells 0..2 = proximal..distal dendrite of neuron 1
//   u_syn   (syn_proc)      cell 0 = synapse on neuron 0, cell 1 = on neuron 1
// Neighbouring compartments exchange voltages over wires (the values of the
// previous time step); the synapse returns its current to the distal
// dendrite. A spike detector per soma feeds the other neuron's synapse.
// The network synchroniser raises irq for one cycle when all four processors
// have finished a time step. Soma voltages leave through float-to-fixed
// converters (dac_vm, towards a DAC) and a fixed-point stimulus current per
// soma enters through fix-to-float converters.
// Bus: the host (an embedded processor in the original) is outside this
// module; it reaches the processors through the AHB-lite slave port, 1 KB per
// processor: haddr[11:10] = 0 soma, 1 dendrites of neuron 0, 2 dendrites of
// neuron 1, 3 synapses. It writes parameters and CONFIG1, writes 1 to word 0
// of each processor to start a step, waits for irq and reads results.
// As in the original experiment the somata are reduced Traub somata by
// default and the host can switch each dendritic processor between active
// (calcium) and passive compartments through CONFIG1; the Hodgkin-Huxley soma
// can be selected instead with the SOMA_KIND parameter.
module neuro_top
  import np_pkg::*;
#(
  // soma model of both neurons: KIND_TRAUB (reduced Traub) or KIND_HH
  parameter np_kind_e SOMA_KIND = KIND_TRAUB
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-lite slave port
  input  logic        hsel,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] haddr,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hready_out,
  output logic [31:0] hrdata,
  output logic        hresp,
  // time step complete, towards the GPIO / interrupt controller
  output logic        irq,
  // spike threshold of the two somata (single precision)
  input  fp32_t       spike_threshold,
  output logic [1:0]  spike,
  // analogue side
  input  logic [31:0] stim_fix [2],
  output logic [31:0] dac_vm   [2],
  output logic [1:0]  dac_valid
);

  localparam int unsigned NP = 4;

  // ---------------------------------------------------------------- bus decode
  logic [NP-1:0]  sel;
  logic [NP-1:0]  ready_s, resp_s;
  logic [31:0]    rdata_s [NP];
  logic [1:0]     dsel;        // slave of the current data phase

  always_comb
    for (int i = 0; i < NP; i++) sel[i] = hsel && (haddr[11:10] == 2'(i));

  always_ff @(posedge clk) begin
    if (!rst_n)                    dsel <= '0;
    else if (hready && hsel && htrans[1]) dsel <= haddr[11:10];
  end

  assign hready_out = ready_s[dsel];
  assign hrdata     = rdata_s[dsel];
  assign hresp      = resp_s[dsel];

  // ---------------------------------------------------------------- processors
  fp32_t soma_in  [NCELL_MAX][4], soma_out  [NCELL_MAX][4];
  fp32_t d0_in    [NCELL_MAX][4], d0_out    [NCELL_MAX][4];
  fp32_t d1_in    [NCELL_MAX][4], d1_out    [NCELL_MAX][4];
  fp32_t syn_in   [NCELL_MAX][4], syn_out   [NCELL_MAX][4];
  logic [NP-1:0] done;

  if (SOMA_KIND == KIND_HH) begin : g_hh
    hh_soma_proc u_soma (.clk, .rst_n, .hsel(sel[0]), .htrans, .hwrite, .haddr, .hwdata, .hready,
      .hready_out(ready_s[0]), .hrdata(rdata_s[0]), .hresp(resp_s[0]),
      .ext_in(soma_in), .ext_out(soma_out), .done(done[0]));
  end else begin : g_traub
    traub_soma_proc u_soma (.clk, .rst_n, .hsel(sel[0]), .htrans, .hwrite, .haddr, .hwdata, .hready,
      .hready_out(ready_s[0]), .hrdata(rdata_s[0]), .hresp(resp_s[0]),
      .ext_in(soma_in), .ext_out(soma_out), .done(done[0]));
  end
  dend_proc u_dend0 (.clk, .rst_n, .hsel(sel[1]), .htrans, .hwrite, .haddr, .hwdata, .hready,
    .hready_out(ready_s[1]), .hrdata(rdata_s[1]), .hresp(resp_s[1]),
    .ext_in(d0_in), .ext_out(d0_out), .done(done[1]));
  dend_proc u_dend1 (.clk, .rst_n, .hsel(sel[2]), .htrans, .hwrite, .haddr, .hwdata, .hready,
    .hready_out(ready_s[2]), .hrdata(rdata_s[2]), .hresp(resp_s[2]),
    .ext_in(d1_in), .ext_out(d1_out), .done(done[2]));
  syn_proc u_syn (.clk, .rst_n, .hsel(sel[3]), .htrans, .hwrite, .haddr, .hwdata, .hready,
    .hready_out(ready_s[3]), .hrdata(rdata_s[3]), .hresp(resp_s[3]),
    .ext_in(syn_in), .ext_out(syn_out), .done(done[3]));

  // ---------------------------------------------------------------- stimulus and DAC
  fp32_t stim_fp [2];
  logic  [1:0] stim_v_unused;
  fp32_t spike_fp [2];

  for (genvar n = 0; n < 2; n++) begin : g_neuron
    fix2float u_x2f (.clk, .rst_n, .in_valid(1'b1), .fix_in(stim_fix[n]),
                     .out_valid(stim_v_unused[n]), .res(stim_fp[n]));
    float2fix u_f2x (.clk, .rst_n, .in_valid(done[0]), .fp_in(soma_out[n][0]),
                     .out_valid(dac_valid[n]), .fix_out(dac_vm[n]));
    spike_detect u_spk (.clk, .rst_n, .strobe(done[0]), .vm(soma_out[n][0]),
                        .threshold(spike_threshold), .spike(spike[n]), .spike_fp(spike_fp[n]));
  end

  // ---------------------------------------------------------------- cell wiring
  always_comb begin
    for (int c = 0; c < NCELL_MAX; c++)
      for (int k = 0; k < 4; k++) begin
        soma_in[c][k] = FP_ZERO;
        d0_in[c][k]   = FP_ZERO;
        d1_in[c][k]   = FP_ZERO;
        syn_in[c][k]  = FP_ZERO;
      end
    // somata: proximal dendrite voltage and stimulus
    soma_in[0][0] = d0_out[0][0];
    soma_in[1][0] = d1_out[0][0];
    soma_in[0][1] = stim_fp[0];
    soma_in[1][1] = stim_fp[1];
    // dendritic chains: left neighbour, right neighbour, synaptic g and i
    d0_in[0][0] = soma_out[0][0];  d0_in[0][1] = d0_out[1][0];
    d0_in[1][0] = d0_out[0][0];    d0_in[1][1] = d0_out[2][0];
    d0_in[2][0] = d0_out[1][0];
    d0_in[2][2] = syn_out[0][0];   d0_in[2][3] = syn_out[0][1];
    d1_in[0][0] = soma_out[1][0];  d1_in[0][1] = d1_out[1][0];
    d1_in[1][0] = d1_out[0][0];    d1_in[1][1] = d1_out[2][0];
    d1_in[2][0] = d1_out[1][0];
    d1_in[2][2] = syn_out[1][0];   d1_in[2][3] = syn_out[1][1];
    // synapses: local dendritic voltage and the other neuron's spike
    syn_in[0][0] = d0_out[2][0];   syn_in[0][1] = spike_fp[1];
    syn_in[1][0] = d1_out[2][0];   syn_in[1][1] = spike_fp[0];
  end

  // ---------------------------------------------------------------- synchroniser
  nnwsynch #(.N(NP)) u_sync (.clk, .rst_n, .done, .mask('0), .sync_out(irq));

endmodule
