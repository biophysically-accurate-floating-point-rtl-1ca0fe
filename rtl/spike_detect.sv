// spike_detect: turns a somatic membrane voltage into a spike event for the
// synapses of other cells. When strobe (the soma processor's done) rises, the
// new voltage is compared with the threshold on a floating point comparator;
// spike is raised if the voltage is above threshold now and was not after the
// previous step (an upward crossing), and holds until the next strobe. The
// spike is presented as 1.0/0.0 in single precision (spike_fp) for a
// synaptic processor's input wire. Where the spike is detected is this
// implementation's choice; the original only says the soma sends its spikes
// to the synaptic processor.
module spike_detect
  import np_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  strobe,
  input  fp32_t vm,
  input  fp32_t threshold,
  output logic  spike,
  output fp32_t spike_fp
);

  logic strobe_q, cmp_v, gt, prev_above;
  logic lt_unused, eq_unused;
  fp32_t res_unused;

  always_ff @(posedge clk) strobe_q <= strobe;

  fp_cmp u_cmp (.clk, .rst_n, .in_valid(strobe && !strobe_q), .opa(vm), .opb(threshold),
                .out_valid(cmp_v), .lt(lt_unused), .eq(eq_unused), .gt, .res(res_unused));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      spike      <= 1'b0;
      prev_above <= 1'b0;
    end else if (cmp_v) begin
      spike      <= gt && !prev_above;
      prev_above <= gt;
    end
  end

  assign spike_fp = spike ? FP_ONE : FP_ZERO;

endmodule
