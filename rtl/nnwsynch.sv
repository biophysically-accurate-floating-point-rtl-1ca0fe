// nnwsynch: network synchroniser. Watches the done flags of N neuroprocessors
// and raises sync_out for one cycle when all of them have finished the current
// time step, so that a single GPIO line (and from there one interrupt) tells
// the host that the whole network has completed the step. It re-arms when any
// done flag falls, i.e. when the host starts the next step. Setting bits of
// mask excludes processors that are not in use.
module nnwsynch #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] done,
  input  logic [N-1:0] mask,
  output logic         sync_out
);

  logic all_done, armed;
  assign all_done = &(done | mask) && !(&mask);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      armed    <= 1'b1;
      sync_out <= 1'b0;
    end else begin
      sync_out <= 1'b0;
      if (armed && all_done) begin
        sync_out <= 1'b1;
        armed    <= 1'b0;
      end else if (!all_done) begin
        armed <= 1'b1;
      end
    end
  end

endmodule
