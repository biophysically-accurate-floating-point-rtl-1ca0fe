// fix2float: converts a signed 32-bit fixed point number with FRAC fraction
// bits (default 16, i.e. 15 integer bits plus sign) to single precision.
// Used for the stimulus input coming from the analogue board. The fixed point
// format is this implementation's choice; the original names the unit and its
// 3-cycle latency only.
// Stage 1 takes the magnitude, stage 2 normalises and rounds to nearest even,
// stage 3 is the output register. Fully pipelined, LAT = 3.
module fix2float
  import np_pkg::*;
#(
  parameter int unsigned FRAC = 16,
  parameter int unsigned LAT  = LAT_CONV
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] fix_in,
  output logic        out_valid,
  output fp32_t       res
);

  logic        sgn1;
  logic [31:0] mag1;
  fp32_t       r2, r3;
  logic [LAT-1:0] vq;

  always_ff @(posedge clk) begin
    sgn1 <= fix_in[31];
    mag1 <= fix_in[31] ? (~fix_in + 32'd1) : fix_in;
    r2   <= fp_pack(sgn1, -int'(FRAC), {32'd0, mag1});
    r3   <= r2;
    if (!rst_n) vq <= '0;
    else        vq <= {vq[LAT-2:0], in_valid};
  end

  assign res       = r3;
  assign out_valid = vq[LAT-1];

endmodule
