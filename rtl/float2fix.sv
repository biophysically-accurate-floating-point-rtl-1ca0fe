// float2fix: converts single precision to a signed 32-bit fixed point number
// with FRAC fraction bits (default 16). Used to pass membrane voltages to the
// DAC side. Rounds toward zero and saturates to the largest positive or
// negative code; these choices and the format are this implementation's own.
// Stage 1 unpacks, stage 2 shifts, stage 3 applies sign and saturation.
// Fully pipelined, LAT = 3 as in the original.
module float2fix
  import np_pkg::*;
#(
  parameter int unsigned FRAC = 16,
  parameter int unsigned LAT  = LAT_CONV
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  fp32_t       fp_in,
  output logic        out_valid,
  output logic [31:0] fix_out
);

  logic        sgn1, sgn2;
  logic [23:0] sig1;
  logic signed [9:0] sh1;     // left shift of the significand
  logic [31:0] mag2;
  logic        ovf2;
  logic [LAT-1:0] vq;

  always_ff @(posedge clk) begin
    sgn1 <= fp_in[31];
    sig1 <= fp_sig(fp_in);
    sh1  <= 10'(fp_in[30:23]) - 10'sd127 - 10'sd23 + 10'(FRAC);
    // stage 2: shift into position, flag overflow
    sgn2 <= sgn1;
    ovf2 <= 1'b0;
    if (sh1 >= 0) begin
      if (sh1 > 10'sd7) ovf2 <= (sig1 != '0);
      mag2 <= 32'(sig1) << sh1;
    end else begin
      mag2 <= (sh1 < -10'sd24) ? 32'd0 : 32'(sig1 >> (-sh1));
    end
    // stage 3: sign and saturation
    if (ovf2 || mag2[31]) fix_out <= sgn2 ? 32'h8000_0000 : 32'h7FFF_FFFF;
    else                  fix_out <= sgn2 ? (~mag2 + 32'd1) : mag2;
    if (!rst_n) vq <= '0;
    else        vq <= {vq[LAT-2:0], in_valid};
  end

  assign out_valid = vq[LAT-1];

endmodule
