// fp_mul: single precision floating point multiplier FPALU.
//
// Sign by XOR, exponent by addition, 24x24 mantissa product from the
// four-slice dsp_mant_mult, then normalisation, round to nearest even and
// exponent adjust. Subnormals flush to zero; infinity or NaN operands give a
// signed infinity (own simplification).
// Interface: in_valid/opa/opb in, out_valid/res out; fully pipelined, result
// 8 cycles after in_valid (6 in the mantissa multiplier, 1 for normalise and
// round, 1 output register), matching the latency of the original unit.
module fp_mul
  import np_pkg::*;
#(
  parameter int unsigned LAT = LAT_MUL
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t opa,
  input  fp32_t opb,
  output logic  out_valid,
  output fp32_t res
);

  localparam int unsigned MLAT = 6;
  localparam int unsigned XLAT = LAT - MLAT;   // stages after the multiplier

  typedef struct packed {
    logic       sign;
    logic [9:0] esum;   // ea + eb, unbiased later
    logic       zero;
    logic       special;
  } side_t;

  side_t side_in;
  side_t side_q [MLAT];
  logic [49:0] prod;
  logic        prod_v;
  fp32_t       out_q [XLAT];
  logic        v_q   [XLAT];

  assign side_in.sign    = opa[31] ^ opb[31];
  assign side_in.esum    = 10'(opa[30:23]) + 10'(opb[30:23]);
  assign side_in.zero    = fp_is_zero(opa) | fp_is_zero(opb);
  assign side_in.special = fp_is_special(opa) | fp_is_special(opb);

  dsp_mant_mult #(.LAT(MLAT)) u_mant (
    .clk, .rst_n, .in_valid,
    .man_a(fp_sig(opa)), .man_b(fp_sig(opb)),
    .out_valid(prod_v), .prod
  );

  always_ff @(posedge clk) begin
    side_q[0] <= side_in;
    for (int i = 1; i < MLAT; i++) side_q[i] <= side_q[i-1];
  end

  function automatic fp32_t finish(side_t s, logic [49:0] p);
    if (s.special) return {s.sign, 8'hFF, 23'd0};
    if (s.zero)    return {s.sign, 31'd0};
    return fp_pack(s.sign, int'(s.esum) - 254 - 46, {14'd0, p});
  endfunction

  always_ff @(posedge clk) begin
    out_q[0] <= finish(side_q[MLAT-1], prod);
    for (int i = 1; i < XLAT; i++) out_q[i] <= out_q[i-1];
    if (!rst_n) begin
      for (int i = 0; i < XLAT; i++) v_q[i] <= 1'b0;
    end else begin
      v_q[0] <= prod_v;
      for (int i = 1; i < XLAT; i++) v_q[i] <= v_q[i-1];
    end
  end

  assign res       = out_q[XLAT-1];
  assign out_valid = v_q[XLAT-1];

endmodule
