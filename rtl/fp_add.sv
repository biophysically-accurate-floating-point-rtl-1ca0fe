// fp_add: single precision floating point adder/subtractor FPALU.
//
// Structure follows the adder of the generic neuroprocessor: sign control,
// exponent difference, alignment shift of the smaller mantissa, mantissa
// add/subtract, normalisation with exponent increment/decrement. The result is
// rounded to nearest even; subnormals flush to zero (own choice, the design
// used a vendor core whose modes are not stated).
// Interface: in_valid/opa/opb/sub in, out_valid/res out. Fully pipelined: one
// operation per cycle, result LAT cycles (8, as in the original) after in_valid.
// The arithmetic is computed in the first stage and the remaining stages are a
// register chain that synthesis retiming can balance.
module fp_add
  import np_pkg::*;
#(
  parameter int unsigned LAT = LAT_ADD
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sub,
  input  fp32_t opa,
  input  fp32_t opb,
  output logic  out_valid,
  output fp32_t res
);

  function automatic fp32_t add_f(fp32_t a, fp32_t b);
    fp32_t big, sml;
    logic [63:0] sb, ss, sum;
    logic [63:0] shifted;
    logic sticky;
    int d;
    if (fp_is_special(a)) return a;
    if (fp_is_special(b)) return b;
    if (a[30:0] >= b[30:0]) begin big = a; sml = b; end
    else begin big = b; sml = a; end
    if (fp_is_zero(sml)) return fp_is_zero(big) ? {big[31] & sml[31], 31'd0} : big;
    d  = int'(big[30:23]) - int'(sml[30:23]);
    sb = {1'b0, fp_sig(big), 39'd0};
    ss = {1'b0, fp_sig(sml), 39'd0};
    if (d > 63) begin
      shifted = '0;
      sticky  = 1'b1;
    end else begin
      shifted = ss >> d;
      sticky  = |(ss & ~({64{1'b1}} << d));
    end
    sum = (big[31] == sml[31]) ? sb + shifted : sb - shifted;
    sum[0] = sum[0] | sticky;
    if (sum == '0) return FP_ZERO;
    return fp_pack(big[31], int'(big[30:23]) - 127 - 23 - 39, sum);
  endfunction

  fp32_t pipe_d [LAT];
  logic  pipe_v [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pipe_v[i] <= 1'b0;
    end else begin
      pipe_v[0] <= in_valid;
      for (int i = 1; i < LAT; i++) pipe_v[i] <= pipe_v[i-1];
    end
    pipe_d[0] <= add_f(opa, sub ? {~opb[31], opb[30:0]} : opb);
    for (int i = 1; i < LAT; i++) pipe_d[i] <= pipe_d[i-1];
  end

  assign out_valid = pipe_v[LAT-1];
  assign res       = pipe_d[LAT-1];

endmodule
