// fp_cmp: single precision floating point comparator FPALU.
//
// The comparison is made in three steps, one per pipeline stage, and a step is
// only consulted when the previous one found its fields equal: a sign look-up
// (which also treats +0 and -0 as equal and orders opposite signs), then the
// exponents, then the mantissas. For two negative numbers the magnitude order
// is reversed. Subnormals count as zero.
// Interface: in_valid/opa/opb in; three cycles later out_valid with lt/eq/gt
// flags and res = 1.0 when opa > opb, else 0.0 (a 32-bit float result so the
// FSMC can use it arithmetically as a selector; the encoding is this
// implementation's choice). Fully pipelined.
module fp_cmp
  import np_pkg::*;
#(
  parameter int unsigned LAT = LAT_CMP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t opa,
  input  fp32_t opb,
  output logic  out_valid,
  output logic  lt,
  output logic  eq,
  output logic  gt,
  output fp32_t res
);

  typedef enum logic [1:0] {C_UNDECIDED, C_LT, C_EQ, C_GT} cmp_e;

  typedef struct packed {
    cmp_e        st;
    logic        neg;       // both negative: reverse magnitude order
    logic [7:0]  ea, eb;
    logic [22:0] ma, mb;
  } stage_t;

  stage_t s1, s2;
  cmp_e   s3;
  logic [2:0] vq;

  // step 1: sign look-up table
  function automatic stage_t sign_step(fp32_t a, fp32_t b);
    stage_t s;
    logic za, zb;
    za = fp_is_zero(a);
    zb = fp_is_zero(b);
    s.ea = a[30:23]; s.eb = b[30:23];
    s.ma = za ? 23'd0 : a[22:0];
    s.mb = zb ? 23'd0 : b[22:0];
    s.neg = a[31] & b[31];
    if (za && zb)              s.st = C_EQ;
    else if (za)               s.st = b[31] ? C_GT : C_LT;
    else if (zb)               s.st = a[31] ? C_LT : C_GT;
    else if (a[31] != b[31])   s.st = a[31] ? C_LT : C_GT;
    else                       s.st = C_UNDECIDED;
    return s;
  endfunction

  function automatic cmp_e order(logic less, logic neg);
    return (less ^ neg) ? C_LT : C_GT;
  endfunction

  always_ff @(posedge clk) begin
    s1 <= sign_step(opa, opb);
    // step 2: exponent comparator, selected by the sign step
    s2 <= s1;
    if (s1.st == C_UNDECIDED && s1.ea != s1.eb) s2.st <= order(s1.ea < s1.eb, s1.neg);
    // step 3: mantissa comparator, selected by the exponent step
    s3 <= s2.st;
    if (s2.st == C_UNDECIDED)
      s3 <= (s2.ma == s2.mb) ? C_EQ : order(s2.ma < s2.mb, s2.neg);
    if (!rst_n) vq <= '0;
    else        vq <= {vq[1:0], in_valid};
  end

  assign out_valid = vq[LAT-1];
  assign lt  = (s3 == C_LT);
  assign eq  = (s3 == C_EQ);
  assign gt  = (s3 == C_GT);
  assign res = gt ? FP_ONE : FP_ZERO;

endmodule
