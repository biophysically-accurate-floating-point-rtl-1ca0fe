// fp_exp: single precision exponential FPALU based on hyperbolic CORDIC.
//
// Three parts, as in the original exponential unit:
//  * exponent pre-processing: a threshold test (|x| >= 128 saturates to
//    infinity or zero, x = 0 gives 1), a float-to-fixed conversion of x to a
//    Q23.40 number and a range reduction x = k*ln2 + r with |r| <= ln2/2, which
//    puts r inside the CORDIC convergence range;
//  * CORDIC processing: 30 hyperbolic rotation steps (shifts 1..28, with 4 and
//    13 repeated) starting from x = 1/K, y = 0, z = r, using an arctanh table;
//    afterwards x + y = e^r;
//  * post-processing: the exponent of e^r is adjusted by k, with rounding to
//    nearest even and overflow/underflow to infinity/zero.
// The CORDIC here works in 40-bit-fraction fixed point rather than with
// floating point adders (own choice). It needs 31 cycles; the result is
// presented LAT cycles after acceptance (170, the latency of the original
// unit). One operation is in flight at a time; in_ready shows when it is idle.
module fp_exp
  import np_pkg::*;
#(
  parameter int unsigned LAT = LAT_EXP
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  fp32_t opa,
  output logic  out_valid,
  output fp32_t res
);

  localparam int unsigned F     = 40;
  localparam int unsigned NSTEP = 30;
  localparam logic signed [63:0] INV_K   = 64'sd1327657066511;  // 1/prod(sqrt(1-2^-2i)) in Q.40
  localparam logic signed [63:0] LN2     = 64'sd762123384786;   // ln 2 in Q.40
  localparam logic signed [63:0] INV_LN2 = 64'sd1549082005;     // 1/ln 2 in Q.30
  // atanh(2^-i), i = 1..28, in Q.40
  localparam logic [40:0] ATANH [28] = '{
    41'd603968492904, 41'd280829356548, 41'd138161568061, 41'd68809165523,
    41'd34370929737, 41'd17181267490, 41'd8590109361, 41'd4294989142,
    41'd2147486379, 41'd1073742165, 41'd536870955, 41'd268435461,
    41'd134217729, 41'd67108864, 41'd33554432, 41'd16777216, 41'd8388608,
    41'd4194304, 41'd2097152, 41'd1048576, 41'd524288, 41'd262144,
    41'd131072, 41'd65536, 41'd32768, 41'd16384, 41'd8192, 41'd4096};

  // shift amount of CORDIC step s (steps 4 and 13 repeated)
  function automatic int step_shift(int s);
    if (s < 4)  return s + 1;
    if (s < 14) return s;
    return s - 1;
  endfunction

  typedef enum logic [1:0] {PRE_NORMAL, PRE_ONE, PRE_INF, PRE_ZERO} pre_e;

  // ---------------- exponent pre-processing (combinational on the input)
  logic signed [63:0] xfix, r_pre;
  logic signed [95:0] kprod;
  logic signed [31:0] k_pre;
  pre_e cls_pre;

  always_comb begin
    logic [63:0] mag;
    int e;
    e   = int'(opa[30:23]);
    mag = '0;
    if (e >= 110) mag = 64'(fp_sig(opa)) << (e - 110);
    else if (e > 86) mag = 64'(fp_sig(opa)) >> (110 - e);
    xfix = opa[31] ? -$signed(mag) : $signed(mag);
    if (opa[30:23] == 8'd0)       cls_pre = PRE_ONE;
    else if (e >= 127 + 7)        cls_pre = opa[31] ? PRE_ZERO : PRE_INF;
    else                          cls_pre = PRE_NORMAL;
    kprod = 96'(xfix) * 96'(INV_LN2);
    k_pre = 32'((kprod + (96'sd1 <<< (F + 29))) >>> (F + 30));
    r_pre = xfix - 64'(k_pre) * LN2;
  end

  // ---------------- CORDIC processing
  logic busy;
  logic [7:0] cnt;
  logic signed [63:0] cx, cy, cz;
  logic signed [31:0] k_q;
  pre_e cls_q;

  assign in_ready  = !busy;
  assign out_valid = busy && (cnt == 8'(LAT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy  <= 1'b1;
        cnt   <= 8'd1;
        cx    <= INV_K;
        cy    <= '0;
        cz    <= r_pre;
        k_q   <= k_pre;
        cls_q <= cls_pre;
      end
    end else begin
      cnt <= cnt + 8'd1;
      if (cnt <= 8'(NSTEP)) begin
        automatic int sh = step_shift(int'(cnt) - 1);
        automatic logic signed [63:0] at = 64'(ATANH[sh-1]);
        if (!cz[63]) begin
          cx <= cx + (cy >>> sh);
          cy <= cy + (cx >>> sh);
          cz <= cz - at;
        end else begin
          cx <= cx - (cy >>> sh);
          cy <= cy - (cx >>> sh);
          cz <= cz + at;
        end
      end
      if (cnt == 8'(LAT)) busy <= 1'b0;
    end
  end

  // ---------------- post-processing: exponent adjustment
  always_comb begin
    unique case (cls_q)
      PRE_ONE:  res = FP_ONE;
      PRE_INF:  res = FP_INF;
      PRE_ZERO: res = FP_ZERO;
      default:  res = fp_pack(1'b0, int'(k_q) - int'(F), 64'(cx + cy));
    endcase
  end

endmodule
