// fp_div: single precision floating point divider FPALU.
//
// Sign by XOR, exponent by subtraction and a restoring mantissa divider that
// produces one quotient bit per cycle. The dividend mantissa is pre-shifted
// when it is smaller than the divisor so the 25-bit quotient always has its
// leading one at the top; the remainder gives the sticky bit for round to
// nearest even. Division by zero or by/of infinity gives a signed infinity;
// 0/x gives zero; subnormals flush to zero. The original used a vendor core;
// this iterative form is this implementation's choice.
// Interface: in_valid/opa/opb accepted while in_ready; res is valid in the
// cycle out_valid is high, exactly LAT (26) cycles after the accepting cycle.
// One division is in flight at a time.
module fp_div
  import np_pkg::*;
#(
  parameter int unsigned LAT = LAT_DIV
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  fp32_t opa,
  input  fp32_t opb,
  output logic  out_valid,
  output fp32_t res
);

  localparam int unsigned QBITS = 25;

  logic        busy;
  logic [7:0]  cnt;
  logic [24:0] rem;
  logic [23:0] dvs;
  logic [QBITS-1:0] quo;
  logic        sign_q, inf_q, zero_q;
  logic signed [10:0] exp_q;   // ea - eb - pre-shift

  assign in_ready  = !busy;
  assign out_valid = busy && (cnt == 8'(LAT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy   <= 1'b1;
        cnt    <= 8'd1;
        sign_q <= opa[31] ^ opb[31];
        inf_q  <= fp_is_zero(opb) | fp_is_special(opa) | fp_is_special(opb);
        zero_q <= fp_is_zero(opa);
        dvs    <= fp_sig(opb);
        quo    <= '0;
        if (fp_sig(opa) < fp_sig(opb)) begin
          rem   <= {fp_sig(opa), 1'b0};
          exp_q <= 11'(opa[30:23]) - 11'(opb[30:23]) - 11'sd1;
        end else begin
          rem   <= {1'b0, fp_sig(opa)};
          exp_q <= 11'(opa[30:23]) - 11'(opb[30:23]);
        end
      end
    end else begin
      cnt <= cnt + 8'd1;
      if (cnt <= 8'(QBITS)) begin
        if (rem >= 25'(dvs)) begin
          quo <= {quo[QBITS-2:0], 1'b1};
          rem <= (rem - 25'(dvs)) << 1;
        end else begin
          quo <= {quo[QBITS-2:0], 1'b0};
          rem <= rem << 1;
        end
      end
      if (cnt == 8'(LAT)) busy <= 1'b0;
    end
  end

  always_comb begin
    if (inf_q)       res = {sign_q, 8'hFF, 23'd0};
    else if (zero_q) res = {sign_q, 31'd0};
    // quotient = quo * 2^-24 (leading one at bit 24); append the sticky bit
    else             res = fp_pack(sign_q, int'(exp_q) - 25, {38'd0, quo, |rem});
  end

endmodule
