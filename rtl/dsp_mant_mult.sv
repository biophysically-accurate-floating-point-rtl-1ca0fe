// dsp_mant_mult: 24x24-bit mantissa multiplier built from four DSP-style
// 18-bit multiplier slices, as in the multiplier FPALU of the neuroprocessor.
//
// Each mantissa is split into a high part ('0' & man[23:12], 13 bits) and a low
// part (man[11:0], 12 bits). Slice D forms lo*lo, slice C hi(a)*lo(b), slice B
// lo(a)*hi(b) and slice A hi*hi. The slices are chained: each post-adder adds
// the previous slice's sum shifted right by 12 bits (the C slice takes D
// shifted, B takes C unshifted and A takes B shifted), and the low 12 bits of
// the D and B sums are kept as product bits [11:0] and [23:12]. The slice
// order and widths follow the original drawing; the cascade stagger (one
// extra cycle per slice) is this implementation's own pipelining.
// Interface: in_valid, man_a, man_b in; out_valid, prod (50 bits, the top two
// always zero) out, LAT = 6 cycles after in_valid, one product per cycle.
module dsp_mant_mult #(
  parameter int unsigned LAT = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [23:0] man_a,
  input  logic [23:0] man_b,
  output logic        out_valid,
  output logic [49:0] prod
);

  // stage 1: input registers of the four slices
  logic [12:0] a_hi, b_hi;
  logic [11:0] a_lo, b_lo;
  // stage 2: multiplier output registers
  logic [25:0] pa;
  logic [24:0] pb, pc;
  logic [23:0] pd;
  // post-adder registers, staggered: D at 3, C at 4, B at 5, A at 6
  logic [23:0] sd;
  logic [24:0] sc;
  logic [25:0] sb;
  logic [25:0] sa;
  // delayed products waiting for their cascade input
  logic [24:0] pc_d1, pb_d1, pb_d2;
  logic [25:0] pa_d1, pa_d2, pa_d3;
  // low product bits carried to the output
  logic [11:0] lsb_d_4, lsb_d_5, lsb_d_6, lsb_b_6;
  logic [LAT-1:0] vpipe;

  always_ff @(posedge clk) begin
    a_hi <= {1'b0, man_a[23:12]};
    a_lo <= man_a[11:0];
    b_hi <= {1'b0, man_b[23:12]};
    b_lo <= man_b[11:0];

    pa <= 26'(a_hi * b_hi);
    pb <= 25'(a_lo * b_hi);
    pc <= 25'(a_hi * b_lo);
    pd <= 24'(a_lo * b_lo);

    // slice D
    sd    <= pd;
    pc_d1 <= pc;
    pb_d1 <= pb;
    pa_d1 <= pa;
    // slice C: hi(a)*lo(b) + (D >> 12)
    sc      <= pc_d1 + 25'(sd[23:12]);
    lsb_d_4 <= sd[11:0];
    pb_d2   <= pb_d1;
    pa_d2   <= pa_d1;
    // slice B: lo(a)*hi(b) + C
    sb      <= 26'(pb_d2) + 26'(sc);
    lsb_d_5 <= lsb_d_4;
    pa_d3   <= pa_d2;
    // slice A: hi*hi + (B >> 12)
    sa      <= pa_d3 + 26'(sb[25:12]);
    lsb_b_6 <= sb[11:0];
    lsb_d_6 <= lsb_d_5;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  end

  assign prod      = {sa, lsb_b_6, lsb_d_6};
  assign out_valid = vpipe[LAT-1];

endmodule
