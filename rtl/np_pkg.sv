// np_pkg: types and constants shared by the floating point neuroprocessors.
//
// Numbers are IEEE-754 single precision throughout, as in the original design.
// Subnormals are flushed to zero by every arithmetic unit (a choice of this
// implementation). The package also defines the micro-instruction format of the
// FSMC sequencer, the layout of the 256-word parameter-and-result memory and the
// fields of the CONFIG1 register.
package np_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_INF  = 32'h7F80_0000;

  // ALU latencies in clock cycles (from the ALU utilisation table of the design)
  localparam int unsigned LAT_ADD  = 8;
  localparam int unsigned LAT_MUL  = 8;
  localparam int unsigned LAT_DIV  = 26;
  localparam int unsigned LAT_EXP  = 170;
  localparam int unsigned LAT_CMP  = 3;
  localparam int unsigned LAT_CONV = 3;

  // Parameter-and-result memory layout
  localparam int unsigned PMEM_WORDS  = 256;
  localparam int unsigned ADDR_START  = 0;   // start register
  localparam int unsigned ADDR_CONFIG = 1;   // CONFIG1 register
  localparam int unsigned CELL_BASE0  = 8;   // first virtual cell
  localparam int unsigned CELL_WORDS  = 62;  // 8 configuration + 54 parameter words
  localparam int unsigned NCELL_MAX   = 4;

  // Offsets inside one virtual cell's 62-word block
  localparam int unsigned OFF_CFG   = 0;   // cell configuration word (integer bits below)
  localparam int unsigned OFF_COEF  = 8;   // 8..11: backward-Euler coefficients a,b,c,d
  localparam int unsigned OFF_VM    = 12;  // membrane voltage (state and result)

  // CONFIG1 fields
  localparam int unsigned CFG_NCELL_LSB = 0;  // [1:0] number of virtual cells - 1
  localparam int unsigned CFG_BACKWARD  = 2;  // 1: backward Euler, 0: exponential Euler
  localparam int unsigned CFG_ACTIVE    = 3;  // dendrite: 1 active (calcium channels), 0 passive

  // Cell configuration word bits
  localparam int unsigned CCFG_LEFT_SEALED  = 0;  // no left neighbour (gl ignored)
  localparam int unsigned CCFG_RIGHT_SEALED = 1;  // no right neighbour (gr ignored)
  localparam int unsigned CCFG_STIM_ON      = 2;  // soma: add the stimulus input current

  // Processor kinds
  typedef enum logic [1:0] {KIND_HH = 2'd0, KIND_DEND = 2'd1, KIND_SYN = 2'd2, KIND_TRAUB = 2'd3} np_kind_e;

  // Micro-operations of the FSMC sequencer
  typedef enum logic [3:0] {
    OP_END  = 4'd0,   // cell finished: wait until nothing is in flight
    OP_LDP  = 4'd1,   // var[d] <= pmem[cell_base + a]
    OP_STP  = 4'd2,   // pmem[cell_base + d] <= var[a]
    OP_LDX  = 4'd3,   // var[d] <= ext_in[cell][a]
    OP_STX  = 4'd4,   // ext_out[cell][d] <= var[a]
    OP_LDI  = 4'd5,   // var[d] <= imm
    OP_ADD  = 4'd6,
    OP_SUB  = 4'd7,
    OP_MUL  = 4'd8,
    OP_DIV  = 4'd9,
    OP_EXP  = 4'd10,  // var[d] <= exp(var[a])
    OP_CGT  = 4'd11,  // var[d] <= (var[a] > var[b]) ? 1.0 : 0.0
    OP_BRC  = 4'd12,  // if CONFIG1[a] == b[0] jump to imm
    OP_JMP  = 4'd13,  // jump to imm
    OP_BRV  = 4'd14   // if bit b of the raw word var[a] is 0 jump to imm
  } np_op_e;

  localparam int unsigned NVAR = 64;
  typedef logic [5:0] vidx_t;

  typedef struct packed {
    np_op_e op;
    vidx_t  a;
    vidx_t  b;
    vidx_t  d;
    fp32_t  imm;
  } np_instr_t;

  function automatic np_instr_t mk(np_op_e op, int a, int b, int d, fp32_t imm = '0);
    np_instr_t i;
    i.op = op; i.a = vidx_t'(a); i.b = vidx_t'(b); i.d = vidx_t'(d); i.imm = imm;
    return i;
  endfunction

  // Unpacked view of a float
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] man;
  } fp_fields_t;

  // Normalise and round (to nearest, ties to even) the value sig * 2^e into a
  // single precision number of the given sign. Overflow gives infinity and
  // results below the normal range give zero.
  function automatic fp32_t fp_pack(logic sign, int e, logic [63:0] sig);
    int lz;
    logic [63:0] n;
    logic [24:0] m;
    logic rnd;
    int be;
    if (sig == '0) return {sign, 31'd0};
    lz = 0;
    for (int k = 63; k >= 0; k--) begin
      if (sig[k]) break;
      lz++;
    end
    n   = sig << lz;
    rnd = n[39] & ((|n[38:0]) | n[40]);
    m   = {1'b0, n[63:40]} + 25'(rnd);
    be  = e - lz + 63 + 127;
    if (m[24]) begin
      m  = m >> 1;
      be = be + 1;
    end
    if (be >= 255) return {sign, 8'hFF, 23'd0};
    if (be <= 0)   return {sign, 31'd0};
    return {sign, be[7:0], m[22:0]};
  endfunction

  function automatic logic fp_is_zero(fp32_t x);
    return x[30:23] == 8'd0;
  endfunction

  function automatic logic fp_is_special(fp32_t x);
    return x[30:23] == 8'hFF;
  endfunction

  // Significand with hidden bit; zero for zero and subnormal inputs
  function automatic logic [23:0] fp_sig(fp32_t x);
    return (x[30:23] == 8'd0) ? 24'd0 : {1'b1, x[22:0]};
  endfunction

endpackage
