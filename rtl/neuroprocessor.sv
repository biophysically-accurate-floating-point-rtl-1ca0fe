// neuroprocessor: the generic configurable floating point neuroprocessor.
//
// Datapath: one adder/subtractor, one multiplier, one divider, one CORDIC
// exponential and (for the dendritic and synaptic kinds) one comparator, all
// single precision. Temporary variables live in an internal memory of NVAR
// 32-bit words that every ALU operand port reads and every ALU result bus
// writes. Control: an FSMC sequencer steps through the micro-program of the
// processor kind (np_ucode_pkg) once per virtual cell. It issues at most one
// micro-instruction per cycle, in program order, and stalls while an operand
// or the destination is still being computed (a per-variable pending bit) or
// while the divider or exponential unit is busy, so all ALUs work in parallel
// whenever the program allows. Loads and stores move words between the
// internal memory and the 256 x 32 parameter-and-result memory (port B of a
// dual-port RAM whose port A is on the AHB-lite bus), and to/from wires shared
// with neighbouring processors (ext_in/ext_out, one set per virtual cell).
// The control logic starts a time step on a bus write of 1 to word 0, runs
// CONFIG1[1:0]+1 virtual cells in turn and raises done.
// Branches: BRC tests a CONFIG1 bit, BRV tests one bit of a variable's raw
// pattern (used for the per-cell configuration word). The soma kinds build
// no comparator; their programs contain no CGT, so cmp_iv never rises there.
// Following the original: the ALU set and latencies, the memory size and
// layout of the first words, the cell multiplexing and the bus attachment.
// Own choices: one shared internal memory instead of a pair per ALU, and a
// scoreboarded in-order sequencer instead of hand-scheduled per-ALU FSMs.
module neuroprocessor
  import np_pkg::*;
  import np_ucode_pkg::*;
#(
  parameter np_kind_e    KIND     = KIND_DEND,
  parameter int unsigned NEXT_IN  = 4,
  parameter int unsigned NEXT_OUT = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // AHB-lite slave
  input  logic        hsel,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] haddr,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic        hready_out,
  output logic [31:0] hrdata,
  output logic        hresp,
  // wires to and from neighbouring processors, per virtual cell
  input  fp32_t       ext_in  [NCELL_MAX][NEXT_IN],
  output fp32_t       ext_out [NCELL_MAX][NEXT_OUT],
  output logic        done
);

  localparam bit HAS_CMP = (KIND == KIND_DEND) || (KIND == KIND_SYN);

  // ---------------------------------------------------------------- memories
  logic        a_we;
  logic [7:0]  a_addr;
  logic [31:0] a_wdata, a_rdata;
  logic        b_we;
  logic [7:0]  b_addr;
  logic [31:0] b_wdata, b_rdata;
  logic        wr_evt;
  logic [7:0]  wr_addr;
  logic [31:0] wr_data;

  ahb_mem_ctrl #(.AW(8)) u_bus (
    .clk, .rst_n, .hsel, .htrans, .hwrite, .haddr, .hwdata, .hready,
    .hready_out, .hrdata, .hresp,
    .ram_we(a_we), .ram_addr(a_addr), .ram_wdata(a_wdata), .ram_rdata(a_rdata),
    .wr_evt, .wr_addr, .wr_data
  );

  dpram #(.DEPTH(PMEM_WORDS), .WIDTH(32)) u_pmem (
    .clk,
    .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_we, .b_addr, .b_wdata, .b_rdata
  );

  // ---------------------------------------------------------------- control
  logic        run, cell_done;
  logic [1:0]  cell_idx;
  logic [7:0]  cell_base;
  logic [31:0] config1;

  np_ctrl u_ctrl (
    .clk, .rst_n, .wr_evt, .wr_addr, .wr_data, .cell_done,
    .run, .cell_idx, .cell_base, .config1, .done
  );

  // ---------------------------------------------------------------- ALUs
  logic  add_iv, add_sub, mul_iv, div_iv, exp_iv, cmp_iv;
  fp32_t opa, opb;
  logic  add_ov, mul_ov, div_ov, exp_ov, cmp_ov;
  logic  div_rdy, exp_rdy;
  fp32_t add_res, mul_res, div_res, exp_res, cmp_res;

  fp_add u_add (.clk, .rst_n, .in_valid(add_iv), .sub(add_sub), .opa, .opb,
                .out_valid(add_ov), .res(add_res));
  fp_mul u_mul (.clk, .rst_n, .in_valid(mul_iv), .opa, .opb,
                .out_valid(mul_ov), .res(mul_res));
  fp_div u_div (.clk, .rst_n, .in_valid(div_iv), .in_ready(div_rdy), .opa, .opb,
                .out_valid(div_ov), .res(div_res));
  fp_exp u_exp (.clk, .rst_n, .in_valid(exp_iv), .in_ready(exp_rdy), .opa,
                .out_valid(exp_ov), .res(exp_res));

  if (HAS_CMP) begin : g_cmp
    logic lt_unused, eq_unused, gt_unused;
    fp_cmp u_cmp (.clk, .rst_n, .in_valid(cmp_iv), .opa, .opb,
                  .out_valid(cmp_ov), .lt(lt_unused), .eq(eq_unused), .gt(gt_unused),
                  .res(cmp_res));
  end else begin : g_nocmp
    assign cmp_ov  = 1'b0;
    assign cmp_res = FP_ZERO;
  end

  // destination tags travelling alongside the ALU pipelines
  vidx_t add_tag [LAT_ADD];
  vidx_t mul_tag [LAT_MUL];
  vidx_t cmp_tag [LAT_CMP];
  vidx_t div_tag, exp_tag, ldp_tag;
  logic  ldp_v;

  // ---------------------------------------------------------------- sequencer
  logic [7:0]  pc;
  np_instr_t   ins;
  fp32_t       vars [NVAR];
  logic [NVAR-1:0] pend;
  logic        uses_a, uses_b, writes_d, unit_ok, issue;

  assign ins = ucode(KIND, pc);
  assign opa = vars[ins.a];
  assign opb = vars[ins.b];

  always_comb begin
    uses_a   = 1'b0;
    uses_b   = 1'b0;
    writes_d = 1'b0;
    unit_ok  = 1'b1;
    unique case (ins.op)
      OP_ADD, OP_SUB, OP_MUL, OP_CGT: begin uses_a = 1'b1; uses_b = 1'b1; writes_d = 1'b1; end
      OP_DIV: begin uses_a = 1'b1; uses_b = 1'b1; writes_d = 1'b1; unit_ok = div_rdy; end
      OP_EXP: begin uses_a = 1'b1; writes_d = 1'b1; unit_ok = exp_rdy; end
      OP_STP, OP_STX, OP_BRV: uses_a = 1'b1;
      OP_LDP, OP_LDX, OP_LDI: writes_d = 1'b1;
      OP_END: unit_ok = (pend == '0) && !ldp_v;
      default: ;
    endcase
    issue = run && unit_ok
            && !(uses_a && pend[ins.a]) && !(uses_b && pend[ins.b])
            && !(writes_d && pend[ins.d]);
  end

  assign add_iv    = issue && (ins.op == OP_ADD || ins.op == OP_SUB);
  assign add_sub   = (ins.op == OP_SUB);
  assign mul_iv    = issue && (ins.op == OP_MUL);
  assign div_iv    = issue && (ins.op == OP_DIV);
  assign exp_iv    = issue && (ins.op == OP_EXP);
  assign cmp_iv    = issue && (ins.op == OP_CGT);
  assign cell_done = issue && (ins.op == OP_END);

  // parameter memory port B: loads read, stores write
  assign b_we    = issue && (ins.op == OP_STP);
  assign b_addr  = cell_base + ((ins.op == OP_STP) ? 8'(ins.d) : 8'(ins.a));
  assign b_wdata = opa;

  always_ff @(posedge clk) begin
    // tag pipelines (no reset needed: only read together with a valid bit)
    add_tag[0] <= ins.d;
    mul_tag[0] <= ins.d;
    cmp_tag[0] <= ins.d;
    for (int i = 1; i < LAT_ADD; i++) add_tag[i] <= add_tag[i-1];
    for (int i = 1; i < LAT_MUL; i++) mul_tag[i] <= mul_tag[i-1];
    for (int i = 1; i < LAT_CMP; i++) cmp_tag[i] <= cmp_tag[i-1];
    if (div_iv) div_tag <= ins.d;
    if (exp_iv) exp_tag <= ins.d;
    ldp_tag <= ins.d;

    // result write-back into the internal memory
    if (add_ov) vars[add_tag[LAT_ADD-1]] <= add_res;
    if (mul_ov) vars[mul_tag[LAT_MUL-1]] <= mul_res;
    if (cmp_ov) vars[cmp_tag[LAT_CMP-1]] <= cmp_res;
    if (div_ov) vars[div_tag] <= div_res;
    if (exp_ov) vars[exp_tag] <= exp_res;
    if (ldp_v)  vars[ldp_tag] <= b_rdata;
    if (issue && ins.op == OP_LDX) vars[ins.d] <= ext_in[cell_idx][ins.a[1:0]];
    if (issue && ins.op == OP_LDI) vars[ins.d] <= ins.imm;
    if (issue && ins.op == OP_STX) ext_out[cell_idx][ins.d[1:0]] <= opa;

    if (!rst_n) begin
      pc    <= '0;
      pend  <= '0;
      ldp_v <= 1'b0;
      for (int c = 0; c < NCELL_MAX; c++)
        for (int k = 0; k < NEXT_OUT; k++) ext_out[c][k] <= FP_ZERO;
    end else begin
      ldp_v <= issue && (ins.op == OP_LDP);
      // pending bits: set on issue of a multi-cycle producer, cleared on write-back
      for (int v = 0; v < NVAR; v++) begin
        if ((add_ov && add_tag[LAT_ADD-1] == vidx_t'(v)) ||
            (mul_ov && mul_tag[LAT_MUL-1] == vidx_t'(v)) ||
            (cmp_ov && cmp_tag[LAT_CMP-1] == vidx_t'(v)) ||
            (div_ov && div_tag == vidx_t'(v)) ||
            (exp_ov && exp_tag == vidx_t'(v)) ||
            (ldp_v  && ldp_tag == vidx_t'(v)))
          pend[v] <= 1'b0;
      end
      if (issue && writes_d && !(ins.op inside {OP_LDX, OP_LDI})) pend[ins.d] <= 1'b1;
      if (issue) begin
        unique case (ins.op)
          OP_END: pc <= '0;
          OP_JMP: pc <= ins.imm[7:0];
          OP_BRC: pc <= (config1[ins.a[4:0]] == ins.b[0]) ? ins.imm[7:0] : pc + 8'd1;
          OP_BRV: pc <= opa[ins.b[4:0]] ? pc + 8'd1 : ins.imm[7:0];
          default: pc <= pc + 8'd1;
        endcase
      end
    end
  end

  // the scoreboard must never see two in-flight writers of one variable
  assert property (@(posedge clk) disable iff (!rst_n)
                   issue && writes_d |-> !pend[ins.d]);

endmodule
