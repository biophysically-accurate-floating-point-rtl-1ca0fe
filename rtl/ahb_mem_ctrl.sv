// ahb_mem_ctrl: AHB-lite slave that maps the parameter-and-result memory of a
// neuroprocessor onto the system bus (the "memory controller" of the generic
// neuroprocessor).
//
// Only 32-bit word transfers are supported; haddr[AW+1:2] selects the word.
// Writes complete with no wait state: the RAM is written in the data phase.
// Reads insert one wait state: the RAM is read in the first data-phase cycle
// and hrdata is valid, with hready_out high, in the second. The response is
// always OKAY. Every bus write is also reported on wr_evt/wr_addr/wr_data so
// that the control logic can decode the start and CONFIG1 registers. The wait
// state policy is this implementation's choice; the original only names the
// block.
module ahb_mem_ctrl #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  // AHB-lite slave
  input  logic          hsel,
  input  logic [1:0]    htrans,
  input  logic          hwrite,
  input  logic [31:0]   haddr,
  input  logic [31:0]   hwdata,
  input  logic          hready,      // bus-wide HREADY
  output logic          hready_out,
  output logic [31:0]   hrdata,
  output logic          hresp,
  // RAM port
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output logic [31:0]   ram_wdata,
  input  logic [31:0]   ram_rdata,
  // write snoop for the control logic
  output logic          wr_evt,
  output logic [AW-1:0] wr_addr,
  output logic [31:0]   wr_data
);

  typedef enum logic [1:0] {DP_IDLE, DP_WRITE, DP_READ1, DP_READ2} dphase_e;

  dphase_e       dp;
  logic [AW-1:0] addr_q;
  logic          accept;

  // a transfer is accepted when selected, NONSEQ/SEQ, and the bus is ready
  assign accept = hsel && htrans[1] && hready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dp <= DP_IDLE;
    end else begin
      unique case (dp)
        DP_READ1: dp <= DP_READ2;
        default: begin
          if (accept) dp <= hwrite ? DP_WRITE : DP_READ1;
          else        dp <= DP_IDLE;
        end
      endcase
    end
    if (accept && dp != DP_READ1) addr_q <= haddr[AW+1:2];
  end

  assign ram_we     = (dp == DP_WRITE);
  assign ram_addr   = addr_q;
  assign ram_wdata  = hwdata;
  assign hready_out = (dp != DP_READ1);
  assign hrdata     = ram_rdata;
  assign hresp      = 1'b0;

  assign wr_evt  = ram_we;
  assign wr_addr = addr_q;
  assign wr_data = hwdata;

endmodule
