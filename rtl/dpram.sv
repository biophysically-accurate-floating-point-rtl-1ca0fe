// dpram: true dual-port synchronous RAM, DEPTH words of WIDTH bits.
//
// Used as the 256 x 32-bit parameter-and-result memory of each
// neuroprocessor: port A belongs to the bus side (memory controller), port B
// to the neuroprocessor's sequencer. Each port reads with one cycle of
// latency. A read returns the old contents when the same port writes the
// same address; a simultaneous write of both ports to one address leaves port
// B's data (the processor's result) in the word. Contents are not reset.
module dpram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && !(b_we && b_addr == a_addr)) mem[a_addr] <= a_wdata;
    if (b_we) mem[b_addr] <= b_wdata;
    a_rdata <= mem[a_addr];
    b_rdata <= mem[b_addr];
  end

endmodule
