// np_ctrl: control logic of a neuroprocessor.
//
// Decodes bus writes to the start register (word 0, bit 0 set starts a time
// step) and keeps a copy of CONFIG1 (word 1). A started time step runs the
// virtual cells one after another (multiplexing mode): the sequencer is run
// for cell 0, and each time it reports cell_done the next cell is started,
// until the number of cells in CONFIG1[1:0] + 1 is reached. done then rises
// and stays high until the next start; it is the signal passed on to the
// network synchroniser. A start while running is ignored.
// Cell k's parameter block starts at word 8 + 62*k.
module np_ctrl
  import np_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_evt,
  input  logic [7:0]  wr_addr,
  input  logic [31:0] wr_data,
  input  logic        cell_done,
  output logic        run,
  output logic [1:0]  cell_idx,
  output logic [7:0]  cell_base,
  output logic [31:0] config1,
  output logic        done
);

  logic [1:0] last_cell;
  assign last_cell = config1[CFG_NCELL_LSB +: 2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run     <= 1'b0;
      cell_idx    <= '0;
      done    <= 1'b0;
      config1 <= '0;
    end else begin
      if (wr_evt && wr_addr == 8'(ADDR_CONFIG)) config1 <= wr_data;
      if (wr_evt && wr_addr == 8'(ADDR_START) && wr_data[0] && !run) begin
        run  <= 1'b1;
        cell_idx <= '0;
        done <= 1'b0;
      end else if (run && cell_done) begin
        if (cell_idx == last_cell) begin
          run  <= 1'b0;
          done <= 1'b1;
        end else begin
          cell_idx <= cell_idx + 2'd1;
        end
      end
    end
  end

  assign cell_base = 8'(CELL_BASE0) + 8'(CELL_WORDS) * {6'd0, cell_idx};

endmodule
