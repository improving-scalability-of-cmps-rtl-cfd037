// tss_gran: granularity management counter of an ICM or OCM.
//
// It walks one job element by element. Every 'step' pulse advances to the
// next element in stream order; 'addr' is the buffer word that element
// belongs to and 'last' marks the final element of the job. A job is
// cfg.rows * cfg.cols elements. With cfg.transpose = 0 the address is the
// stream position; with cfg.transpose = 1 the stream is read as rows of
// cfg.cols elements and stored column-major (addr = col * rows + row), which
// matches two accelerators that walk the same job in different orders.
// 'clear' restarts the job. The document states only that granularity
// management is a counter matching stride and access order; the row/column
// form is this design's choice. Register-only, no combinational path from
// step to addr.
module tss_gran
  import tss_pkg::*;
#(
  parameter int unsigned DEPTH = 64   // words per buffer; jobs must fit
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mg_cfg_t                  cfg,
  input  logic                     clear,
  input  logic                     step,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     last
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CFG_DIM_W-1:0] row, col;
  logic [AW-1:0]        row_base;   // address of column 0 of the current row

  assign last = (row == cfg.rows - 1'b1) && (col == cfg.cols - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row      <= '0;
      col      <= '0;
      addr     <= '0;
      row_base <= '0;
    end else if (clear || (step && last)) begin
      row      <= '0;
      col      <= '0;
      addr     <= '0;
      row_base <= '0;
    end else if (step) begin
      if (col == cfg.cols - 1'b1) begin
        col <= '0;
        row <= row + 1'b1;
        if (cfg.transpose) begin
          row_base <= row_base + 1'b1;
          addr     <= row_base + 1'b1;
        end else begin
          row_base <= addr + 1'b1;
          addr     <= addr + 1'b1;
        end
      end else begin
        col  <= col + 1'b1;
        addr <= cfg.transpose ? addr + AW'(cfg.rows) : addr + 1'b1;
      end
    end
  end

endmodule
