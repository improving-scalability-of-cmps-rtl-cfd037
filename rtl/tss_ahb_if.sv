// tss_ahb_if: bus interface of the gateway, an AMBA AHB-Lite slave.
//
// It turns 32-bit single-word AHB transfers into a simple register/SPM
// access port. A read is issued to the targets in its address phase
// (rd_en, rd_addr = HADDR) so that synchronous SPMs can return the word in
// the data phase; rd_addr_q keeps the address through the data phase for
// the read-data multiplexer and for register reads, and HRDATA = rdata. A
// write is performed in its data phase (wr_en, wr_addr, wr_data = HWDATA).
// When a read address phase meets a write data phase, one wait state is
// inserted (HREADYOUT low) so that the read follows the write and a target
// sees at most one address per cycle. HRESP is always OKAY. Only word
// transfers are supported: HSIZE and HBURST are not used, HPROT is absent.
// The document names the bus interface and its evaluation platform uses a
// 32-bit AMBA AHB; the rest is this design's choice.
module tss_ahb_if #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // AHB-Lite slave
  input  logic              hsel,
  input  logic [ADDR_W-1:0] haddr,
  input  logic [1:0]        htrans,
  input  logic              hwrite,
  input  logic [31:0]       hwdata,
  input  logic              hready,
  output logic              hreadyout,
  output logic              hresp,
  output logic [31:0]       hrdata,
  // target side
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  output logic [ADDR_W-1:0] rd_addr_q,
  input  logic [31:0]       rdata,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data
);
  logic active, wr_pend;

  assign active    = hsel && htrans[1];
  assign hreadyout = !(wr_pend && active && !hwrite);
  assign hresp     = 1'b0;
  assign rd_en     = active && !hwrite && hready;
  assign rd_addr   = haddr;
  assign wr_en     = wr_pend;
  assign wr_data   = hwdata;
  assign hrdata    = rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend   <= 1'b0;
      wr_addr   <= '0;
      rd_addr_q <= '0;
    end else begin
      wr_pend <= active && hwrite && hready;
      if (active && hwrite && hready) wr_addr   <= haddr;
      if (rd_en)                      rd_addr_q <= haddr;
    end
  end

endmodule
