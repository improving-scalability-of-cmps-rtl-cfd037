// tss_icm: Input Control Management of one accelerator.
//
// The ICM turns the incoming flat byte stream into filled input buffers in
// the accelerator's own format, without help from the host processor. The
// marshalling unit (tss_marsh_in) builds elements from bytes, the
// granularity counter (tss_gran) places each element at its buffer address
// and closes the job after rows*cols elements, and the synchronisation unit
// (tss_sync) alternates the two buffers I0/I1 (tss_dbuf) between stream and
// accelerator.
//
// Accelerator side: IReady (iready) is high while a filled buffer is handed
// to the accelerator, which then has random read/write access to it through
// acc_addr/acc_we/acc_wdata/acc_rdata (read data one cycle after the
// address). A one-cycle IRead pulse (iread, "finished consuming") frees the
// buffer; IReady drops in the next cycle and rises again as soon as the
// other buffer is full. The stream is back-pressured (in_ready low) while
// both buffers are full. The structure follows the document (Fig. 4); the
// handshake details are this design's.
module tss_icm
  import tss_pkg::*;
#(
  parameter int unsigned ELEM_BYTES = 4,   // accelerator element width
  parameter int unsigned DEPTH      = 64   // elements per buffer
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mg_cfg_t                  cfg,
  // flat byte stream in
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [LINK_W-1:0]        in_data,
  // accelerator side
  output logic                     iready,
  input  logic                     iread,
  input  logic [$clog2(DEPTH)-1:0] acc_addr,
  input  logic                     acc_we,
  input  logic [8*ELEM_BYTES-1:0]  acc_wdata,
  output logic [8*ELEM_BYTES-1:0]  acc_rdata,
  output logic                     fill_done   // one-cycle pulse when a buffer has been filled from the stream
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned EW = 8 * ELEM_BYTES;


  logic          elem_valid, elem_ready;
  logic [EW-1:0] elem_data;
  logic          prod_avail, prod_bank, cons_bank;
  logic [AW-1:0] wr_addr;
  logic          wr_last, wr_en;
  logic [EW-1:0] unused_rdata;

  tss_marsh_in #(.ELEM_BYTES(ELEM_BYTES)) u_marsh (
    .clk, .rst_n, .cfg,
    .in_valid, .in_ready, .in_data,
    .elem_valid, .elem_ready, .elem_data
  );

  assign elem_ready = prod_avail;
  assign fill_done  = wr_en && wr_last;
  assign wr_en      = elem_valid && prod_avail;

  tss_gran #(.DEPTH(DEPTH)) u_gran (
    .clk, .rst_n, .cfg,
    .clear (1'b0),
    .step  (wr_en),
    .addr  (wr_addr),
    .last  (wr_last)
  );

  tss_sync u_sync (
    .clk, .rst_n,
    .prod_avail,
    .prod_bank,
    .prod_commit  (wr_en && wr_last),
    .cons_avail   (iready),
    .cons_bank,
    .cons_release (iread)
  );

  tss_dbuf #(.WIDTH(EW), .DEPTH(DEPTH)) u_buf (
    .clk,
    .a_bank (prod_bank), .a_addr (wr_addr),  .a_we (wr_en),
    .a_wdata(elem_data), .a_rdata(unused_rdata),
    .b_bank (cons_bank), .b_addr (acc_addr), .b_we (acc_we && iready),
    .b_wdata(acc_wdata), .b_rdata(acc_rdata)
  );

endmodule
