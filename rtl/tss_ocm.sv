// tss_ocm: Output Control Management of one accelerator.
//
// The OCM hands the accelerator an empty output buffer, takes it back when
// the accelerator has filled it, and serialises it into the flat byte
// stream, without help from the host processor. The synchronisation unit
// (tss_sync) alternates the two buffers O0/O1 (tss_dbuf); the granularity
// counter (tss_gran) walks the filled buffer in stream order; the
// marshalling unit (tss_marsh_out) splits each element into bytes.
//
// Accelerator side: ORead (oread) is high while an empty buffer is handed
// to the accelerator, which writes (and may read back) any element of it
// through acc_addr/acc_we/acc_wdata/acc_rdata (read data one cycle after the
// address). A one-cycle OReady pulse (oready, "finished producing") commits
// the buffer; ORead drops in the next cycle and rises again as soon as the
// other buffer is empty. The stream side reads one element ahead of the
// serialiser, so elements of two or more bytes leave at one byte per cycle;
// one-byte elements leave every other cycle. The structure follows the
// document (Fig. 4); the handshake details are this design's.
module tss_ocm
  import tss_pkg::*;
#(
  parameter int unsigned ELEM_BYTES = 4,   // accelerator element width
  parameter int unsigned DEPTH      = 64   // elements per buffer
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  mg_cfg_t                  cfg,
  // accelerator side
  output logic                     oread,
  input  logic                     oready,
  input  logic [$clog2(DEPTH)-1:0] acc_addr,
  input  logic                     acc_we,
  input  logic [8*ELEM_BYTES-1:0]  acc_wdata,
  output logic [8*ELEM_BYTES-1:0]  acc_rdata,
  // flat byte stream out
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [LINK_W-1:0]        out_data,
  output logic                     drain_done   // one-cycle pulse when a buffer has been fully sent
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned EW = 8 * ELEM_BYTES;


  typedef enum logic [0:0] {S_READ, S_DATA} drain_state_t;

  drain_state_t  state;
  logic          prod_bank, cons_avail, cons_bank;
  logic [AW-1:0] rd_addr;
  logic          rd_last;
  logic [EW-1:0] rd_data;
  logic          elem_valid, elem_ready, elem_take;

  assign elem_valid = (state == S_DATA);
  assign drain_done = elem_take && rd_last;
  assign elem_take  = elem_valid && elem_ready;

  // S_READ: the buffer word at rd_addr is being read (when a buffer is full).
  // S_DATA: its data is on rd_data and offered to the serialiser.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_READ;
    else case (state)
      S_READ:  if (cons_avail) state <= S_DATA;
      S_DATA:  if (elem_take)  state <= S_READ;
      default: state <= S_READ;
    endcase
  end

  tss_sync u_sync (
    .clk, .rst_n,
    .prod_avail   (oread),
    .prod_bank,
    .prod_commit  (oready),
    .cons_avail,
    .cons_bank,
    .cons_release (elem_take && rd_last)
  );

  tss_gran #(.DEPTH(DEPTH)) u_gran (
    .clk, .rst_n, .cfg,
    .clear (1'b0),
    .step  (elem_take),
    .addr  (rd_addr),
    .last  (rd_last)
  );

  tss_dbuf #(.WIDTH(EW), .DEPTH(DEPTH)) u_buf (
    .clk,
    .a_bank (prod_bank), .a_addr (acc_addr), .a_we (acc_we && oread),
    .a_wdata(acc_wdata), .a_rdata(acc_rdata),
    .b_bank (cons_bank), .b_addr (rd_addr),  .b_we (1'b0),
    .b_wdata('0),        .b_rdata(rd_data)
  );

  tss_marsh_out #(.ELEM_BYTES(ELEM_BYTES)) u_marsh (
    .clk, .rst_n, .cfg,
    .elem_valid, .elem_ready, .elem_data (rd_data),
    .out_valid, .out_ready, .out_data
  );

endmodule
