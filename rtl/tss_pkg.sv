// tss_pkg: types and constants shared by the Transparent Self-Synchronizing
// (TSS) accelerator fabric.
//
// The links between control-management units carry a flat byte stream (one
// byte per beat, valid/ready handshake). Each ICM and OCM is told how an
// accelerator element is laid out and in which order a job is walked by a
// marshalling/granularity configuration (mg_cfg_t). The field set is this
// design's own choice: the document says only that marshalling splits,
// collects and reorders bytes and that granularity management is a counter
// matching strides and access order.
package tss_pkg;

  // Width of the flat byte stream between ICMs/OCMs.
  localparam int unsigned LINK_W = 8;

  // Field widths of the marshalling/granularity configuration.
  localparam int unsigned CFG_DIM_W = 8;   // rows / cols of a job (1..255)

  // Marshalling and granularity configuration of one ICM or OCM.
  //   elem_bytes : bytes per accelerator element (1..4), zero-extended
  //   swap       : 0 = least significant byte first on the stream,
  //                1 = most significant byte first
  //   rows, cols : a job is rows*cols elements
  //   transpose  : 0 = buffer address equals stream order,
  //                1 = stream walks rows of cols elements while the
  //                    accelerator keeps the job column-major
  typedef struct packed {
    logic [2:0]           elem_bytes;
    logic                 swap;
    logic                 transpose;
    logic [CFG_DIM_W-1:0] rows;
    logic [CFG_DIM_W-1:0] cols;
  } mg_cfg_t;

  localparam mg_cfg_t MG_CFG_DEFAULT = '{elem_bytes: 3'd4, swap: 1'b0,
                                         transpose: 1'b0, rows: 8'd1,
                                         cols: 8'd16};

  // Interrupt/status bit layout of the gateway (per flow f):
  //   bit f      : output flow f has a filled output buffer (job done)
  //   bit 8 + f  : input flow f has a free input buffer
  localparam int unsigned IRQ_IN_OFS = 8;

  // Register word offsets inside the MMR region (byte address >> 2).
  localparam logic [7:0] REG_IRQ_STATUS = 8'h00;  // W1C
  localparam logic [7:0] REG_IRQ_ENABLE = 8'h01;
  localparam logic [7:0] REG_STATUS     = 8'h02;  // read only
  localparam logic [7:0] REG_COMMAND    = 8'h03;  // write only, self clearing
  localparam logic [7:0] REG_IN_JOB     = 8'h04;  // + flow: input job words
  localparam logic [7:0] REG_OUT_JOB    = 8'h08;  // + flow: output job words
  localparam logic [7:0] REG_MUX_SEL    = 8'h10;  // + consumer index

endpackage
