// tss_top: one Transparent Self-Synchronizing (TSS) instance.
//
// N_ACC accelerator slots, each framed by an Input Control Management unit
// (ICM) and an Output Control Management unit (OCM), a MUX-based
// interconnect, and a gateway to the system bus. A streaming application's
// chain of adjacent accelerator kernels is composed by setting the MUX
// selects: gateway input flow -> ACC a -> ACC b -> ... -> gateway output
// flow. Along the chain the ICMs and OCMs synchronise themselves through
// their double buffers and the byte-stream handshake, so the host only sees
// the gateway: it fills an input SPM buffer, commits it, takes the
// completion interrupt and reads the output SPM. Up to N_FLOWS chains run
// side by side.
//
// Interconnect numbering. Producers (MUX inputs): 0..N_ACC-1 are the OCMs
// of the accelerators, N_ACC+f is gateway input flow f. Consumers (one MUX
// each, select register MUX_SEL+k): 0..N_ACC-1 are the ICMs of the
// accelerators, N_ACC+f is gateway output flow f.
//
// The accelerator kernels themselves are application specific and are not
// part of this RTL: each slot's ICM and OCM ports are brought out (arrays
// indexed by slot). An accelerator waits for iready, reads (and may modify)
// its input buffer, pulses iread; it waits for oread, writes its output
// buffer, pulses oready; buffer reads return data one cycle after the
// address. The element format and job walk of each slot (ICM_CFG, OCM_CFG)
// are fixed per slot at design time, as they belong to the accelerator.
// Defaults: nine slots in three columns and three gateway flows, as drawn
// in the document's figures; buffer sizes are this design's choice.
module tss_top
  import tss_pkg::*;
#(
  parameter int unsigned N_ACC      = 9,
  parameter int unsigned N_FLOWS    = 3,
  parameter int unsigned ACC_BYTES  = 4,    // accelerator element width
  parameter int unsigned ACC_DEPTH  = 64,   // elements per ICM/OCM buffer
  parameter int unsigned SPM_DEPTH  = 256,  // words per gateway SPM buffer
  parameter mg_cfg_t [N_ACC-1:0] ICM_CFG = {N_ACC{MG_CFG_DEFAULT}},
  parameter mg_cfg_t [N_ACC-1:0] OCM_CFG = {N_ACC{MG_CFG_DEFAULT}},
  localparam int unsigned N_PORT = N_ACC + N_FLOWS,
  localparam int unsigned SEL_W  = $clog2(N_PORT + 1),
  localparam int unsigned AW     = $clog2(ACC_DEPTH),
  localparam int unsigned EW     = 8 * ACC_BYTES
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // AHB-Lite slave of the gateway
  input  logic                        hsel,
  input  logic [15:0]                 haddr,
  input  logic [1:0]                  htrans,
  input  logic                        hwrite,
  input  logic [31:0]                 hwdata,
  input  logic                        hready,
  output logic                        hreadyout,
  output logic                        hresp,
  output logic [31:0]                 hrdata,
  output logic                        irq,
  // accelerator slots: input side (ICM)
  output logic [N_ACC-1:0]            acc_iready,
  input  logic [N_ACC-1:0]            acc_iread,
  input  logic [N_ACC-1:0][AW-1:0]    acc_iaddr,
  input  logic [N_ACC-1:0]            acc_iwe,
  input  logic [N_ACC-1:0][EW-1:0]    acc_iwdata,
  output logic [N_ACC-1:0][EW-1:0]    acc_irdata,
  // accelerator slots: output side (OCM)
  output logic [N_ACC-1:0]            acc_oread,
  input  logic [N_ACC-1:0]            acc_oready,
  input  logic [N_ACC-1:0][AW-1:0]    acc_oaddr,
  input  logic [N_ACC-1:0]            acc_owe,
  input  logic [N_ACC-1:0][EW-1:0]    acc_owdata,
  output logic [N_ACC-1:0][EW-1:0]    acc_ordata
);
  logic [N_PORT-1:0]              src_valid, src_ready;
  logic [N_PORT-1:0][LINK_W-1:0]  src_data;
  logic [N_PORT-1:0]              dst_valid, dst_ready;
  logic [N_PORT-1:0][LINK_W-1:0]  dst_data;
  logic [N_PORT-1:0][SEL_W-1:0]   sel;

  for (genvar a = 0; a < N_ACC; a++) begin : g_acc
    tss_icm #(.ELEM_BYTES(ACC_BYTES), .DEPTH(ACC_DEPTH)) u_icm (
      .clk, .rst_n,
      .cfg       (ICM_CFG[a]),
      .in_valid  (dst_valid[a]),
      .in_ready  (dst_ready[a]),
      .in_data   (dst_data[a]),
      .iready    (acc_iready[a]),
      .iread     (acc_iread[a]),
      .acc_addr  (acc_iaddr[a]),
      .acc_we    (acc_iwe[a]),
      .acc_wdata (acc_iwdata[a]),
      .acc_rdata (acc_irdata[a]),
      .fill_done ()
    );

    tss_ocm #(.ELEM_BYTES(ACC_BYTES), .DEPTH(ACC_DEPTH)) u_ocm (
      .clk, .rst_n,
      .cfg        (OCM_CFG[a]),
      .oread      (acc_oread[a]),
      .oready     (acc_oready[a]),
      .acc_addr   (acc_oaddr[a]),
      .acc_we     (acc_owe[a]),
      .acc_wdata  (acc_owdata[a]),
      .acc_rdata  (acc_ordata[a]),
      .out_valid  (src_valid[a]),
      .out_ready  (src_ready[a]),
      .out_data   (src_data[a]),
      .drain_done ()
    );
  end

  tss_xbar #(.N_SRC(N_PORT), .N_DST(N_PORT), .SEL_W(SEL_W)) u_xbar (
    .clk, .rst_n, .sel,
    .src_valid, .src_ready, .src_data,
    .dst_valid, .dst_ready, .dst_data
  );

  tss_gateway #(.N_FLOWS(N_FLOWS), .N_DST(N_PORT), .SEL_W(SEL_W),
                .SPM_DEPTH(SPM_DEPTH)) u_gw (
    .clk, .rst_n,
    .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata, .irq,
    .sel,
    .src_valid (src_valid[N_PORT-1:N_ACC]),
    .src_ready (src_ready[N_PORT-1:N_ACC]),
    .src_data  (src_data[N_PORT-1:N_ACC]),
    .dst_valid (dst_valid[N_PORT-1:N_ACC]),
    .dst_ready (dst_ready[N_PORT-1:N_ACC]),
    .dst_data  (dst_data[N_PORT-1:N_ACC])
  );

endmodule
