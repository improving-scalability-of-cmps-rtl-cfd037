// tss_gateway: the gateway between the TSS accelerator fabric and the
// system bus.
//
// Each of the N_FLOWS input flows has an input SPM of two buffers that the
// host (or its DMA) fills over the bus; the flow's control unit then
// streams the job, in the flow's configured element format and order, into
// the interconnect, where the first accelerator of a chain picks it up.
// Each output flow collects the byte stream of the last accelerator of a
// chain into an output SPM of two buffers that the host reads out. Because
// the gateway splits and regroups by bytes, one large outside job becomes
// many small internal jobs of the accelerators. A chain of accelerators of
// any length thus looks to the host like a single accelerator: write the
// job, commit it, wait for the interrupt, read the result, release it.
//
// Internally an input flow is an OCM (tss_ocm) whose "accelerator side" is
// the bus, and an output flow is an ICM (tss_icm) read by the bus; the
// control unit (tss_ctrl) holds the MMRs and drives the MUX selects and
// the interrupt line; tss_ahb_if is the AHB-Lite slave. Address map
// (byte addresses, HADDR[15:12] selects the region):
//   0x0000-0x0FFF  MMRs (word offset HADDR[9:2], see tss_ctrl)
//   0x1000*(1+f)   input SPM of flow f: the buffer currently granted to
//                  the host, word i at offset 4*i
//   0x1000*(8+f)   output SPM of flow f: the buffer currently holding a
//                  finished job, word i at offset 4*i
// A write to an input SPM while no buffer is free is dropped (STATUS tells
// when one is). SPM reads return data with zero wait states. The split into
// SPMs, per-flow ICM/OCM, MMRs, control unit, bus interface and interrupt
// follows the document (Fig. 7); address map and handshakes are this
// design's choice.
module tss_gateway
  import tss_pkg::*;
#(
  parameter int unsigned N_FLOWS   = 3,
  parameter int unsigned N_DST     = 12,
  parameter int unsigned SEL_W     = 4,
  parameter int unsigned SPM_DEPTH = 256   // 32-bit words per SPM buffer
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // AHB-Lite slave
  input  logic                          hsel,
  input  logic [15:0]                   haddr,
  input  logic [1:0]                    htrans,
  input  logic                          hwrite,
  input  logic [31:0]                   hwdata,
  input  logic                          hready,
  output logic                          hreadyout,
  output logic                          hresp,
  output logic [31:0]                   hrdata,
  output logic                          irq,
  // MUX configuration
  output logic [N_DST-1:0][SEL_W-1:0]   sel,
  // streams of the input flows, into the interconnect
  output logic [N_FLOWS-1:0]             src_valid,
  input  logic [N_FLOWS-1:0]             src_ready,
  output logic [N_FLOWS-1:0][LINK_W-1:0] src_data,
  // streams of the output flows, from the interconnect
  input  logic [N_FLOWS-1:0]             dst_valid,
  output logic [N_FLOWS-1:0]             dst_ready,
  input  logic [N_FLOWS-1:0][LINK_W-1:0] dst_data
);
  localparam int unsigned AW = $clog2(SPM_DEPTH);

  logic        rd_en, wr_en;
  logic [15:0] rd_addr, rd_addr_q, wr_addr;
  logic [31:0] rdata, wr_data, reg_rdata;

  logic [N_FLOWS-1:0]        in_free, in_done, in_commit;
  logic [N_FLOWS-1:0]        out_full, out_done, out_release;
  logic [N_FLOWS-1:0][31:0]  in_rdata, out_rdata;
  mg_cfg_t [N_FLOWS-1:0]     in_cfg, out_cfg;

  tss_ahb_if #(.ADDR_W(16)) u_bus (
    .clk, .rst_n,
    .hsel, .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hreadyout, .hresp, .hrdata,
    .rd_en, .rd_addr, .rd_addr_q, .rdata,
    .wr_en, .wr_addr, .wr_data
  );

  tss_ctrl #(.N_FLOWS(N_FLOWS), .N_DST(N_DST), .SEL_W(SEL_W)) u_ctrl (
    .clk, .rst_n,
    .wr_en   (wr_en && wr_addr[15:12] == 4'd0),
    .wr_addr (wr_addr[9:2]),
    .wr_data,
    .rd_addr (rd_addr_q[9:2]),
    .rd_data (reg_rdata),
    .out_full,
    .out_job_done (out_done),
    .in_free,
    .in_job_done  (in_done),
    .out_release,
    .in_commit,
    .in_cfg,
    .out_cfg,
    .sel,
    .irq
  );

  for (genvar f = 0; f < N_FLOWS; f++) begin : g_flow
    logic in_wr;
    assign in_wr = wr_en && wr_addr[15:12] == 4'(1 + f);

    tss_ocm #(.ELEM_BYTES(4), .DEPTH(SPM_DEPTH)) u_in (
      .clk, .rst_n,
      .cfg        (in_cfg[f]),
      .oread      (in_free[f]),
      .oready     (in_commit[f]),
      .acc_addr   (in_wr ? wr_addr[2 +: AW] : rd_addr[2 +: AW]),
      .acc_we     (in_wr),
      .acc_wdata  (wr_data),
      .acc_rdata  (in_rdata[f]),
      .out_valid  (src_valid[f]),
      .out_ready  (src_ready[f]),
      .out_data   (src_data[f]),
      .drain_done (in_done[f])
    );

    tss_icm #(.ELEM_BYTES(4), .DEPTH(SPM_DEPTH)) u_out (
      .clk, .rst_n,
      .cfg       (out_cfg[f]),
      .in_valid  (dst_valid[f]),
      .in_ready  (dst_ready[f]),
      .in_data   (dst_data[f]),
      .iready    (out_full[f]),
      .iread     (out_release[f]),
      .acc_addr  (rd_addr[2 +: AW]),
      .acc_we    (1'b0),
      .acc_wdata ('0),
      .acc_rdata (out_rdata[f]),
      .fill_done (out_done[f])
    );
  end

  // read data of the transfer in its data phase
  always_comb begin
    rdata = reg_rdata;
    for (int f = 0; f < N_FLOWS; f++) begin
      if (rd_addr_q[15:12] == 4'(1 + f)) rdata = in_rdata[f];
      if (rd_addr_q[15:12] == 4'(8 + f)) rdata = out_rdata[f];
    end
  end

endmodule
