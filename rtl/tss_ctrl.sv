// tss_ctrl: control/configuration unit of the gateway with its
// memory-mapped registers (MMRs).
//
// The host writes, once before an application starts, the MUX select of
// every consumer (which the unit drives onto the interconnect) and the
// marshalling/granularity configuration of each gateway flow. While the
// application runs the host only moves data and exchanges a few events with
// the gateway: it commits a filled input SPM buffer ("start") and releases
// an emptied output SPM buffer through the COMMAND register, and it is
// interrupted when an output buffer holds a finished job or an input buffer
// has been consumed. Register map (word offsets, see tss_pkg):
//   0x00 IRQ_STATUS  bit f: output flow f finished a job; bit 8+f: input
//                    flow f freed a buffer. Set by events, write 1 to clear.
//   0x01 IRQ_ENABLE  same layout; irq = |(IRQ_STATUS & IRQ_ENABLE).
//   0x02 STATUS      bit f: output flow f holds a filled buffer; bit 8+f:
//                    input flow f offers a free buffer. Read only.
//   0x03 COMMAND     bit f: release output buffer of flow f; bit 8+f: commit
//                    input buffer of flow f. Writes give one-cycle pulses.
//   0x04+f IN_CFG    mg_cfg_t of input flow f (low bits)
//   0x08+f OUT_CFG   mg_cfg_t of output flow f
//   0x10+k MUX_SEL   select of consumer k (accelerators first, then the
//                    gateway output flows); reset value all ones = open.
// Register reads are combinational from rd_addr (the data-phase address).
// The document gives the unit's tasks (MMRs for MUX configuration, start,
// interrupt on completion); the register map is this design's choice.
module tss_ctrl
  import tss_pkg::*;
#(
  parameter int unsigned N_FLOWS = 3,
  parameter int unsigned N_DST   = 12,
  parameter int unsigned SEL_W   = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // register port (word offsets)
  input  logic                        wr_en,
  input  logic [7:0]                  wr_addr,
  input  logic [31:0]                 wr_data,
  input  logic [7:0]                  rd_addr,
  output logic [31:0]                 rd_data,
  // gateway flow state and events
  input  logic [N_FLOWS-1:0]          out_full,     // output buffer ready
  input  logic [N_FLOWS-1:0]          out_job_done, // pulse: output buffer filled
  input  logic [N_FLOWS-1:0]          in_free,      // input buffer free
  input  logic [N_FLOWS-1:0]          in_job_done,  // pulse: input buffer sent
  // commands
  output logic [N_FLOWS-1:0]          out_release,
  output logic [N_FLOWS-1:0]          in_commit,
  // configuration
  output mg_cfg_t [N_FLOWS-1:0]       in_cfg,
  output mg_cfg_t [N_FLOWS-1:0]       out_cfg,
  output logic [N_DST-1:0][SEL_W-1:0] sel,
  output logic                        irq
);
  localparam int unsigned CFG_W = $bits(mg_cfg_t);

  logic [N_FLOWS-1:0] st_out, st_in, en_out, en_in;

  assign irq = |(st_out & en_out) || |(st_in & en_in);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_out      <= '0;
      st_in       <= '0;
      en_out      <= '0;
      en_in       <= '0;
      out_release <= '0;
      in_commit   <= '0;
      in_cfg      <= {N_FLOWS{MG_CFG_DEFAULT}};
      out_cfg     <= {N_FLOWS{MG_CFG_DEFAULT}};
      sel         <= '1;
    end else begin
      out_release <= '0;
      in_commit   <= '0;
      if (wr_en) begin
        if (wr_addr == REG_IRQ_ENABLE) begin
          en_out <= wr_data[N_FLOWS-1:0];
          en_in  <= wr_data[IRQ_IN_OFS +: N_FLOWS];
        end
        if (wr_addr == REG_COMMAND) begin
          out_release <= wr_data[N_FLOWS-1:0];
          in_commit   <= wr_data[IRQ_IN_OFS +: N_FLOWS];
        end
        for (int f = 0; f < N_FLOWS; f++) begin
          if (wr_addr == REG_IN_JOB  + 8'(f)) in_cfg[f]  <= wr_data[CFG_W-1:0];
          if (wr_addr == REG_OUT_JOB + 8'(f)) out_cfg[f] <= wr_data[CFG_W-1:0];
        end
        for (int k = 0; k < N_DST; k++)
          if (wr_addr == REG_MUX_SEL + 8'(k)) sel[k] <= wr_data[SEL_W-1:0];
      end
      // events set status bits; they win over a clear in the same cycle
      st_out <= (wr_en && wr_addr == REG_IRQ_STATUS ?
                 st_out & ~wr_data[N_FLOWS-1:0] : st_out) | out_job_done;
      st_in  <= (wr_en && wr_addr == REG_IRQ_STATUS ?
                 st_in & ~wr_data[IRQ_IN_OFS +: N_FLOWS] : st_in) | in_job_done;
    end
  end

  always_comb begin
    rd_data = '0;
    case (rd_addr)
      REG_IRQ_STATUS: begin
        rd_data[N_FLOWS-1:0]              = st_out;
        rd_data[IRQ_IN_OFS +: N_FLOWS]    = st_in;
      end
      REG_IRQ_ENABLE: begin
        rd_data[N_FLOWS-1:0]              = en_out;
        rd_data[IRQ_IN_OFS +: N_FLOWS]    = en_in;
      end
      REG_STATUS: begin
        rd_data[N_FLOWS-1:0]              = out_full;
        rd_data[IRQ_IN_OFS +: N_FLOWS]    = in_free;
      end
      default: begin
        for (int f = 0; f < N_FLOWS; f++) begin
          if (rd_addr == REG_IN_JOB  + 8'(f)) rd_data[CFG_W-1:0] = in_cfg[f];
          if (rd_addr == REG_OUT_JOB + 8'(f)) rd_data[CFG_W-1:0] = out_cfg[f];
        end
        for (int k = 0; k < N_DST; k++)
          if (rd_addr == REG_MUX_SEL + 8'(k)) rd_data[SEL_W-1:0] = sel[k];
      end
    endcase
  end

endmodule
