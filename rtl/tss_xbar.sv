// tss_xbar: MUX-based interconnect between OCMs and ICMs.
//
// Every consumer (an accelerator's ICM or a gateway output flow) has one
// multiplexer whose select value names the producer (an accelerator's OCM or
// a gateway input flow) it listens to; a select value of N_SRC or above
// leaves the consumer unconnected. The byte stream and its valid go forward
// through the multiplexer, the consumer's ready goes back to the selected
// producer. Connections are point to point: the selects must name each
// producer at most once (checked by an assertion); a producer nobody selects
// sees ready low and holds its data. The select values come from the
// gateway's configuration registers and are meant to stay constant while an
// application runs. Purely combinational. The document chooses a MUX-based,
// point-to-point topology with one MUX per accelerator; which producers each
// MUX can reach is not fixed in it, so this version lets every MUX reach
// every producer (forward, backward and self-feedback links alike).
module tss_xbar
  import tss_pkg::*;
#(
  parameter int unsigned N_SRC = 12,
  parameter int unsigned N_DST = 12,
  parameter int unsigned SEL_W = $clog2(N_SRC + 1)
) (
  input  logic                          clk,     // only for the assertion
  input  logic                          rst_n,   // only for the assertion
  input  logic [N_DST-1:0][SEL_W-1:0]   sel,
  // producers
  input  logic [N_SRC-1:0]              src_valid,
  output logic [N_SRC-1:0]              src_ready,
  input  logic [N_SRC-1:0][LINK_W-1:0]  src_data,
  // consumers
  output logic [N_DST-1:0]              dst_valid,
  input  logic [N_DST-1:0]              dst_ready,
  output logic [N_DST-1:0][LINK_W-1:0]  dst_data
);

  always_comb begin
    for (int d = 0; d < N_DST; d++) begin
      dst_valid[d] = 1'b0;
      dst_data[d]  = '0;
      for (int s = 0; s < N_SRC; s++)
        if (sel[d] == SEL_W'(s)) begin
          dst_valid[d] = src_valid[s];
          dst_data[d]  = src_data[s];
        end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SRC; s++) begin
      src_ready[s] = 1'b0;
      for (int d = 0; d < N_DST; d++)
        if (sel[d] == SEL_W'(s)) src_ready[s] = src_ready[s] | dst_ready[d];
    end
  end

  // Each producer may feed at most one consumer.
  logic [N_SRC-1:0] multi_sel;
  always_comb begin
    for (int s = 0; s < N_SRC; s++) begin
      automatic int unsigned n = 0;
      for (int d = 0; d < N_DST; d++)
        if (sel[d] == SEL_W'(s)) n++;
      multi_sel[s] = (n > 1);
    end
  end

  a_point_to_point : assert property (@(posedge clk) disable iff (!rst_n)
    multi_sel == '0);

endmodule
