// tss_marsh_out: marshalling unit on the output side (inside an OCM).
//
// It takes accelerator elements of cfg.elem_bytes bytes (1..ELEM_BYTES, the
// low bytes of the element word) and serialises them into the flat byte
// stream, least significant byte first when cfg.swap = 0 and most
// significant first when cfg.swap = 1. An element is accepted when the unit
// is empty or its last byte leaves in the same cycle, so a byte per cycle is
// sustained. The document says the unit "serializes a filled buffer in the
// output format of the ACC into a flat byte stream"; the two configuration
// fields are this design's choice.
module tss_marsh_out
  import tss_pkg::*;
#(
  parameter int unsigned ELEM_BYTES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mg_cfg_t                 cfg,
  // accelerator elements in
  input  logic                    elem_valid,
  output logic                    elem_ready,
  input  logic [8*ELEM_BYTES-1:0] elem_data,
  // flat byte stream out
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [LINK_W-1:0]       out_data
);
  localparam int unsigned CW = (ELEM_BYTES > 1) ? $clog2(ELEM_BYTES) : 1;

  logic [8*ELEM_BYTES-1:0] hold;
  logic [CW-1:0]           cnt;
  logic [CW-1:0]           nbytes_m1;
  logic [CW-1:0]           pos;
  logic                    last_byte;

  assign nbytes_m1  = CW'(cfg.elem_bytes - 3'd1);
  assign pos        = cfg.swap ? (nbytes_m1 - cnt) : cnt;
  assign last_byte  = (cnt == nbytes_m1);
  assign elem_ready = !out_valid || (out_ready && last_byte);

  always_comb begin
    out_data = '0;
    for (int b = 0; b < ELEM_BYTES; b++)
      if (CW'(b) == pos) out_data = hold[8*b +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold      <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) begin
        if (last_byte) begin
          cnt       <= '0;
          out_valid <= 1'b0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
      if (elem_valid && elem_ready) begin
        hold      <= elem_data;
        cnt       <= '0;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
