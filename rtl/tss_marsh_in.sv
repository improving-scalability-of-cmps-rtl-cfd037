// tss_marsh_in: marshalling unit on the input side (inside an ICM).
//
// It collects bytes of the flat stream into accelerator elements of
// cfg.elem_bytes bytes (1..ELEM_BYTES), zero-extended to ELEM_BYTES*8 bits.
// With cfg.swap = 0 the first byte received is the least significant byte
// of the element, with cfg.swap = 1 the most significant. The finished
// element is held in a register (elem_valid) until elem_ready; while it is
// held, the byte input accepts the first byte of the next element only when
// the element leaves in the same cycle, so a byte per cycle is sustained.
// The document says the unit "splits/collects and reorders the data in
// bytes"; element size and byte order as the two degrees of freedom are
// this design's choice.
module tss_marsh_in
  import tss_pkg::*;
#(
  parameter int unsigned ELEM_BYTES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  mg_cfg_t                 cfg,
  // flat byte stream in
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [LINK_W-1:0]       in_data,
  // accelerator elements out
  output logic                    elem_valid,
  input  logic                    elem_ready,
  output logic [8*ELEM_BYTES-1:0] elem_data
);
  localparam int unsigned CW = (ELEM_BYTES > 1) ? $clog2(ELEM_BYTES) : 1;

  logic [CW-1:0]             cnt;       // bytes collected so far
  logic [8*ELEM_BYTES-1:0]   acc;       // element under assembly
  logic [CW-1:0]             nbytes_m1; // elem_bytes - 1
  logic [CW-1:0]             pos;       // byte lane of the incoming byte
  logic [8*ELEM_BYTES-1:0]   merged;
  logic                      take;

  assign nbytes_m1 = CW'(cfg.elem_bytes - 3'd1);
  assign pos       = cfg.swap ? (nbytes_m1 - cnt) : cnt;
  assign in_ready  = !elem_valid || elem_ready;
  assign take      = in_valid && in_ready;

  always_comb begin
    merged = acc;
    for (int b = 0; b < ELEM_BYTES; b++)
      if (CW'(b) == pos) merged[8*b +: 8] = in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt        <= '0;
      acc        <= '0;
      elem_valid <= 1'b0;
      elem_data  <= '0;
    end else begin
      if (elem_valid && elem_ready) elem_valid <= 1'b0;
      if (take) begin
        if (cnt == nbytes_m1) begin
          cnt        <= '0;
          acc        <= '0;
          elem_data  <= merged;
          elem_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= merged;
        end
      end
    end
  end

endmodule
