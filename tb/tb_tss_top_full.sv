// tb_tss_top_full: end-to-end test of a TSS instance with every parameter
// at its default (nine slots of 16 four-byte elements per job, 64-element
// ICM/OCM buffers, 256-word gateway SPM buffers). Each outside job is 64
// words, so the gateway splits it into four accelerator jobs and collects
// four 16-word output jobs. Chains: flow 0 runs ACC0 -> ACC3 -> ACC6, flow 1
// runs ACC1 -> ACC4 -> ACC7, flow 2 runs ACC8 -> ACC2 -> ACC5. See
// tb_tss_top_body.svh for what is driven and checked.
module tb_tss_top_full;
  import tss_pkg::*;
  localparam int     AW             = 6;
  localparam int     NJOBS          = 3;
  localparam longint WATCHDOG       = 64'd200_000_000;
  localparam bit     EXPECT_FORMATS = 1'b0;
  localparam int     CHAIN [3][3]   = '{'{0, 3, 6}, '{1, 4, 7}, '{8, 2, 5}};

  localparam mg_cfg_t [8:0] ACC_ICFG = {9{MG_CFG_DEFAULT}};
  localparam mg_cfg_t [8:0] ACC_OCFG = {9{MG_CFG_DEFAULT}};
  localparam mg_cfg_t GW_BIG = '{elem_bytes: 3'd4, swap: 1'b0, transpose: 1'b0,
                                 rows: 8'd4, cols: 8'd16};
  localparam mg_cfg_t [2:0] GW_ICFG  = {3{GW_BIG}};
  localparam mg_cfg_t [2:0] GW_OCFG  = {3{MG_CFG_DEFAULT}};

  tss_top dut (.*);

`include "tb_tss_top_body.svh"

endmodule
