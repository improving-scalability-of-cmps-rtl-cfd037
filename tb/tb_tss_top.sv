// tb_tss_top: end-to-end test of a TSS instance with a different element
// format and job shape in every accelerator slot (1- to 4-byte elements,
// both byte orders, transposed jobs), so that marshalling and granularity
// adjustment happen at every link. Chains: flow 0 runs ACC0 -> ACC3 -> ACC6,
// flow 1 runs ACC1 -> ACC4 -> ACC7, flow 2 runs ACC8 -> ACC2 -> ACC5 (a
// backward link from the last column to the first). See
// tb_tss_top_body.svh for what is driven and checked.
module tb_tss_top;
  import tss_pkg::*;
  localparam int     AW             = 6;
  localparam int     NJOBS          = 4;
  localparam longint WATCHDOG       = 64'd200_000_000;
  localparam bit     EXPECT_FORMATS = 1'b1;
  localparam int     CHAIN [3][3]   = '{'{0, 3, 6}, '{1, 4, 7}, '{8, 2, 5}};

  function automatic mg_cfg_t mk(input int eb, input bit sw, input bit tr,
                                 input int r, input int c);
    return '{elem_bytes: 3'(eb), swap: sw, transpose: tr, rows: 8'(r), cols: 8'(c)};
  endfunction

  //                                    slot 8            7                 6
  localparam mg_cfg_t [8:0] ACC_ICFG = {mk(4,0,0,1,8),   mk(4,0,0,1,3),   mk(2,0,0,1,8),
  //                                    slot 5            4                 3
                                        mk(4,0,0,1,8),   mk(3,0,0,1,4),   mk(2,1,1,2,4),
  //                                    slot 2            1                 0
                                        mk(4,0,1,2,2),   mk(1,0,1,4,4),   mk(4,0,0,1,8)};
  localparam mg_cfg_t [8:0] ACC_OCFG = {mk(4,0,0,1,8),   mk(4,0,0,1,3),   mk(4,0,0,1,8),
                                        mk(4,0,0,1,8),   mk(3,1,0,1,4),   mk(2,0,0,2,4),
                                        mk(4,1,0,1,4),   mk(1,0,0,1,16),  mk(2,1,0,1,8)};
  localparam mg_cfg_t [2:0] GW_ICFG  = {mk(4,0,0,1,8),   mk(4,0,0,1,12),  mk(4,0,0,1,16)};
  localparam mg_cfg_t [2:0] GW_OCFG  = {mk(4,0,0,1,8),   mk(4,0,0,1,12),  mk(4,0,0,1,8)};

  tss_top #(.ICM_CFG(ACC_ICFG), .OCM_CFG(ACC_OCFG)) dut (.*);

`include "tb_tss_top_body.svh"

endmodule
