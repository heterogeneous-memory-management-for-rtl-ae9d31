// tb_hmm_top: end-to-end test of the memory manager at reduced sizes:
// 16 3D-DRAM blocks, 8 words copied per block (only the first 8 words of
// each page are used), 1000-cycle measurement period and MRU lifetime,
// CAM with 4 entries checked every 4000 cycles, and the two 3D controllers
// interleaved on single words so that both see traffic. The test body is in
// hmm_tb_body.svh.
module tb_hmm_top;
  import hmm_pkg::*;
  localparam int WORDS    = 8;
  localparam int N3D      = 16;
  localparam int POOL3D   = 14;
  localparam bit CHECK_ALL = 1'b1;
  localparam int PHASE    = 30000;
  localparam int WATCHDOG = 2000000;

  `include "hmm_tb_body.svh"

  hmm_top #(
    .N3D_BLOCKS (N3D), .TLB_ENTRIES (8), .INTLV_BIT (3), .MON_PERIOD (1000), .MRU_LIFETIME (1000),
    .CAM_L (4), .CAM_PERIOD (4000), .WORDS (WORDS)
  ) dut (.*);
endmodule
