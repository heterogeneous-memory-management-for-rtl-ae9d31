// tb_hmm_top_full: the end-to-end test of hmm_tb_body.svh with hmm_top at
// its default parameters: 512 MB 3D-DRAM (131072 blocks), full 4 KB blocks
// (512 words per move), 10000-cycle measurement period, 64-entry TLB, CAM
// with 64 entries checked every 1M cycles. The OS hands out only 14 3D
// blocks so that the ex-DRAM is used too. About 2.7 million cycles; every
// mechanism of the reduced test occurs, including dumps after the first
// 1M-cycle CAM check, followed by a full read-back.
module tb_hmm_top_full;
  import hmm_pkg::*;
  localparam int WORDS     = WORDS_PER_BLK;
  localparam int N3D       = DEF_N3D_BLOCKS;
  localparam int POOL3D    = 14;
  localparam int PHASE     = 300000;
  localparam int WATCHDOG  = 20000000;
  localparam bit CHECK_ALL = 1'b1;

  `include "hmm_tb_body.svh"

  hmm_top dut (.*);
endmodule
