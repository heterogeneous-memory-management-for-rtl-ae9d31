// hmm_top: heterogeneous memory manager for a 3D-DRAM plus an external DRAM.
//
// The SoC side of the memory system: processor cores send requests with
// virtual addresses and a QoS class; the combined memory controller
// translates them and queues them at one of three memory controllers (two
// for the 3D-DRAM, which share its interleaved address space and together
// give it twice the ex-DRAM bandwidth, and one for the ex-DRAM). Each
// controller has one queue per QoS class and a priority arbiter. A
// monitoring unit counts busy cycles per controller and classifies each
// memory as lightly used, highly used or congested; from that and from the
// recently used blocks, the relocation unit moves or swaps 4 KB blocks
// between the two memories and redirects the translation.
//
// The structure (Fig. 1 of the source) and the 8/12-clock read latencies are
// from the document; widths, queue depths and periods are this design's
// choices, listed with each parameter.
//
// Outside parts come in through ports: the cores (core_*), the OS
// (tlb_miss/refill_*, os_free_*, need_*, alloc_*, done_* which also serves
// the caches), and the three DRAM devices (dram_*, index 0 and 1 = 3D-DRAM
// controllers 1 and 2, index 2 = ex-DRAM).
module hmm_top
  import hmm_pkg::*;
#(
  parameter int unsigned N3D_BLOCKS   = DEF_N3D_BLOCKS,
  parameter int unsigned TLB_ENTRIES  = 64,
  parameter int unsigned INTLV_BIT    = 6,
  parameter int unsigned QDEPTH       = 16,
  parameter int unsigned M            = 4,
  parameter int unsigned N            = 4,
  parameter int unsigned RD_LAT_3D    = 8,
  parameter int unsigned RD_LAT_EX    = 12,
  parameter int unsigned WR_REC_3D    = 8,
  parameter int unsigned WR_REC_EX    = 12,
  parameter int unsigned MON_PERIOD   = 10000,
  parameter int unsigned TH1          = 800,
  parameter int unsigned TH2          = 950,
  parameter int unsigned MRU_LIFETIME = 10000,
  parameter int unsigned CAM_L        = 64,
  parameter int unsigned CAM_PERIOD   = 1000000,
  parameter int unsigned WORDS        = WORDS_PER_BLK
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor cores
  input  logic              core_req_valid,
  output logic              core_req_ready,
  input  core_req_t         core_req,
  output logic              core_rsp_valid,
  input  logic              core_rsp_ready,
  output mem_rsp_t          core_rsp,
  // OS: translation
  output logic              tlb_miss,
  output vpn_t              tlb_miss_vpn,
  input  logic              refill_valid,
  input  vpn_t              refill_vpn,
  input  pbn_t              refill_pbn,
  // OS: free space and allocation
  input  logic              os_free_we_3d,
  input  pbn_t              os_free_pbn_3d,
  input  logic              os_free_we_ex,
  input  pbn_t              os_free_pbn_ex,
  output logic              need_3d,
  output logic              need_ex,
  input  logic              alloc_req,
  output logic              alloc_ack,
  output pbn_t              alloc_pbn,
  // OS and caches: relocation notification (interrupt)
  output logic              done_valid,
  output logic [1:0]        done_kind,
  output pbn_t              done_pbn_a,
  output pbn_t              done_pbn_b,
  // monitoring thresholds (per mille)
  input  logic              cfg_we,
  input  logic [9:0]        cfg_th1,
  input  logic [9:0]        cfg_th2,
  output region_t           region_3d,
  output region_t           region_ex,
  output logic              reloc_busy,
  // DRAM devices
  output logic [2:0]        dram_cmd_valid,
  output dram_cmd_t         dram_cmd [3],
  input  logic [DATA_W-1:0] dram_rdata [3]
);
  logic [2:0] ctl_valid, ctl_ready, ctl_rsp_valid, ctl_rsp_ready, busy;
  mem_req_t   ctl_req;
  mem_rsp_t   ctl_rsp [3];
  logic       rl_req_valid, rl_req_ready, rl_rsp_valid;
  mem_req_t   rl_req;
  mem_rsp_t   rl_rsp;
  logic       lock_valid, upd_a_valid, upd_b_valid;
  pbn_t       lock_pbn_a, lock_pbn_b, upd_a_old, upd_a_new, upd_b_old, upd_b_new;
  logic       obs_valid;
  mem_t       obs_mem;
  app_t       obs_app;
  pbn_t       obs_pbn;
  logic       eval;

  comb_mem_ctrl #(.N3D_BLOCKS(N3D_BLOCKS), .TLB_ENTRIES(TLB_ENTRIES), .INTLV_BIT(INTLV_BIT)) u_cmc (
    .clk, .rst_n,
    .core_req_valid, .core_req_ready, .core_req,
    .core_rsp_valid, .core_rsp_ready, .core_rsp,
    .tlb_miss, .tlb_miss_vpn, .refill_valid, .refill_vpn, .refill_pbn,
    .rl_req_valid, .rl_req_ready, .rl_req, .rl_rsp_valid, .rl_rsp,
    .lock_valid, .lock_pbn_a, .lock_pbn_b,
    .upd_a_valid, .upd_a_old, .upd_a_new, .upd_b_valid, .upd_b_old, .upd_b_new,
    .obs_valid, .obs_mem, .obs_app, .obs_pbn,
    .ctl_valid, .ctl_ready, .ctl_req, .ctl_rsp_valid, .ctl_rsp_ready, .ctl_rsp
  );

  for (genvar c = 0; c < 3; c++) begin : g_ctl
    logic [2:0] unused_q;
    dram_ctrl #(
      .READ_LAT (c < 2 ? RD_LAT_3D : RD_LAT_EX),
      .WR_REC   (c < 2 ? WR_REC_3D : WR_REC_EX),
      .QDEPTH   (QDEPTH), .M (M), .N (N)
    ) u_ctl (
      .clk, .rst_n,
      .in_valid       (ctl_valid[c]),
      .in_ready       (ctl_ready[c]),
      .in_req         (ctl_req),
      .dram_cmd_valid (dram_cmd_valid[c]),
      .dram_cmd       (dram_cmd[c]),
      .dram_rdata     (dram_rdata[c]),
      .rsp_valid      (ctl_rsp_valid[c]),
      .rsp_ready      (ctl_rsp_ready[c]),
      .rsp            (ctl_rsp[c]),
      .busy           (busy[c]),
      .q_nonempty     (unused_q)
    );
  end

  logic [$clog2(2*MON_PERIOD+1)-1:0] unused_cnt_3d;
  logic [$clog2(MON_PERIOD+1)-1:0]   unused_cnt_ex;

  monitor_unit #(.PERIOD(MON_PERIOD), .TH1(TH1), .TH2(TH2)) u_mon (
    .clk, .rst_n,
    .busy_3d (busy[1:0]), .busy_ex (busy[2]),
    .cfg_we, .cfg_th1, .cfg_th2,
    .region_3d, .region_ex, .eval,
    .last_cnt_3d (unused_cnt_3d), .last_cnt_ex (unused_cnt_ex)
  );

  reloc_unit #(
    .N3D_BLOCKS (N3D_BLOCKS), .MRU_LIFETIME (MRU_LIFETIME),
    .CAM_L (CAM_L), .CAM_PERIOD (CAM_PERIOD), .WORDS (WORDS)
  ) u_rel (
    .clk, .rst_n,
    .eval, .region_3d, .region_ex,
    .obs_valid, .obs_mem, .obs_app, .obs_pbn,
    .os_free_we_3d, .os_free_pbn_3d, .os_free_we_ex, .os_free_pbn_ex,
    .need_3d, .need_ex,
    .alloc_req, .alloc_ack, .alloc_pbn,
    .rl_req_valid, .rl_req_ready, .rl_req, .rl_rsp_valid, .rl_rsp,
    .lock_valid, .lock_pbn_a, .lock_pbn_b,
    .upd_a_valid, .upd_a_old, .upd_a_new, .upd_b_valid, .upd_b_old, .upd_b_new,
    .done_valid, .done_kind, .done_pbn_a, .done_pbn_b,
    .busy (reloc_busy)
  );
endmodule
