// comb_mem_ctrl: the combined memory controller.
//
// All memory requests of the processor cores enter here. As the document
// describes, it translates the virtual address to a physical one, picks the
// memory controller and the queue from the physical block and the
// application class, and pushes the request into that queue. Physical blocks
// below N3D_BLOCKS are in the 3D-DRAM, whose two controllers share the space
// interleaved on address bit INTLV_BIT (a 64-byte line granule, this design's
// choice); other blocks go to the ex-DRAM controller.
//
// The relocation unit also reaches the controllers through this block
// (already physical requests, flagged reloc). It has priority over the
// cores, and while it moves a block it can hold core requests to the one or
// two blocks involved (lock_*), so that no access sees a half-copied block;
// that hold is this design's choice. Each dispatched core request is
// reported on obs_* so the MRU registers, the block keeper and the CAM can
// follow the accesses. Responses of the three controllers are merged (fixed
// order 3D-1, 3D-2, ex) and steered to the cores or the relocation unit.
//
// Timing: translation and dispatch take no clock cycle; a request is pushed
// into a queue in the cycle it is accepted. A TLB miss is shown on tlb_miss
// until refill_* installs the mapping.
module comb_mem_ctrl
  import hmm_pkg::*;
#(
  parameter int unsigned N3D_BLOCKS  = 131072,
  parameter int unsigned TLB_ENTRIES = 64,
  parameter int unsigned INTLV_BIT   = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  // cores
  input  logic        core_req_valid,
  output logic        core_req_ready,
  input  core_req_t   core_req,
  output logic        core_rsp_valid,
  input  logic        core_rsp_ready,
  output mem_rsp_t    core_rsp,
  // OS / page walker
  output logic        tlb_miss,
  output vpn_t        tlb_miss_vpn,
  input  logic        refill_valid,
  input  vpn_t        refill_vpn,
  input  pbn_t        refill_pbn,
  // relocation unit
  input  logic        rl_req_valid,
  output logic        rl_req_ready,
  input  mem_req_t    rl_req,
  output logic        rl_rsp_valid,
  output mem_rsp_t    rl_rsp,
  input  logic        lock_valid,
  input  pbn_t        lock_pbn_a,
  input  pbn_t        lock_pbn_b,
  input  logic        upd_a_valid,
  input  pbn_t        upd_a_old,
  input  pbn_t        upd_a_new,
  input  logic        upd_b_valid,
  input  pbn_t        upd_b_old,
  input  pbn_t        upd_b_new,
  // access observation
  output logic        obs_valid,
  output mem_t        obs_mem,
  output app_t        obs_app,
  output pbn_t        obs_pbn,
  // controllers: 0 = 3D-DRAM 1, 1 = 3D-DRAM 2, 2 = ex-DRAM
  output logic [2:0]  ctl_valid,
  input  logic [2:0]  ctl_ready,
  output mem_req_t    ctl_req,
  input  logic [2:0]  ctl_rsp_valid,
  output logic [2:0]  ctl_rsp_ready,
  input  mem_rsp_t    ctl_rsp [3]
);
  logic hit;
  pbn_t tr_pbn;

  tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .lk_vpn       (core_req.vaddr[VA_W-1:OFFSET_W]),
    .lk_hit       (hit),
    .lk_pbn       (tr_pbn),
    .refill_valid, .refill_vpn, .refill_pbn,
    .upd_a_valid, .upd_a_old, .upd_a_new,
    .upd_b_valid, .upd_b_old, .upd_b_new
  );

  assign tlb_miss     = core_req_valid && !hit;
  assign tlb_miss_vpn = core_req.vaddr[VA_W-1:OFFSET_W];

  // translated core request
  mem_req_t core_phys;
  assign core_phys = '{we: core_req.we,
                       addr: {tr_pbn, core_req.vaddr[OFFSET_W-1:0]},
                       wdata: core_req.wdata, app: core_req.app,
                       reloc: 1'b0, tag: core_req.tag};

  function automatic logic [1:0] target(logic [PA_W-1:0] a);
    if (a[PA_W-1:OFFSET_W] < pbn_t'(N3D_BLOCKS)) return {1'b0, a[INTLV_BIT]};
    else                                         return 2'd2;
  endfunction

  logic locked;
  assign locked = lock_valid && (tr_pbn == lock_pbn_a || tr_pbn == lock_pbn_b);

  logic       use_rl;
  logic [1:0] tgt;
  assign use_rl  = rl_req_valid;
  assign ctl_req = use_rl ? rl_req : core_phys;
  assign tgt     = target(ctl_req.addr);

  logic core_go;
  assign core_go = core_req_valid && !use_rl && hit && !locked;

  always_comb begin
    ctl_valid = '0;
    if (use_rl || core_go) ctl_valid[tgt] = 1'b1;
  end

  assign rl_req_ready   = use_rl && ctl_ready[tgt];
  assign core_req_ready = core_go && ctl_ready[tgt];

  assign obs_valid = core_req_valid && core_req_ready;
  assign obs_mem   = (tgt == 2'd2) ? MEM_EX : MEM_3D;
  assign obs_app   = core_req.app;
  assign obs_pbn   = tr_pbn;

  // response merge
  logic [1:0] rsel;
  logic       rany;
  always_comb begin
    rany = 1'b0;
    rsel = 2'd0;
    for (int i = 2; i >= 0; i--) begin
      if (ctl_rsp_valid[i] && (ctl_rsp[i].reloc || core_rsp_ready)) begin
        rany = 1'b1;
        rsel = 2'(i);
      end
    end
  end

  always_comb begin
    ctl_rsp_ready = '0;
    if (rany) ctl_rsp_ready[rsel] = 1'b1;
  end

  assign core_rsp_valid = rany && !ctl_rsp[rsel].reloc;
  assign core_rsp       = ctl_rsp[rsel];
  assign rl_rsp_valid   = rany && ctl_rsp[rsel].reloc;
  assign rl_rsp         = ctl_rsp[rsel];
endmodule
