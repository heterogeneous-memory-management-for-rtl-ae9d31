// reloc_unit: the relocation unit of the memory manager.
//
// It groups what the document places inside the relocation unit: the MRU
// registers, the free space registers, the CAM of un-accessed 3D-DRAM blocks
// and the memory block keeper, around the relocation controller (reloc_fsm)
// that makes the allocation and relocation decisions and copies blocks.
// The access stream reported by the combined memory controller (obs_*) feeds
// the MRU registers; its 3D-DRAM part also feeds the CAM and the keeper.
// The OS supplies free blocks (os_free_*) when need_3d/need_ex ask for them,
// answers TLB misses elsewhere, and is told of every relocation on done_*.
// Timing is that of the parts: observations are visible one cycle later;
// a decision is taken in the cycle after eval at the earliest.
// The CAM's scanning flag is left unconnected here: an entry may be used as
// soon as the scan has recorded it, and a later access still marks it, so
// the decision logic needs only unacc_valid.
module reloc_unit
  import hmm_pkg::*;
#(
  parameter int unsigned N3D_BLOCKS   = 131072,
  parameter int unsigned MRU_LIFETIME = 10000,
  parameter int unsigned CAM_L        = 64,
  parameter int unsigned CAM_PERIOD   = 1000000,
  parameter int unsigned WORDS        = WORDS_PER_BLK
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        eval,
  input  region_t     region_3d,
  input  region_t     region_ex,
  input  logic        obs_valid,
  input  mem_t        obs_mem,
  input  app_t        obs_app,
  input  pbn_t        obs_pbn,
  input  logic        os_free_we_3d,
  input  pbn_t        os_free_pbn_3d,
  input  logic        os_free_we_ex,
  input  pbn_t        os_free_pbn_ex,
  output logic        need_3d,
  output logic        need_ex,
  input  logic        alloc_req,
  output logic        alloc_ack,
  output pbn_t        alloc_pbn,
  output logic        rl_req_valid,
  input  logic        rl_req_ready,
  output mem_req_t    rl_req,
  input  logic        rl_rsp_valid,
  input  mem_rsp_t    rl_rsp,
  output logic        lock_valid,
  output pbn_t        lock_pbn_a,
  output pbn_t        lock_pbn_b,
  output logic        upd_a_valid,
  output pbn_t        upd_a_old,
  output pbn_t        upd_a_new,
  output logic        upd_b_valid,
  output pbn_t        upd_b_old,
  output pbn_t        upd_b_new,
  output logic        done_valid,
  output logic [1:0]  done_kind,
  output pbn_t        done_pbn_a,
  output pbn_t        done_pbn_b,
  output logic        busy
);
  logic [1:0][2:0] mru_valid;
  pbn_t [1:0][2:0] mru_pbn;
  logic free_3d_valid, free_ex_valid;
  pbn_t free_3d_pbn, free_ex_pbn;
  logic take_3d, take_ex, give_3d, give_ex;
  pbn_t give_pbn;
  logic unacc_valid, cam_take, scanning;
  pbn_t unacc_pbn;
  logic keep_bw_valid, keep_ins_valid;
  pbn_t keep_bw_pbn, keep_ins_pbn;
  logic inv_valid;
  pbn_t inv_pbn;

  wire obs_3d = obs_valid && obs_mem == MEM_3D;

  mru_regs #(.LIFETIME(MRU_LIFETIME)) u_mru (
    .clk, .rst_n,
    .obs_valid, .obs_mem, .obs_app, .obs_pbn,
    .inv_valid, .inv_pbn,
    .mru_valid, .mru_pbn
  );

  free_space_regs u_free (
    .clk, .rst_n,
    .os_we_3d (os_free_we_3d), .os_pbn_3d (os_free_pbn_3d),
    .os_we_ex (os_free_we_ex), .os_pbn_ex (os_free_pbn_ex),
    .take_3d, .take_ex,
    .give_3d, .give_pbn_3d (give_pbn),
    .give_ex, .give_pbn_ex (give_pbn),
    .free_3d_valid, .free_3d_pbn, .free_ex_valid, .free_ex_pbn,
    .need_3d, .need_ex
  );

  access_cam #(.N3D_BLOCKS(N3D_BLOCKS), .L(CAM_L), .CHECK_PERIOD(CAM_PERIOD)) u_cam (
    .clk, .rst_n,
    .acc_valid (obs_3d), .acc_pbn (obs_pbn),
    .take (cam_take), .inv_valid, .inv_pbn,
    .unacc_valid, .unacc_pbn, .scanning
  );

  block_keeper u_keep (
    .clk, .rst_n,
    .obs_valid (obs_3d), .obs_app, .obs_pbn,
    .inv_valid, .inv_pbn,
    .keep_bw_valid, .keep_bw_pbn, .keep_ins_valid, .keep_ins_pbn
  );

  reloc_fsm #(.N3D_BLOCKS(N3D_BLOCKS), .WORDS(WORDS)) u_fsm (
    .clk, .rst_n,
    .eval, .region_3d, .region_ex,
    .mru_valid, .mru_pbn,
    .free_3d_valid, .free_3d_pbn, .free_ex_valid, .free_ex_pbn,
    .take_3d, .take_ex, .give_3d, .give_ex, .give_pbn,
    .unacc_valid, .unacc_pbn, .cam_take,
    .keep_bw_valid, .keep_bw_pbn, .keep_ins_valid, .keep_ins_pbn,
    .inv_valid, .inv_pbn,
    .alloc_req, .alloc_ack, .alloc_pbn,
    .rl_req_valid, .rl_req_ready, .rl_req, .rl_rsp_valid, .rl_rsp,
    .lock_valid, .lock_pbn_a, .lock_pbn_b,
    .upd_a_valid, .upd_a_old, .upd_a_new, .upd_b_valid, .upd_b_old, .upd_b_new,
    .done_valid, .done_kind, .done_pbn_a, .done_pbn_b,
    .busy
  );
endmodule
