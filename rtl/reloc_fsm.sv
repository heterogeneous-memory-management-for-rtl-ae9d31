// reloc_fsm: allocation and relocation decisions, and the block copy engine.
//
// Decisions (document, Section V and its flowchart), taken when the
// monitoring unit reports a new measurement (eval):
//  * 3D-DRAM in LMU: move the highest-priority ex-DRAM MRU block into the
//    3D-DRAM. Its destination is the 3D free-space block; if there is none,
//    an un-accessed 3D block from the CAM is first dumped to the ex-DRAM free
//    block (DUMP) and its slot used; if there is none of those either, the
//    ex block is swapped with a kept 3D block of lower priority (block keeper).
//  * 3D-DRAM in HMU: swap the lowest-priority 3D MRU block with the
//    highest-priority ex MRU block, if the ex block's priority is higher.
//  * 3D-DRAM in C: the same swap first; then, if the ex-DRAM is in LMU, move
//    the lowest-priority 3D MRU block to the ex-DRAM free block (DEMOTE).
// A new block is allocated in the 3D-DRAM when it is in LMU and has a free
// block, otherwise in the ex-DRAM (alloc_*). Allocation is answered in the
// cycle it is requested, while no relocation is running; if the chosen
// memory has no free block it waits for the OS to supply one.
//
// Engine: a move copies the 512 64-bit words of the source block to the
// destination (read, then write, one word at a time, waiting for each
// response). A swap reads word i of both blocks and writes them back
// crossed, so no block-sized buffer is needed. While it runs, lock_* holds
// core requests to both blocks. At the end the TLB entries are redirected
// (upd_*), the vacated block is handed to the free-space register of its
// memory, the MRU, keeper and CAM entries of both blocks are cleared
// (inv_*, one block per cycle), and done_* tells the OS and the caches
// which block went where. Every copy request to a block's location uses the
// queue of the class that owns that location (insensitive for a free or
// un-accessed slot): core requests to a block that were queued before the
// lock therefore complete before the copy touches the same word, because a
// queue is first-in first-out and a word always maps to the same
// controller. This relies on each block being used by one application
// class. The word-serial
// engine, the holding of core requests, and the two-cycle finish are this
// design's choices.
//
// Lint notes: of a relocation response only the read data is used (the
// engine knows what it asked for), and the load task takes the whole
// decision record but stores only the fields the copy needs.
module reloc_fsm
  import hmm_pkg::*;
#(
  parameter int unsigned N3D_BLOCKS = 131072,
  parameter int unsigned WORDS      = WORDS_PER_BLK
) (
  input  logic        clk,
  input  logic        rst_n,
  // monitoring unit
  input  logic        eval,
  input  region_t     region_3d,
  input  region_t     region_ex,
  // MRU registers [mem][app]
  input  logic [1:0][2:0] mru_valid,
  input  pbn_t [1:0][2:0] mru_pbn,
  // free space registers
  input  logic        free_3d_valid,
  input  pbn_t        free_3d_pbn,
  input  logic        free_ex_valid,
  input  pbn_t        free_ex_pbn,
  output logic        take_3d,
  output logic        take_ex,
  output logic        give_3d,
  output logic        give_ex,
  output pbn_t        give_pbn,
  // CAM
  input  logic        unacc_valid,
  input  pbn_t        unacc_pbn,
  output logic        cam_take,
  // block keeper
  input  logic        keep_bw_valid,
  input  pbn_t        keep_bw_pbn,
  input  logic        keep_ins_valid,
  input  pbn_t        keep_ins_pbn,
  // invalidation of a relocated block
  output logic        inv_valid,
  output pbn_t        inv_pbn,
  // allocation of new blocks
  input  logic        alloc_req,
  output logic        alloc_ack,
  output pbn_t        alloc_pbn,
  // memory access through the combined memory controller
  output logic        rl_req_valid,
  input  logic        rl_req_ready,
  output mem_req_t    rl_req,
  input  logic        rl_rsp_valid,
  input  mem_rsp_t    rl_rsp,
  output logic        lock_valid,
  output pbn_t        lock_pbn_a,
  output pbn_t        lock_pbn_b,
  // TLB update
  output logic        upd_a_valid,
  output pbn_t        upd_a_old,
  output pbn_t        upd_a_new,
  output logic        upd_b_valid,
  output pbn_t        upd_b_old,
  output pbn_t        upd_b_new,
  // notification to the OS and the caches
  output logic        done_valid,
  output logic [1:0]  done_kind,
  output pbn_t        done_pbn_a,
  output pbn_t        done_pbn_b,
  output logic        busy
);
  localparam logic [1:0] K_PROMOTE = 2'd0,  // ex -> 3D
                         K_DEMOTE  = 2'd1,  // 3D -> ex
                         K_SWAP    = 2'd2,  // 3D <-> ex
                         K_DUMP    = 2'd3;  // un-accessed 3D -> ex
  localparam int unsigned WW = $clog2(WORDS);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_A, S_WT_A, S_RD_B, S_WT_B, S_WR_A, S_AK_A, S_WR_B, S_AK_B,
    S_FIN1, S_FIN2, S_CHAIN
  } state_t;

  typedef enum logic [1:0] { CH_NONE, CH_PROMOTE, CH_DEMOTE } chain_t;

  state_t          st;
  chain_t          chain;
  logic            pend_eval;
  logic            op_swap;
  logic [1:0]      op_kind;
  app_t            op_app, op_app_b;
  pbn_t            blk_a, blk_b, pend_blk;
  app_t            pend_app;
  logic [WW-1:0]   widx;
  logic [DATA_W-1:0] buf_a, buf_b;

  // ---- candidate selection -------------------------------------------------
  logic ex_any, d3_any;
  app_t hi_ex_app, lo_3d_app;
  pbn_t hi_ex_pbn, lo_3d_pbn;
  always_comb begin
    ex_any = 1'b0; hi_ex_app = APP_LAT; hi_ex_pbn = '0;
    for (int a = 2; a >= 0; a--) begin
      if (mru_valid[MEM_EX][a]) begin
        ex_any = 1'b1; hi_ex_app = app_t'(a); hi_ex_pbn = mru_pbn[MEM_EX][a];
      end
    end
    d3_any = 1'b0; lo_3d_app = APP_LAT; lo_3d_pbn = '0;
    for (int a = 0; a < 3; a++) begin
      if (mru_valid[MEM_3D][a]) begin
        d3_any = 1'b1; lo_3d_app = app_t'(a); lo_3d_pbn = mru_pbn[MEM_3D][a];
      end
    end
  end

  // ---- decision in idle ------------------------------------------------------
  typedef struct packed {
    logic       go;
    logic       swap;
    logic [1:0] kind;
    app_t       app;      // class of the block at a
    app_t       app_b;    // class of the block at b (for a swap)
    pbn_t       a;
    pbn_t       b;
    logic       t3d, tex, tcam;
    chain_t     chain;
  } dec_t;

  function automatic logic ex_ok_demote();
    return region_ex == REG_LMU && d3_any && free_ex_valid;
  endfunction

  dec_t dec, dec_demote;
  always_comb begin
    dec_demote       = '0;
    dec_demote.go    = ex_ok_demote();
    dec_demote.kind  = K_DEMOTE;
    dec_demote.app   = lo_3d_app;
    dec_demote.app_b = APP_INS;
    dec_demote.a     = lo_3d_pbn;
    dec_demote.b     = free_ex_pbn;
    dec_demote.tex   = 1'b1;

    dec = '0;
    unique case (region_3d)
      REG_LMU: if (ex_any) begin
        if (free_3d_valid) begin
          dec = '{go: 1'b1, swap: 1'b0, kind: K_PROMOTE, app: hi_ex_app, app_b: APP_INS,
                  a: hi_ex_pbn, b: free_3d_pbn, t3d: 1'b1, tex: 1'b0,
                  tcam: 1'b0, chain: CH_NONE};
        end else if (unacc_valid && free_ex_valid) begin
          dec = '{go: 1'b1, swap: 1'b0, kind: K_DUMP, app: APP_INS, app_b: APP_INS,
                  a: unacc_pbn, b: free_ex_pbn, t3d: 1'b0, tex: 1'b1,
                  tcam: 1'b1, chain: CH_PROMOTE};
        end else if (keep_ins_valid && hi_ex_app != APP_INS) begin
          dec = '{go: 1'b1, swap: 1'b1, kind: K_SWAP, app: hi_ex_app, app_b: APP_INS,
                  a: hi_ex_pbn, b: keep_ins_pbn, t3d: 1'b0, tex: 1'b0,
                  tcam: 1'b0, chain: CH_NONE};
        end else if (keep_bw_valid && hi_ex_app == APP_LAT) begin
          dec = '{go: 1'b1, swap: 1'b1, kind: K_SWAP, app: hi_ex_app, app_b: APP_BW,
                  a: hi_ex_pbn, b: keep_bw_pbn, t3d: 1'b0, tex: 1'b0,
                  tcam: 1'b0, chain: CH_NONE};
        end
      end
      REG_HMU, REG_C: begin
        if (ex_any && d3_any && hi_ex_app < lo_3d_app) begin
          dec = '{go: 1'b1, swap: 1'b1, kind: K_SWAP, app: hi_ex_app, app_b: lo_3d_app,
                  a: hi_ex_pbn, b: lo_3d_pbn, t3d: 1'b0, tex: 1'b0,
                  tcam: 1'b0, chain: (region_3d == REG_C) ? CH_DEMOTE : CH_NONE};
        end else if (region_3d == REG_C) begin
          dec = dec_demote;
        end
      end
      default: dec = '0;
    endcase
  end

  // ---- outputs ----------------------------------------------------------------
  logic start_alloc, start_dec, start_chain;
  logic alloc_3d;
  assign alloc_3d    = region_3d == REG_LMU && free_3d_valid;
  assign start_alloc = st == S_IDLE && alloc_req && (alloc_3d || free_ex_valid);
  assign alloc_ack   = start_alloc;
  assign alloc_pbn   = alloc_3d ? free_3d_pbn : free_ex_pbn;
  assign start_dec   = st == S_IDLE && !alloc_req && (pend_eval || eval) && dec.go;

  dec_t chain_dec;
  always_comb begin
    chain_dec = '0;
    if (chain == CH_PROMOTE) begin
      chain_dec = '{go: free_3d_valid, swap: 1'b0, kind: K_PROMOTE, app: pend_app, app_b: APP_INS,
                    a: pend_blk, b: free_3d_pbn, t3d: 1'b1, tex: 1'b0,
                    tcam: 1'b0, chain: CH_NONE};
    end else if (chain == CH_DEMOTE) begin
      chain_dec = dec_demote;
    end
  end
  assign start_chain = st == S_CHAIN && chain_dec.go;

  assign take_3d  = (start_alloc && alloc_3d) || (start_dec && dec.t3d) ||
                    (start_chain && chain_dec.t3d);
  assign take_ex  = (start_alloc && !alloc_3d) || (start_dec && dec.tex) ||
                    (start_chain && chain_dec.tex);
  assign cam_take = start_dec && dec.tcam;

  // vacated block goes back to the free-space register of its memory
  wire a_is_3d = blk_a < pbn_t'(N3D_BLOCKS);
  assign give_3d  = st == S_FIN1 && !op_swap && a_is_3d;
  assign give_ex  = st == S_FIN1 && !op_swap && !a_is_3d;
  assign give_pbn = blk_a;

  assign inv_valid = st == S_FIN1 || st == S_FIN2;
  assign inv_pbn   = (st == S_FIN1) ? blk_a : blk_b;

  assign upd_a_valid = st == S_FIN1;
  assign upd_a_old   = blk_a;
  assign upd_a_new   = blk_b;
  assign upd_b_valid = st == S_FIN1 && op_swap;
  assign upd_b_old   = blk_b;
  assign upd_b_new   = blk_a;

  assign done_valid  = st == S_FIN1;
  assign done_kind   = op_kind;
  assign done_pbn_a  = blk_a;
  assign done_pbn_b  = blk_b;

  assign lock_valid  = st != S_IDLE && st != S_CHAIN;
  assign lock_pbn_a  = blk_a;
  assign lock_pbn_b  = blk_b;
  assign busy        = st != S_IDLE;

  // byte address of word widx of a block
  function automatic logic [PA_W-1:0] waddr(pbn_t b);
    return {b, WIDX_W'(widx), 3'b000};
  endfunction

  // memory requests
  always_comb begin
    rl_req_valid = 1'b0;
    rl_req       = '0;
    rl_req.app   = op_app;
    rl_req.reloc = 1'b1;
    unique case (st)
      S_RD_A: begin rl_req_valid = 1'b1; rl_req.addr = waddr(blk_a); end
      S_RD_B: begin rl_req_valid = 1'b1; rl_req.addr = waddr(blk_b);
                    rl_req.app = op_app_b; end
      S_WR_A: begin rl_req_valid = 1'b1; rl_req.we = 1'b1;
                    rl_req.addr = waddr(blk_a); rl_req.wdata = buf_b; end
      S_WR_B: begin rl_req_valid = 1'b1; rl_req.we = 1'b1; rl_req.app = op_app_b;
                    rl_req.addr = waddr(blk_b); rl_req.wdata = buf_a; end
      default: ;
    endcase
  end

  // ---- state machine -----------------------------------------------------------
  task automatic load(input dec_t d);
    op_swap <= d.swap;
    op_kind <= d.kind;
    op_app  <= d.app;
    op_app_b <= d.app_b;
    blk_a   <= d.a;
    blk_b   <= d.b;
    chain   <= d.chain;
    widx    <= '0;
    st      <= S_RD_A;
  endtask

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= S_IDLE;
      chain     <= CH_NONE;
      pend_eval <= 1'b0;
      op_swap   <= 1'b0;
      op_kind   <= K_PROMOTE;
      op_app    <= APP_INS;
      op_app_b  <= APP_INS;
      blk_a     <= '0;
      blk_b     <= '0;
      pend_blk  <= '0;
      pend_app  <= APP_LAT;
      widx      <= '0;
      buf_a     <= '0;
      buf_b     <= '0;
    end else begin
      if (eval) pend_eval <= 1'b1;
      unique case (st)
        S_IDLE: begin
          if (!alloc_req && (pend_eval || eval)) begin
            pend_eval <= 1'b0;
            if (dec.go) begin
              load(dec);
              if (dec.chain == CH_PROMOTE) begin
                pend_blk <= hi_ex_pbn;
                pend_app <= hi_ex_app;
              end
            end
          end
        end
        S_RD_A: if (rl_req_ready) st <= S_WT_A;
        S_WT_A: if (rl_rsp_valid) begin
          buf_a <= rl_rsp.rdata;
          st    <= op_swap ? S_RD_B : S_WR_B;
        end
        S_RD_B: if (rl_req_ready) st <= S_WT_B;
        S_WT_B: if (rl_rsp_valid) begin
          buf_b <= rl_rsp.rdata;
          st    <= S_WR_A;
        end
        S_WR_A: if (rl_req_ready) st <= S_AK_A;
        S_AK_A: if (rl_rsp_valid) st <= S_WR_B;
        S_WR_B: if (rl_req_ready) st <= S_AK_B;
        S_AK_B: if (rl_rsp_valid) begin
          if (32'(widx) == WORDS - 1) st <= S_FIN1;
          else begin
            widx <= widx + 1'b1;
            st   <= S_RD_A;
          end
        end
        S_FIN1: st <= S_FIN2;
        S_FIN2: st <= (chain != CH_NONE) ? S_CHAIN : S_IDLE;
        S_CHAIN: begin
          if (chain_dec.go) load(chain_dec);
          else begin
            chain <= CH_NONE;
            st    <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // The engine has at most one memory request outstanding.
  assert property (@(posedge clk) disable iff (!rst_n)
                   rl_rsp_valid |-> (st == S_WT_A || st == S_WT_B ||
                                     st == S_AK_A || st == S_AK_B));
endmodule
