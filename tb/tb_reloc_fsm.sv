// tb_reloc_fsm: the relocation controller with 16 3D blocks and 8-word
// blocks. The MRU, free-space, CAM and keeper registers are emulated here
// and a simple memory answers the copy requests after three cycles. Checks
// allocation, and each decision of the flowchart: promote in LMU, swap in
// HMU, no swap towards a lower priority, swap then demote in C, dump of an
// un-accessed block followed by a promote, and a swap with a kept block.
// For every operation the block contents, the TLB update, the hand-back of
// the vacated block and the notification are checked.
module tb_reloc_fsm;
  import hmm_pkg::*;
  localparam int N3D = 16, W = 8;
  logic clk = 0, rst_n = 0;
  logic eval;
  region_t region_3d, region_ex;
  logic [1:0][2:0] mru_valid;
  pbn_t [1:0][2:0] mru_pbn;
  logic free_3d_valid, free_ex_valid, take_3d, take_ex, give_3d, give_ex;
  pbn_t free_3d_pbn, free_ex_pbn, give_pbn;
  logic unacc_valid, cam_take;
  pbn_t unacc_pbn;
  logic keep_bw_valid, keep_ins_valid;
  pbn_t keep_bw_pbn, keep_ins_pbn;
  logic inv_valid;
  pbn_t inv_pbn;
  logic alloc_req, alloc_ack;
  pbn_t alloc_pbn;
  logic rl_req_valid, rl_req_ready, rl_rsp_valid;
  mem_req_t rl_req;
  mem_rsp_t rl_rsp;
  logic lock_valid, upd_a_valid, upd_b_valid, done_valid, busy;
  pbn_t lock_pbn_a, lock_pbn_b, upd_a_old, upd_a_new, upd_b_old, upd_b_new;
  logic [1:0] done_kind;
  pbn_t done_pbn_a, done_pbn_b;
  int checks = 0, failures = 0;

  reloc_fsm #(.N3D_BLOCKS(N3D), .WORDS(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- memory: word (block, index) initially holds a tag of its place ----
  logic [DATA_W-1:0] mem [pbn_t][W];
  function automatic logic [DATA_W-1:0] orig(pbn_t b, int i);
    return {32'hB10C_0000 | 32'(b), 32'(i)};
  endfunction
  function automatic logic [DATA_W-1:0] rd(pbn_t b, int i);
    return mem.exists(b) ? mem[b][i] : orig(b, i);
  endfunction
  task automatic wr(pbn_t b, int i, logic [DATA_W-1:0] d);
    if (!mem.exists(b)) for (int k = 0; k < W; k++) mem[b][k] = orig(b, k);
    mem[b][i] = d;
  endtask

  mem_req_t pend;
  int       pend_t = -1;
  assign rl_req_ready = (pend_t < 0);
  always @(posedge clk) begin
    rl_rsp_valid <= 0;
    if (pend_t == 0) begin
      rl_rsp_valid <= 1;
      rl_rsp <= '{we: pend.we, rdata: pend.we ? '0 : rd(pend.addr[PA_W-1:OFFSET_W], int'(pend.addr[11:3])),
                  reloc: 1, tag: 0};
      if (pend.we) wr(pend.addr[PA_W-1:OFFSET_W], int'(pend.addr[11:3]), pend.wdata);
      pend_t <= -1;
    end else if (pend_t > 0) pend_t <= pend_t - 1;
    if (rl_req_valid && rl_req_ready) begin
      check(rl_req.reloc, "copy request flagged");
      check(lock_valid && (rl_req.addr[PA_W-1:OFFSET_W] == lock_pbn_a ||
                           rl_req.addr[PA_W-1:OFFSET_W] == lock_pbn_b), "copy stays in locked blocks");
      pend   <= rl_req;
      pend_t <= 2;
    end
  end

  // ---- emulated registers around the controller --------------------------
  always @(posedge clk) if (rst_n) begin
    if (give_3d) begin free_3d_valid <= 1; free_3d_pbn <= give_pbn; end
    else if (take_3d) free_3d_valid <= 0;
    if (give_ex) begin free_ex_valid <= 1; free_ex_pbn <= give_pbn; end
    else if (take_ex) free_ex_valid <= 0;
    if (cam_take) unacc_valid <= 0;
    if (inv_valid) begin
      for (int m = 0; m < 2; m++) for (int a = 0; a < 3; a++)
        if (mru_pbn[m][a] == inv_pbn) mru_valid[m][a] <= 0;
      if (keep_bw_pbn == inv_pbn) keep_bw_valid <= 0;
      if (keep_ins_pbn == inv_pbn) keep_ins_valid <= 0;
    end
  end

  // ---- notifications ------------------------------------------------------
  typedef struct { logic [1:0] kind; pbn_t a, b; bit give; pbn_t gp; bit swp; } ev_t;
  ev_t evs [$];
  always @(posedge clk) if (done_valid) begin
    check(upd_a_valid && upd_a_old == done_pbn_a && upd_a_new == done_pbn_b, "TLB update a");
    check(upd_b_valid == (done_kind == 2'd2), "TLB update b only for a swap");
    if (upd_b_valid) check(upd_b_old == done_pbn_b && upd_b_new == done_pbn_a, "TLB update b");
    evs.push_back('{done_kind, done_pbn_a, done_pbn_b, give_3d | give_ex, give_pbn, upd_b_valid});
  end

  task automatic set_mru(mem_t m, app_t a, pbn_t p);
    mru_valid[m][a] = 1; mru_pbn[m][a] = p;
  endtask

  task automatic do_eval(region_t r3, region_t rx);
    @(negedge clk);
    region_3d = r3; region_ex = rx; eval = 1;
    @(negedge clk);
    eval = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  task automatic expect_ev(int idx, logic [1:0] kind, pbn_t a, pbn_t b);
    check(evs.size() > idx, $sformatf("event %0d happened", idx));
    if (evs.size() > idx) begin
      check(evs[idx].kind == kind && evs[idx].a == a && evs[idx].b == b,
            $sformatf("event %0d: kind %0d %0d->%0d, expected %0d %0d->%0d", idx,
                      evs[idx].kind, evs[idx].a, evs[idx].b, kind, a, b));
      if (kind == 2'd2) begin
        check(!evs[idx].give, "swap frees nothing");
        for (int i = 0; i < W; i++)
          check(rd(a, i) == orig(b, i) && rd(b, i) == orig(a, i), "swapped contents");
      end else begin
        check(evs[idx].give && evs[idx].gp == a, "vacated block handed back");
        for (int i = 0; i < W; i++) check(rd(b, i) == orig(a, i), "copied contents");
      end
    end
  endtask

  initial begin
    eval = 0; region_3d = REG_LMU; region_ex = REG_LMU;
    mru_valid = '0; mru_pbn = '0; free_3d_valid = 0; free_ex_valid = 0;
    free_3d_pbn = '0; free_ex_pbn = '0; unacc_valid = 0; unacc_pbn = '0;
    keep_bw_valid = 0; keep_ins_valid = 0; keep_bw_pbn = '0; keep_ins_pbn = '0;
    alloc_req = 0; rl_rsp_valid = 0; rl_rsp = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);

    // allocation
    free_3d_valid = 1; free_3d_pbn = 21'd5; free_ex_valid = 1; free_ex_pbn = 21'd200;
    region_3d = REG_LMU; alloc_req = 1;
    #1 check(alloc_ack && alloc_pbn == 21'd5 && take_3d, "allocate in 3D-DRAM when LMU and free");
    region_3d = REG_HMU;
    #1 check(alloc_ack && alloc_pbn == 21'd200 && take_ex, "allocate in ex-DRAM otherwise");
    alloc_req = 0;
    @(negedge clk);
    free_3d_valid = 1; free_3d_pbn = 21'd5; free_ex_valid = 1; free_ex_pbn = 21'd200;

    // 1. LMU: promote the highest-priority ex MRU block (LAT 100 over BW 101)
    set_mru(MEM_EX, APP_LAT, 21'd100);
    set_mru(MEM_EX, APP_BW, 21'd101);
    do_eval(REG_LMU, REG_LMU);
    expect_ev(0, 2'd0, 21'd100, 21'd5);
    check(free_ex_valid && free_ex_pbn == 21'd100, "ex block vacated");
    check(!mru_valid[MEM_EX][APP_LAT] && mru_valid[MEM_EX][APP_BW], "moved block left the MRU");

    // 2. HMU: swap 3D INS block 2 with ex BW block 101
    set_mru(MEM_3D, APP_INS, 21'd2);
    do_eval(REG_HMU, REG_HMU);
    expect_ev(1, 2'd2, 21'd101, 21'd2);

    // 3. HMU: no swap towards a lower priority (ex INS vs 3D LAT)
    mru_valid = '0;
    set_mru(MEM_EX, APP_INS, 21'd120);
    set_mru(MEM_3D, APP_LAT, 21'd1);
    do_eval(REG_HMU, REG_LMU);
    check(evs.size() == 2, "no relocation for a lower-priority ex block");

    // 4. C: swap (ex BW 130 with 3D INS 3), then demote 3D LAT block 1
    mru_valid = '0;
    set_mru(MEM_3D, APP_LAT, 21'd1);
    set_mru(MEM_3D, APP_INS, 21'd3);
    set_mru(MEM_EX, APP_BW, 21'd130);
    free_ex_pbn = 21'd140; free_ex_valid = 1;
    do_eval(REG_C, REG_LMU);
    expect_ev(2, 2'd2, 21'd130, 21'd3);
    expect_ev(3, 2'd1, 21'd1, 21'd140);
    check(free_3d_valid && free_3d_pbn == 21'd1, "3D block vacated by demotion");

    // 5. LMU, 3D full: dump un-accessed 3D block 7 to ex 150, then promote 160
    mru_valid = '0;
    free_3d_valid = 0;
    set_mru(MEM_EX, APP_LAT, 21'd160);
    unacc_valid = 1; unacc_pbn = 21'd7;
    free_ex_valid = 1; free_ex_pbn = 21'd150;
    do_eval(REG_LMU, REG_HMU);
    expect_ev(4, 2'd3, 21'd7, 21'd150);
    expect_ev(5, 2'd0, 21'd160, 21'd7);
    check(!unacc_valid, "un-accessed block taken from the CAM");

    // 6. LMU, 3D full, no un-accessed block: swap with the kept INS block 9
    mru_valid = '0;
    free_3d_valid = 0;
    set_mru(MEM_EX, APP_BW, 21'd170);
    keep_ins_valid = 1; keep_ins_pbn = 21'd9;
    keep_bw_valid = 1; keep_bw_pbn = 21'd10;
    do_eval(REG_LMU, REG_LMU);
    expect_ev(6, 2'd2, 21'd170, 21'd9);
    // a BW block may not displace a kept BW block
    set_mru(MEM_EX, APP_BW, 21'd171);
    do_eval(REG_LMU, REG_LMU);
    check(evs.size() == 7, "no swap with an equal-priority kept block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
