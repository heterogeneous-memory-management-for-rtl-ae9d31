// tb_reloc_unit: the relocation unit with its real MRU registers, free-space
// registers, CAM and block keeper (16 3D blocks, 8-word blocks, CAM L = 4 and
// period 200, MRU lifetime 60). Accesses are fed in as the combined memory
// controller would report them; a simple memory answers copy requests.
// Checks the OS free-space handshake, allocation, a promotion driven by an
// observed ex-DRAM access, a dump of a CAM-found un-accessed block followed
// by a promotion into its slot, that an expired MRU entry causes nothing, a
// swap in high utilization with the lock it holds, no swap towards a lower
// class, a demotion under congestion that gives the 3D slot back, none into
// a congested ex-DRAM, allocation in the ex-DRAM outside LMU, and a swap
// chained with a demotion under congestion.
module tb_reloc_unit;
  import hmm_pkg::*;
  localparam int N3D = 16, W = 8;
  logic clk = 0, rst_n = 0;
  logic eval;
  region_t region_3d, region_ex;
  logic obs_valid;
  mem_t obs_mem;
  app_t obs_app;
  pbn_t obs_pbn;
  logic os_free_we_3d, os_free_we_ex, need_3d, need_ex;
  pbn_t os_free_pbn_3d, os_free_pbn_ex;
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

  reloc_unit #(.N3D_BLOCKS(N3D), .MRU_LIFETIME(60), .CAM_L(4), .CAM_PERIOD(200), .WORDS(W)) dut (.*);
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

  logic [DATA_W-1:0] mem [pbn_t][W];
  function automatic logic [DATA_W-1:0] orig(pbn_t b, int i);
    return {32'hB10C_0000 | 32'(b), 32'(i)};
  endfunction
  function automatic logic [DATA_W-1:0] rd(pbn_t b, int i);
    return mem.exists(b) ? mem[b][i] : orig(b, i);
  endfunction
  mem_req_t pend;
  int pend_t = -1;
  assign rl_req_ready = (pend_t < 0);
  always @(posedge clk) begin
    rl_rsp_valid <= 0;
    if (pend_t == 0) begin
      pbn_t b;
      int   i;
      b = pend.addr[PA_W-1:OFFSET_W];
      i = int'(pend.addr[11:3]);
      rl_rsp_valid <= 1;
      rl_rsp <= '{we: pend.we, rdata: pend.we ? '0 : rd(b, i), reloc: 1, tag: 0};
      if (pend.we) begin
        if (!mem.exists(b)) for (int k = 0; k < W; k++) mem[b][k] = orig(b, k);
        mem[b][i] = pend.wdata;
      end
      pend_t <= -1;
    end else if (pend_t > 0) pend_t <= pend_t - 1;
    if (rl_req_valid && rl_req_ready) begin pend <= rl_req; pend_t <= 1; end
  end

  typedef struct { logic [1:0] kind; pbn_t a, b; } ev_t;
  ev_t evs [$];
  always @(posedge clk) if (done_valid) evs.push_back('{done_kind, done_pbn_a, done_pbn_b});
  bit locks [logic [41:0]];
  always @(posedge clk) if (lock_valid) locks[{lock_pbn_a, lock_pbn_b}] = 1;

  task automatic obs(mem_t m, app_t a, pbn_t p);
    @(negedge clk);
    obs_valid = 1; obs_mem = m; obs_app = a; obs_pbn = p;
    @(negedge clk);
    obs_valid = 0;
  endtask

  task automatic do_eval(region_t r3, region_t rx);
    @(negedge clk);
    region_3d = r3; region_ex = rx; eval = 1;
    @(negedge clk);
    eval = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  initial begin
    eval = 0; region_3d = REG_LMU; region_ex = REG_LMU; obs_valid = 0; obs_mem = MEM_3D;
    obs_app = APP_LAT; obs_pbn = '0; os_free_we_3d = 0; os_free_we_ex = 0;
    os_free_pbn_3d = '0; os_free_pbn_ex = '0; alloc_req = 0; rl_rsp_valid = 0; rl_rsp = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check(need_3d && need_ex, "free space requested from the OS");
    os_free_we_3d = 1; os_free_pbn_3d = 21'd4; os_free_we_ex = 1; os_free_pbn_ex = 21'd300;
    @(negedge clk);
    os_free_we_3d = 0; os_free_we_ex = 0;
    check(!need_3d && !need_ex, "free space supplied");
    // allocation takes the 3D free block; the OS supplies the next one
    alloc_req = 1;
    #1 check(alloc_ack && alloc_pbn == 21'd4, "allocated in the 3D-DRAM");
    @(negedge clk);
    alloc_req = 0;
    check(need_3d, "3D free block used up");
    os_free_we_3d = 1; os_free_pbn_3d = 21'd5;
    @(negedge clk);
    os_free_we_3d = 0;
    // every 3D block except 0..3 is in use
    for (int b = 4; b < N3D; b++) obs(MEM_3D, APP_BW, pbn_t'(b));
    // an ex-DRAM block of a latency-sensitive application is used: promote it
    obs(MEM_EX, APP_LAT, 21'd400);
    do_eval(REG_LMU, REG_LMU);
    check(evs.size() == 1 && evs[0].kind == 2'd0 && evs[0].a == 21'd400 && evs[0].b == 21'd5,
          "promotion into the free 3D block");
    for (int i = 0; i < W; i++) check(rd(21'd5, i) == orig(21'd400, i), "promoted contents");
    check(need_3d && !need_ex, "3D free used, ex block 400 vacated");
    // wait for the CAM check: blocks 0..3 were never accessed
    repeat (400) @(negedge clk);
    for (int b = 4; b < N3D; b++) obs(MEM_3D, APP_BW, pbn_t'(b));
    obs(MEM_EX, APP_LAT, 21'd401);
    do_eval(REG_LMU, REG_LMU);
    check(evs.size() == 3, "dump and promotion");
    if (evs.size() == 3) begin
      check(evs[1].kind == 2'd3 && evs[1].b == 21'd400 && evs[1].a < 21'd4,
            $sformatf("dump of un-accessed block %0d to ex block %0d", evs[1].a, evs[1].b));
      check(evs[2].kind == 2'd0 && evs[2].a == 21'd401 && evs[2].b == evs[1].a,
            "promotion into the dumped block's slot");
      for (int i = 0; i < W; i++) check(rd(evs[1].a, i) == orig(21'd401, i), "contents");
    end
    // an MRU entry older than its lifetime triggers nothing
    obs(MEM_EX, APP_LAT, 21'd402);
    repeat (70) @(negedge clk);
    do_eval(REG_LMU, REG_LMU);
    check(evs.size() == 3, "expired MRU entry ignored");
    // high utilization: the insensitive 3D block trades places with the
    // latency-sensitive ex-DRAM block; both are locked while they move
    locks.delete();
    obs(MEM_3D, APP_INS, 21'd6);
    obs(MEM_EX, APP_LAT, 21'd500);
    do_eval(REG_HMU, REG_LMU);
    check(evs.size() == 4 && evs[3].kind == 2'd2 && evs[3].a == 21'd500 && evs[3].b == 21'd6,
          "swap of the ex-DRAM LS block with the 3D INS block");
    for (int i = 0; i < W; i++) begin
      check(rd(21'd6, i) == orig(21'd500, i), "swap: LS contents now in 3D");
      check(rd(21'd500, i) == orig(21'd6, i), "swap: INS contents now in ex-DRAM");
    end
    check(locks.size() > 0 && locks.exists({21'd500, 21'd6}) && locks.size() == 1,
          "swap: both blocks locked while moving");
    // a higher class never makes way for a lower one
    obs(MEM_3D, APP_LAT, 21'd9);
    obs(MEM_EX, APP_BW, 21'd501);
    do_eval(REG_HMU, REG_LMU);
    check(evs.size() == 4, "no swap towards a lower class");
    // congestion with an ex-DRAM region of low utilization: the lowest-class
    // 3D block is moved out to the ex-DRAM free block (block 401, vacated by
    // the earlier promotion) and its slot given back
    check(!need_ex, "ex-DRAM free block held since the promotion");
    repeat (70) @(negedge clk);
    obs(MEM_3D, APP_BW, 21'd8);
    do_eval(REG_C, REG_LMU);
    check(evs.size() == 5 && evs[4].kind == 2'd1 && evs[4].a == 21'd8 && evs[4].b == 21'd401,
          $sformatf("demotion of the 3D BW block to the ex-DRAM free block (%0d events, last %0d %0d->%0d)", evs.size(), evs[$].kind, evs[$].a, evs[$].b));
    for (int i = 0; i < W; i++) check(rd(21'd401, i) == orig(21'd8, i), "demoted contents");
    check(!need_3d && need_ex, "3D slot given back, ex free block used");
    // with a congested ex-DRAM nothing is demoted
    obs(MEM_3D, APP_BW, 21'd10);
    os_free_we_ex = 1; os_free_pbn_ex = 21'd601;
    @(negedge clk);
    os_free_we_ex = 0;
    do_eval(REG_C, REG_C);
    check(evs.size() == 5, "no demotion into a congested ex-DRAM");
    // allocation in high utilization goes to the ex-DRAM
    alloc_req = 1;
    #1 check(alloc_ack && alloc_pbn == 21'd601, "allocated in the ex-DRAM outside LMU");
    @(negedge clk);
    alloc_req = 0;
    // congestion with room in the ex-DRAM: a swap followed by a demotion of
    // the lowest-class 3D block left in the MRU registers
    repeat (70) @(negedge clk);
    os_free_we_ex = 1; os_free_pbn_ex = 21'd602;
    @(negedge clk);
    os_free_we_ex = 0;
    obs(MEM_3D, APP_BW, 21'd12);
    obs(MEM_3D, APP_INS, 21'd11);
    obs(MEM_EX, APP_LAT, 21'd502);
    // block 12 keeps being used while the swap runs, so its MRU entry is
    // still live when the demotion is chosen
    fork
      do_eval(REG_C, REG_LMU);
      begin repeat (80) @(negedge clk); obs(MEM_3D, APP_BW, 21'd12); end
    join
    check(evs.size() == 7, $sformatf("swap and demotion (%0d events, last %0d %0d->%0d)", evs.size(), evs[$].kind, evs[$].a, evs[$].b));
    if (evs.size() == 7) begin
      check(evs[5].kind == 2'd2 && evs[5].a == 21'd502 && evs[5].b == 21'd11, "swap first");
      check(evs[6].kind == 2'd1 && evs[6].a == 21'd12 && evs[6].b == 21'd602,
            "then demotion of the BW block");
      for (int i = 0; i < W; i++) begin
        check(rd(21'd11, i) == orig(21'd502, i), "chained swap contents");
        check(rd(21'd602, i) == orig(21'd12, i), "chained demotion contents");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
