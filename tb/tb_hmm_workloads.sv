// tb_hmm_workloads: the two load scenarios used to evaluate the memory
// manager, run on hmm_top at reduced sizes (16 3D-DRAM blocks, 8-word
// blocks, 1000-cycle periods, the two 3D controllers interleaved on single
// words). Real benchmark traces are not available, so each thread is a
// synthetic random-access stream over its own pages; the rates and sizes
// below are this test's choices.
//
// 1. Blocker. One latency-sensitive thread (4 pages, about 4 accesses per
//    100 cycles) runs next to a bandwidth-sensitive "blocker" that reads
//    consecutive words of its 14 pages at a constant rate aimed at 63% of the
//    3D-DRAM bandwidth (one access every 8/1.26 = 6.35 cycles on average,
//    since a 3D read occupies one of the two controllers for 8 cycles; about
//    61% is reached, as a request waits while the other thread is served). The
//    blocker's pages fill the 3D-DRAM first, so the latency-sensitive pages
//    start in the ex-DRAM. The region thresholds are 55% and 80%. Expected:
//    the high-priority pages are swapped into the 3D-DRAM and blocker pages
//    go to the ex-DRAM; afterwards the latency-sensitive thread sees a
//    smaller mean latency than at the start.
// 2. Threshold sweep. Five latency-sensitive threads with 4 pages each
//    (all allocated in the ex-DRAM, as the 3D-DRAM is full) load the system
//    heavily while Threshold1 is set to 0.73, 0.80 and 0.86 in turn, with
//    Threshold2 = Threshold1 * 0.95/0.8 up to 0.8 and 0.75 + Threshold1/4
//    above. For each setting the test reports the 3D-DRAM utilization, the
//    share of accesses served by the ex-DRAM and the mean latency. It
//    checks that every setting drove the 3D-DRAM out of its LMU region at
//    least once, so that the thresholds were in play.
// Throughout, every read is checked against a shadow copy of the written
// data, and the test's OS model follows every relocation.
module tb_hmm_workloads;
  import hmm_pkg::*;
  localparam int WORDS    = 8;
  localparam int N3D      = 16;
  localparam int POOL3D   = 14;
  localparam int PERIOD   = 1000;
  localparam int PHASE_A  = 60000;
  localparam int PHASE_B  = 30000;
  localparam int NBLK     = 14;          // blocker pages
  localparam int NLAT     = 4;           // pages of the latency-sensitive thread
  localparam int NTHR     = 5;           // threads of the sweep
  localparam int NPAGES   = NBLK + NLAT + NTHR * 4;
  localparam int VPN0     = 'h200;
  localparam int WATCHDOG = 1000000;

  logic              clk = 0, rst_n = 0;
  logic              core_req_valid, core_req_ready, core_rsp_valid, core_rsp_ready;
  core_req_t         core_req;
  mem_rsp_t          core_rsp;
  logic              tlb_miss, refill_valid;
  vpn_t              tlb_miss_vpn, refill_vpn;
  pbn_t              refill_pbn;
  logic              os_free_we_3d, os_free_we_ex, need_3d, need_ex;
  pbn_t              os_free_pbn_3d, os_free_pbn_ex;
  logic              alloc_req, alloc_ack;
  pbn_t              alloc_pbn;
  logic              done_valid;
  logic [1:0]        done_kind;
  pbn_t              done_pbn_a, done_pbn_b;
  logic              cfg_we;
  logic [9:0]        cfg_th1, cfg_th2;
  region_t           region_3d, region_ex;
  logic              reloc_busy;
  logic [2:0]        dram_cmd_valid;
  dram_cmd_t         dram_cmd [3];
  logic [DATA_W-1:0] dram_rdata [3];

  hmm_top #(
    .N3D_BLOCKS (N3D), .TLB_ENTRIES (8), .INTLV_BIT (3), .MON_PERIOD (PERIOD), .MRU_LIFETIME (PERIOD),
    .CAM_L (4), .CAM_PERIOD (4 * PERIOD), .WORDS (WORDS)
  ) dut (.*);

  for (genvar c = 0; c < 3; c++) begin : g_dram
    dram_model u_mem (.clk, .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]), .rdata(dram_rdata[c]));
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic app_t page_app(int p);
    return (p < NBLK) ? APP_BW : APP_LAT;
  endfunction

  // ---------------- OS model ----------------
  pbn_t pt [int];
  pbn_t pool_3d [$], pool_ex [$];
  int   n_kind [4] = '{0, 0, 0, 0};
  int   n_blk_out = 0;               // blocker pages moved to the ex-DRAM

  always @(posedge clk) begin
    refill_valid <= 1'b0;
    if (rst_n && tlb_miss && !refill_valid) begin
      int p;
      p = int'(tlb_miss_vpn) - VPN0;
      check(pt.exists(p), "miss on a mapped page");
      refill_valid <= 1'b1;
      refill_vpn   <= tlb_miss_vpn;
      refill_pbn   <= pt.exists(p) ? pt[p] : '0;
    end
  end

  always @(posedge clk) begin
    os_free_we_3d <= 1'b0;
    os_free_we_ex <= 1'b0;
    if (rst_n && need_3d && !os_free_we_3d && pool_3d.size() > 0) begin
      os_free_we_3d  <= 1'b1;
      os_free_pbn_3d <= pool_3d.pop_front();
    end
    if (rst_n && need_ex && !os_free_we_ex && pool_ex.size() > 0) begin
      os_free_we_ex  <= 1'b1;
      os_free_pbn_ex <= pool_ex.pop_front();
    end
  end

  always @(posedge clk) if (rst_n && done_valid) begin
    n_kind[done_kind]++;
    foreach (pt[p]) begin
      if (pt[p] == done_pbn_a) begin
        pt[p] = done_pbn_b;
        if (page_app(p) == APP_BW && done_pbn_b >= pbn_t'(N3D)) n_blk_out++;
      end else if (done_kind == 2'd2 && pt[p] == done_pbn_b) begin
        pt[p] = done_pbn_a;
        if (page_app(p) == APP_BW && done_pbn_a >= pbn_t'(N3D)) n_blk_out++;
      end
    end
  end

  task automatic allocate(int p);
    @(negedge clk);
    alloc_req = 1'b1;
    #1;
    while (!alloc_ack) begin
      @(negedge clk);
      #1;
    end
    pt[p] = alloc_pbn;
    @(negedge clk);
    alloc_req = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  // ---------------- core model ----------------
  // The request generator below presents one request at a time; the
  // bookkeeping is done in the cycle the request is accepted.
  logic [DATA_W-1:0] shadow [int];
  logic [DATA_W-1:0] exp_rd [256];
  logic              busy_tag [256];
  int                t_issue [256];
  bit                t_mem_ex [256];
  int                t_page [256];
  int                n_out = 0, n_rd_ok = 0;
  int                req_page, req_word;
  // latency statistics of the latency-sensitive requests, and access counts
  longint            lat_sum = 0;
  int                lat_n = 0, acc_3d = 0, acc_ex = 0;

  always @(posedge clk) if (rst_n && core_req_valid && core_req_ready) begin
    int t;
    t = int'(core_req.tag);
    busy_tag[t] = 1'b1;
    t_issue[t]  = cyc;
    t_page[t]   = req_page;
    t_mem_ex[t] = pt[req_page] >= pbn_t'(N3D);
    if (t_mem_ex[t]) acc_ex++; else acc_3d++;
    n_out++;
    if (core_req.we) shadow[req_page * WORDS + req_word] = core_req.wdata;
    else             exp_rd[t] = shadow[req_page * WORDS + req_word];
  end

  always @(posedge clk) if (rst_n && core_rsp_valid && core_rsp_ready) begin
    int t;
    t = int'(core_rsp.tag);
    check(busy_tag[t], "response to an outstanding tag");
    if (!core_rsp.we) begin
      check(core_rsp.rdata == exp_rd[t], $sformatf("read data, tag %0d", t));
      n_rd_ok++;
    end
    if (page_app(t_page[t]) == APP_LAT) begin
      lat_sum += longint'(cyc - t_issue[t]);
      lat_n++;
    end
    busy_tag[t] = 1'b0;
    n_out--;
  end

  function automatic int free_tag();
    for (int i = 0; i < 256; i++) if (!busy_tag[i]) return i;
    return -1;
  endfunction

  // present a request at a negedge; returns when it has been accepted
  task automatic issue(int p, int w, bit we);
    int t;
    t = free_tag();
    while (t < 0) begin
      @(negedge clk);
      t = free_tag();
    end
    req_page = p;
    req_word = w;
    core_req_valid = 1'b1;
    core_req = '{we: we, vaddr: {VA_W'(VPN0 + p)} << OFFSET_W | VA_W'(w * WORD_BYTES),
                 wdata: {$urandom, $urandom}, app: page_app(p), tag: TAG_W'(t)};
    #1;
    while (!core_req_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    core_req_valid = 1'b0;
  endtask

  task automatic drain();
    while (n_out > 0) @(negedge clk);
  endtask

  task automatic set_th(int t1, int t2);
    @(negedge clk);
    cfg_we = 1; cfg_th1 = 10'(t1); cfg_th2 = 10'(t2);
    @(negedge clk);
    cfg_we = 0;
  endtask

  // regions and 3D utilization per phase
  int n_notlmu = 0;
  longint busy3d = 0;
  always @(posedge clk) if (rst_n) begin
    busy3d += longint'(dut.g_ctl[0].u_ctl.busy) + longint'(dut.g_ctl[1].u_ctl.busy);
    if (dut.u_mon.eval && region_3d != REG_LMU) n_notlmu++;
  end

  task automatic clear_stats();
    lat_sum = 0; lat_n = 0; acc_3d = 0; acc_ex = 0; busy3d = 0; n_notlmu = 0;
  endtask

  // blocker plus latency-sensitive thread for len cycles. The blocker is due
  // when its rate accumulator passes a whole request (1575 per 10000 cycles
  // = 63% of two controllers at 8 cycles each); a due blocker request waits
  // while the other thread's request is presented.
  int blk_pos = 0;
  task automatic run_blocker(int len);
    int t0, acc;
    t0 = cyc;
    acc = 0;
    while (cyc - t0 < len) begin
      int c0;
      c0 = cyc;
      if (acc >= 10000) begin
        acc -= 10000;
        issue((blk_pos / WORDS) % NBLK, blk_pos % WORDS, 1'b0);
        blk_pos++;
      end else if ($urandom_range(0, 99) < 4) begin
        issue(NBLK + $urandom_range(0, NLAT - 1), $urandom_range(0, WORDS - 1),
              $urandom_range(0, 3) == 0);
      end else begin
        @(negedge clk);
      end
      acc += 1575 * (cyc - c0);
    end
  endtask

  // five threads, each drawing pages from its own 4, heavy load
  task automatic run_threads(int len, int pct);
    int t0;
    t0 = cyc;
    while (cyc - t0 < len) begin
      if ($urandom_range(0, 99) < pct)
        issue(NBLK + NLAT + 4 * $urandom_range(0, NTHR - 1) + $urandom_range(0, 3),
              $urandom_range(0, WORDS - 1), $urandom_range(0, 3) == 0);
      else
        @(negedge clk);
    end
  endtask

  initial begin
    real lat_first, lat_last;
    int  th1s [3] = '{730, 800, 860};
    core_req_valid = 0; core_req = '0; core_rsp_ready = 1; alloc_req = 0;
    cfg_we = 0; cfg_th1 = '0; cfg_th2 = '0;
    refill_valid = 0; refill_vpn = '0; refill_pbn = '0;
    os_free_we_3d = 0; os_free_we_ex = 0; os_free_pbn_3d = '0; os_free_pbn_ex = '0;
    req_page = 0; req_word = 0;
    foreach (busy_tag[i]) busy_tag[i] = 1'b0;
    foreach (t_page[i]) t_page[i] = 0;
    for (int b = 0; b < POOL3D; b++) pool_3d.push_back(pbn_t'(b));
    for (int b = 0; b < 64; b++)      pool_ex.push_back(pbn_t'(N3D + 16 + b));
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // ---------------- 1. blocker ----------------
    for (int p = 0; p < NBLK + NLAT; p++) allocate(p);
    for (int p = NBLK; p < NBLK + NLAT; p++)
      check(pt[p] >= pbn_t'(N3D), "latency-sensitive page starts in the ex-DRAM");
    for (int p = 0; p < NBLK + NLAT; p++)
      for (int w = 0; w < WORDS; w++) issue(p, w, 1'b1);
    drain();
    set_th(550, 800);
    clear_stats();
    run_blocker(PHASE_A / 4);
    lat_first = real'(lat_sum) / real'(lat_n > 0 ? lat_n : 1);
    $display("blocker, first quarter: 3D utilization %0d%%, LS mean latency %0.1f cycles",
             busy3d * 100 / (2 * (PHASE_A / 4)), lat_first);
    run_blocker(PHASE_A / 2);
    clear_stats();
    run_blocker(PHASE_A / 4);
    lat_last = real'(lat_sum) / real'(lat_n > 0 ? lat_n : 1);
    $display("blocker, last quarter: 3D utilization %0d%%, LS mean latency %0.1f cycles",
             busy3d * 100 / (2 * (PHASE_A / 4)), lat_last);
    $display("relocations: promote %0d demote %0d swap %0d dump %0d, blocker pages moved out %0d",
             n_kind[0], n_kind[1], n_kind[2], n_kind[3], n_blk_out);
    drain();
    while (reloc_busy) @(negedge clk);
    for (int p = NBLK; p < NBLK + NLAT; p++)
      check(pt[p] < pbn_t'(N3D), $sformatf("latency-sensitive page %0d ends in the 3D-DRAM", p));
    check(n_blk_out > 0, "blocker pages were moved to the ex-DRAM");
    check(lat_n > 0 && lat_last < lat_first, "latency-sensitive thread got faster");

    // ---------------- 2. threshold sweep ----------------
    for (int p = NBLK + NLAT; p < NPAGES; p++) allocate(p);
    for (int p = NBLK + NLAT; p < NPAGES; p++)
      for (int w = 0; w < WORDS; w++) issue(p, w, 1'b1);
    drain();
    for (int i = 0; i < 3; i++) begin
      int t1, t2;
      t1 = th1s[i];
      t2 = (t1 <= 800) ? t1 * 95 / 80 : 750 + t1 / 4;
      set_th(t1, t2);
      clear_stats();
      run_threads(PHASE_B, 45);
      $display("Threshold1 %0d.%03d Threshold2 %0d.%03d: 3D utilization %0d%%, ex-DRAM share %0d%%, mean latency %0.1f cycles, non-LMU periods %0d",
               t1 / 1000, t1 % 1000, t2 / 1000, t2 % 1000, busy3d * 100 / (2 * PHASE_B),
               acc_ex * 100 / (acc_ex + acc_3d), real'(lat_sum) / real'(lat_n > 0 ? lat_n : 1), n_notlmu);
      check(n_notlmu > 0, $sformatf("threshold %0d was in play", t1));
    end
    drain();
    while (reloc_busy) @(negedge clk);

    // read everything back
    for (int p = 0; p < NPAGES; p++)
      for (int w = 0; w < WORDS; w++) issue(p, w, 1'b0);
    drain();
    check(n_rd_ok > 0, "reads checked");
    $display("reads checked %0d", n_rd_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
