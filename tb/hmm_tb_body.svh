// hmm_tb_body.svh: end-to-end test body shared by tb_hmm_top (reduced sizes)
// and tb_hmm_top_full (default sizes). The including module declares
// localparams WORDS (words copied per block, the block size in use), N3D
// (3D blocks), POOL3D (3D blocks the OS hands out), PHASE (cycles per
// traffic phase), WATCHDOG, CHECK_ALL (require every mechanism; the
// full-size run cannot reach a 1M-cycle CAM check in reasonable time), and instantiates
// hmm_top as "dut" on the signals below.
//
// Around the DUT it models the outside world: three DRAM devices, a core
// issuing tagged requests, and an OS that answers TLB misses from its page
// table, supplies free blocks from two pools, allocates pages through the
// allocation port and follows the relocation notifications.
//
// A shadow copy of every word the core wrote gives the expected data of
// every read, so data integrity across relocations is checked end to end.
// Phases: allocation and initial writes; light traffic (3D-DRAM lightly
// used: promotion, dump, keeper swap); heavy traffic on the 3D-DRAM
// (congested: swap and demotion, new pages allocated in the ex-DRAM);
// moderate traffic with lowered thresholds (high utilization: swap); drain
// and a final read-back of every word. Each mechanism is counted and one
// that never happened counts as a failure.

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

  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar c = 0; c < 3; c++) begin : g_dram
    dram_model u_mem (.clk, .cmd_valid(dram_cmd_valid[c]), .cmd(dram_cmd[c]), .rdata(dram_rdata[c]));
  end

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

  // ---------------- pages ----------------
  localparam int NPAGES = 26;             // 24 at start, 2 allocated later
  localparam int VPN0   = 'h100;
  function automatic app_t page_app(int p);
    if (p < 8 || p >= 24) return APP_LAT;
    else if (p < 16)      return APP_BW;
    else                  return APP_INS;
  endfunction

  // ---------------- OS model ----------------
  pbn_t pt [int];                 // page table: page -> block
  pbn_t pool_3d [$], pool_ex [$];
  int   n_miss = 0, n_alloc_3d = 0, n_alloc_ex = 0;
  int   n_kind [4] = '{0, 0, 0, 0};  // promote, demote, swap, dump

  // TLB misses: refill from the page table one cycle later
  always @(posedge clk) begin
    refill_valid <= 1'b0;
    if (rst_n && tlb_miss && !refill_valid) begin
      int p;
      p = int'(tlb_miss_vpn) - VPN0;
      check(pt.exists(p), "miss on a mapped page");
      refill_valid <= 1'b1;
      refill_vpn   <= tlb_miss_vpn;
      refill_pbn   <= pt.exists(p) ? pt[p] : '0;
      n_miss++;
    end
  end

  // free space supply
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

  // relocation notifications: keep the page table in step
  always @(posedge clk) if (rst_n && done_valid) begin
    n_kind[done_kind]++;
    foreach (pt[p]) begin
      if (pt[p] == done_pbn_a)                        pt[p] = done_pbn_b;
      else if (done_kind == 2'd2 && pt[p] == done_pbn_b) pt[p] = done_pbn_a;
    end
    if (done_kind == 2'd0) check(done_pbn_b < pbn_t'(N3D) && done_pbn_a >= pbn_t'(N3D), "promotion ex->3D");
    if (done_kind == 2'd1 || done_kind == 2'd3)
      check(done_pbn_a < pbn_t'(N3D) && done_pbn_b >= pbn_t'(N3D),
            $sformatf("demotion/dump 3D->ex: kind %0d %0d -> %0d", done_kind, done_pbn_a, done_pbn_b));
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
    if (alloc_pbn < pbn_t'(N3D)) n_alloc_3d++; else n_alloc_ex++;
    @(negedge clk);
    alloc_req = 1'b0;
    repeat (2) @(negedge clk);      // let the OS refill the free register
  endtask

  // ---------------- core model ----------------
  logic [DATA_W-1:0] shadow [int];          // word id -> data
  logic [DATA_W-1:0] exp_rd [256];
  logic              busy_tag [256];
  int                exp_word [256];
  int                n_out = 0, n_rd_ok = 0, n_wr = 0, n_stall_full = 0, n_stall_lock = 0;
  int                n_contention = 0;
  int                issue_ok;

  always @(posedge clk) if (rst_n) begin
    if (core_req_valid && !core_req_ready && !tlb_miss) begin
      if (dut.u_cmc.locked) n_stall_lock++;
      else                  n_stall_full++;
    end
    for (int c = 0; c < 3; c++) begin
      logic [2:0] q;
      case (c)
        0: q = dut.g_ctl[0].u_ctl.q_nonempty;
        1: q = dut.g_ctl[1].u_ctl.q_nonempty;
        default: q = dut.g_ctl[2].u_ctl.q_nonempty;
      endcase
      if ($countones(q) > 1) n_contention++;
    end
  end

  // responses
  always @(posedge clk) if (rst_n && core_rsp_valid && core_rsp_ready) begin
    check(busy_tag[core_rsp.tag], "response to an outstanding tag");
    if (!core_rsp.we) begin
      check(core_rsp.rdata == exp_rd[core_rsp.tag],
            $sformatf("read data word %0d: %h expected %h", exp_word[core_rsp.tag],
                      core_rsp.rdata, exp_rd[core_rsp.tag]));
      n_rd_ok++;
    end
    busy_tag[core_rsp.tag] = 1'b0;
    n_out--;
  end

  function automatic int word_id(int p, int w);
    return p * WORDS + w;
  endfunction

  // issue one request and wait until accepted
  task automatic issue(int p, int w, bit we);
    int t;
    logic [DATA_W-1:0] d;
    t = -1;
    while (t < 0) begin
      for (int i = 0; i < 256; i++) if (!busy_tag[i]) begin t = i; break; end
      if (t < 0) @(negedge clk);
    end
    d = {$urandom, $urandom};
    @(negedge clk);
    core_req_valid = 1'b1;
    core_req = '{we: we, vaddr: {VA_W'(VPN0 + p)} << OFFSET_W | VA_W'(w * WORD_BYTES),
                 wdata: d, app: page_app(p), tag: TAG_W'(t)};
    #1;
    while (!core_req_ready) begin
      @(negedge clk);
      #1;
    end
    busy_tag[t] = 1'b1;
    n_out++;
    if (we) begin
      shadow[word_id(p, w)] = d;
      n_wr++;
    end else begin
      exp_rd[t]   = shadow[word_id(p, w)];
      exp_word[t] = word_id(p, w);
    end
    @(negedge clk);
    core_req_valid = 1'b0;
  endtask

  task automatic drain();
    while (n_out > 0) @(negedge clk);
  endtask

  // traffic: for `len` cycles, with probability pct % per cycle, one access
  // to a page drawn from [plo, phi]; extra: one access every `xper` cycles to
  // pages [xlo, xhi] (0 = none)
  task automatic traffic(int len, int pct, int plo, int phi, int xper, int xlo, int xhi);
    int t0;
    t0 = cyc;
    while (cyc - t0 < len) begin
      if (xper > 0 && ((cyc - t0) % xper) < 2)
        issue($urandom_range(xlo, xhi), $urandom_range(0, WORDS - 1), $urandom_range(0, 1));
      else if ($urandom_range(0, 99) < pct)
        issue($urandom_range(plo, phi), $urandom_range(0, WORDS - 1), $urandom_range(0, 3) == 0);
      else
        @(negedge clk);
    end
  endtask

  // swaps with a kept block: decided while the 3D-DRAM is lightly used
  int n_keeper_swap = 0;
  always @(posedge clk)
    if (rst_n && dut.u_rel.u_fsm.start_dec && dut.u_rel.u_fsm.dec.swap && region_3d == REG_LMU)
      n_keeper_swap++;

  // regions seen
  int n_reg3d [3] = '{0, 0, 0};
  always @(posedge clk) if (dut.u_mon.eval) n_reg3d[region_3d]++;

  initial begin
    core_req_valid = 0; core_req = '0; core_rsp_ready = 1; alloc_req = 0;
    cfg_we = 0; cfg_th1 = '0; cfg_th2 = '0;
    refill_valid = 0; refill_vpn = '0; refill_pbn = '0;
    os_free_we_3d = 0; os_free_we_ex = 0; os_free_pbn_3d = '0; os_free_pbn_ex = '0;
    foreach (busy_tag[i]) busy_tag[i] = 1'b0;
    // only POOL3D 3D blocks are handed out; the rest stay un-accessed
    for (int b = 0; b < POOL3D; b++) pool_3d.push_back(pbn_t'(b));
    for (int b = 0; b < 64; b++)      pool_ex.push_back(pbn_t'(N3D + 16 + b));
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);

    // allocation: 3D-DRAM while it has free blocks, then ex-DRAM
    for (int p = 0; p < 24; p++) allocate(p);
    $display("allocated: %0d in 3D-DRAM, %0d in ex-DRAM", n_alloc_3d, n_alloc_ex);
    for (int p = 0; p < 24; p++)
      for (int w = 0; w < WORDS; w++) issue(p, w, 1'b1);
    drain();

    // light traffic: 3D-DRAM in LMU
    traffic(PHASE, 10, 0, 23, 0, 0, 0);
    $display("@%0d after light phase: promote %0d demote %0d swap %0d dump %0d", cyc,
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);

    // heavy traffic on pages living in the 3D-DRAM; two new latency-sensitive
    // pages are allocated (they go to the ex-DRAM) and used lightly
    begin
      int hot [$];
      foreach (pt[p]) if (pt[p] < pbn_t'(N3D) && page_app(p) != APP_LAT) hot.push_back(p);
      $display("hot 3D pages: %0d", hot.size());
      traffic(PHASE / 4, 100, 8, 23, 0, 0, 0);
      allocate(24);
      allocate(25);
      for (int w = 0; w < WORDS; w++) begin issue(24, w, 1'b1); issue(25, w, 1'b1); end
      for (int k = 0; k < PHASE / 8; k++) begin
        for (int j = 0; j < 6; j++)
          issue(hot[$urandom_range(0, hot.size() - 1)], $urandom_range(0, WORDS - 1),
                $urandom_range(0, 3) == 0);
        issue($urandom_range(24, 25), $urandom_range(0, WORDS - 1), 1'b0);
      end
    end
    $display("@%0d after heavy phase: promote %0d demote %0d swap %0d dump %0d", cyc,
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);

    // moderate traffic with thresholds lowered to 5 % / 99 %: HMU
    @(negedge clk);
    cfg_we = 1; cfg_th1 = 10'd50; cfg_th2 = 10'd990;
    @(negedge clk);
    cfg_we = 0;
    traffic(PHASE, 20, 0, 25, 0, 0, 0);
    $display("@%0d after moderate phase: promote %0d demote %0d swap %0d dump %0d", cyc,
             n_kind[0], n_kind[1], n_kind[2], n_kind[3]);

    // light traffic again at the default thresholds: with the 3D-DRAM full,
    // higher-priority ex blocks displace kept lower-priority blocks
    @(negedge clk);
    cfg_we = 1; cfg_th1 = 10'd800; cfg_th2 = 10'd950;
    @(negedge clk);
    cfg_we = 0;
    traffic(PHASE, 10, 0, 25, 0, 0, 0);
    $display("@%0d after second light phase: promote %0d demote %0d swap %0d (keeper %0d) dump %0d",
             cyc, n_kind[0], n_kind[1], n_kind[2], n_keeper_swap, n_kind[3]);

    // drain, wait for a running relocation, read everything back
    drain();
    while (reloc_busy) @(negedge clk);
    for (int p = 0; p < NPAGES; p++)
      for (int w = 0; w < WORDS; w++) issue(p, w, 1'b0);
    drain();

    $display("regions seen (3D): LMU %0d HMU %0d C %0d", n_reg3d[0], n_reg3d[1], n_reg3d[2]);
    $display("misses %0d, reads checked %0d, writes %0d, stalls full %0d lock %0d, contention %0d",
             n_miss, n_rd_ok, n_wr, n_stall_full, n_stall_lock, n_contention);
    check(n_alloc_3d > 0, "allocation in the 3D-DRAM happened");
    check(n_alloc_ex > 0, "allocation in the ex-DRAM happened");
    check(n_miss > 0, "TLB misses happened");
    check(n_kind[0] > 0, "promotion happened");
    check(n_kind[2] > 0, "swap happened");
    check(n_reg3d[0] > 0 && n_reg3d[1] > 0, "LMU and HMU regions seen");
    check(n_stall_full > 0, "queue-full back-pressure happened");
    check(n_contention > 0, "QoS arbitration between queues happened");
    if (CHECK_ALL) begin
      check(n_kind[1] > 0, "demotion happened");
      check(n_kind[3] > 0, "dump of an un-accessed block happened");
      check(n_keeper_swap > 0, "swap with a kept block happened");
      check(n_reg3d[2] > 0, "congested region seen");
      check(n_stall_lock > 0, "a request was held by a relocation lock");
    end
    check(n_rd_ok > 0, "reads checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
