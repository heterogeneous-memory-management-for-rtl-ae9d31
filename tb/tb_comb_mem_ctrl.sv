// tb_comb_mem_ctrl: combined memory controller with 16 3D blocks and an
// 8-entry TLB, the three controllers replaced by ready/valid stubs driven
// here. Checks TLB miss and refill, translation, routing to 3D controller
// 1/2 by the interleave bit and to the ex-DRAM controller, queue selection
// fields, back-pressure, relocation priority, the block lock, access
// observation, and the response merge and steering. Then 2000 random
// requests over 8 pages mapped to random 3D and ex blocks, each checked for
// controller, queue fields, physical address and observation, with random
// back-pressure and a random lock on two of the blocks.
module tb_comb_mem_ctrl;
  import hmm_pkg::*;
  localparam int N3D = 16;
  logic clk = 0, rst_n = 0;
  logic core_req_valid, core_req_ready, core_rsp_valid, core_rsp_ready;
  core_req_t core_req;
  mem_rsp_t core_rsp, rl_rsp;
  logic tlb_miss, refill_valid;
  vpn_t tlb_miss_vpn, refill_vpn;
  pbn_t refill_pbn;
  logic rl_req_valid, rl_req_ready, rl_rsp_valid;
  mem_req_t rl_req, ctl_req;
  logic lock_valid, upd_a_valid, upd_b_valid;
  pbn_t lock_pbn_a, lock_pbn_b, upd_a_old, upd_a_new, upd_b_old, upd_b_new;
  logic obs_valid;
  mem_t obs_mem;
  app_t obs_app;
  pbn_t obs_pbn;
  logic [2:0] ctl_valid, ctl_ready, ctl_rsp_valid, ctl_rsp_ready;
  mem_rsp_t ctl_rsp [3];
  int checks = 0, failures = 0;

  comb_mem_ctrl #(.N3D_BLOCKS(N3D), .TLB_ENTRIES(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic core(input logic we, input logic [31:0] va, input app_t app, input logic [7:0] tag);
    core_req_valid = 1;
    core_req = '{we: we, vaddr: va, wdata: {32'h0, va}, app: app, tag: tag};
    #1;
  endtask

  initial begin
    core_req_valid = 0; core_req = '0; core_rsp_ready = 1; refill_valid = 0;
    refill_vpn = '0; refill_pbn = '0; rl_req_valid = 0; rl_req = '0;
    lock_valid = 0; lock_pbn_a = '0; lock_pbn_b = '0;
    {upd_a_valid, upd_b_valid} = '0;
    {upd_a_old, upd_a_new, upd_b_old, upd_b_new} = '0;
    ctl_ready = 3'b111; ctl_rsp_valid = '0;
    for (int i = 0; i < 3; i++) ctl_rsp[i] = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);

    // miss, then refill vpn 0x12345 -> 3D block 3, vpn 0x00777 -> ex block 100
    core(0, 32'h1234_5040, APP_BW, 8'h21);
    check(tlb_miss && tlb_miss_vpn == 20'h12345, "miss reported");
    check(!core_req_ready && ctl_valid == '0, "missing request held");
    refill_valid = 1; refill_vpn = 20'h12345; refill_pbn = 21'd3;
    @(negedge clk);
    refill_vpn = 20'h00777; refill_pbn = 21'd100;
    #1;
    check(!tlb_miss && core_req_ready, "hit after refill");
    check(ctl_valid == 3'b010, "address bit 6 set: 3D controller 2");
    check(ctl_req.addr == {21'd3, 12'h040} && ctl_req.app == APP_BW && ctl_req.tag == 8'h21 &&
          !ctl_req.reloc && !ctl_req.we, "translated request fields");
    check(obs_valid && obs_mem == MEM_3D && obs_app == APP_BW && obs_pbn == 21'd3, "observed");
    @(negedge clk);
    refill_valid = 0;
    core(1, 32'h1234_5008, APP_LAT, 8'h11);
    check(ctl_valid == 3'b001 && ctl_req.we && ctl_req.addr == {21'd3, 12'h008}, "3D controller 1");
    @(negedge clk);
    core(0, 32'h0077_7FF8, APP_INS, 8'h31);
    check(ctl_valid == 3'b100 && ctl_req.addr == {21'd100, 12'hFF8}, "ex-DRAM controller");
    check(obs_valid && obs_mem == MEM_EX, "ex access observed");
    // back-pressure from a full queue
    ctl_ready = 3'b011;
    #1 check(!core_req_ready && !obs_valid, "full ex queue stalls the core");
    ctl_ready = 3'b111;
    // relocation request has priority
    rl_req_valid = 1; rl_req = '0; rl_req.reloc = 1; rl_req.addr = {21'd5, 12'h000};
    #1;
    check(rl_req_ready && !core_req_ready && ctl_valid == 3'b001 && ctl_req.reloc, "relocation first");
    @(negedge clk);
    rl_req_valid = 0;
    // lock on block 100 holds the core request to it, not others
    lock_valid = 1; lock_pbn_a = 21'd100; lock_pbn_b = 21'd7;
    #1 check(!core_req_ready && ctl_valid == '0, "locked block held");
    core(0, 32'h1234_5000, APP_INS, 8'h32);
    check(core_req_ready, "other block passes the lock");
    lock_pbn_a = 21'd7; lock_pbn_b = 21'd3;
    #1 check(!core_req_ready && ctl_valid == '0, "second locked block held");
    lock_pbn_b = 21'd9;
    #1 check(core_req_ready, "released when the second block changes");
    @(negedge clk);
    lock_valid = 0;
    // hardware TLB update redirects the page
    upd_a_valid = 1; upd_a_old = 21'd3; upd_a_new = 21'd200;
    @(negedge clk);
    upd_a_valid = 0;
    #1 check(ctl_valid == 3'b100 && ctl_req.addr[PA_W-1:OFFSET_W] == 21'd200, "moved page now in ex-DRAM");
    core_req_valid = 0;
    // response merge: core response on controller 1, relocation response on ex
    ctl_rsp_valid = 3'b101;
    ctl_rsp[0] = '{we: 0, rdata: 64'hAAAA, reloc: 0, tag: 8'h44};
    ctl_rsp[2] = '{we: 0, rdata: 64'hBBBB, reloc: 1, tag: 8'h00};
    core_rsp_ready = 0;
    #1;
    check(rl_rsp_valid && !core_rsp_valid && rl_rsp.rdata == 64'hBBBB && ctl_rsp_ready == 3'b100,
          "relocation response passes a stalled core port");
    core_rsp_ready = 1;
    #1;
    check(core_rsp_valid && !rl_rsp_valid && core_rsp.tag == 8'h44 && ctl_rsp_ready == 3'b001,
          "one response per cycle, controller 1 first");
    // random requests against the routing rule
    begin
      pbn_t map [8];
      ctl_rsp_valid = '0;
      core_rsp_ready = 1;
      for (int v = 0; v < 8; v++) begin
        map[v] = ($urandom_range(0, 1) == 1) ? pbn_t'($urandom_range(0, N3D - 1))
                                              : pbn_t'($urandom_range(N3D, 2000000));
        @(negedge clk);
        refill_valid = 1; refill_vpn = vpn_t'(20'h40000 + v); refill_pbn = map[v];
      end
      @(negedge clk);
      refill_valid = 0;
      for (int i = 0; i < 2000; i++) begin
        int v;
        logic [11:0] off;
        logic [2:0] exp_ctl;
        logic we, held;
        app_t app;
        v   = $urandom_range(0, 7);
        // a third of the time the relocation unit holds two of the blocks
        lock_valid = ($urandom_range(0, 2) == 0);
        lock_pbn_a = map[$urandom_range(0, 7)];
        lock_pbn_b = map[$urandom_range(0, 7)];
        held = lock_valid && (map[v] == lock_pbn_a || map[v] == lock_pbn_b);
        off = 12'($urandom_range(0, 511) * 8);
        we  = $urandom_range(0, 1);
        app = app_t'($urandom_range(0, 2));
        ctl_ready = 3'($urandom_range(0, 7));
        core(we, {20'h40000 + 20'(v), off}, app, 8'(i));
        #1;
        if (map[v] < pbn_t'(N3D)) exp_ctl = off[6] ? 3'b010 : 3'b001;
        else                      exp_ctl = 3'b100;
        if (held) exp_ctl = 3'b000;
        check(!tlb_miss, "random: mapped page hits");
        check(core_req_ready == |(exp_ctl & ctl_ready), "random: ready follows the target queue");
        check(ctl_valid == exp_ctl, "random: controller selection");
        if (core_req_ready)
          check(ctl_req.addr == {map[v], off} && ctl_req.we == we && ctl_req.app == app &&
                ctl_req.tag == 8'(i) && !ctl_req.reloc && obs_valid && obs_pbn == map[v] &&
                obs_app == app && obs_mem == ((map[v] < pbn_t'(N3D)) ? MEM_3D : MEM_EX),
                "random: request fields and observation");
        @(negedge clk);
      end
      core_req_valid = 0;
      lock_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
