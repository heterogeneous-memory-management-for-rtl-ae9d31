// tb_tlb: 8-entry TLB. Checks misses, refills, hits, round-robin
// replacement, refill of an existing page, and the one-cycle hardware update
// for a move (one block) and a swap (two blocks exchanged). Then 3000
// random cycles of refills, moves, swaps and lookups over 16 pages and 24
// blocks, refills and updates sometimes in the same cycle: every hit must
// agree with a reference page table that applies the same moves, and a
// page refilled in the previous cycle must hit.
module tb_tlb;
  import hmm_pkg::*;
  localparam int E = 8;
  logic clk = 0, rst_n = 0;
  vpn_t lk_vpn, refill_vpn;
  logic lk_hit, refill_valid, upd_a_valid, upd_b_valid;
  pbn_t lk_pbn, refill_pbn, upd_a_old, upd_a_new, upd_b_old, upd_b_new;
  int checks = 0, failures = 0;

  tlb #(.ENTRIES(E)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic refill(input vpn_t v, input pbn_t p);
    refill_valid = 1; refill_vpn = v; refill_pbn = p;
    @(negedge clk);
    refill_valid = 0;
  endtask

  task automatic expect_map(input vpn_t v, input bit hit, input pbn_t p);
    lk_vpn = v;
    #1;
    check(lk_hit == hit, $sformatf("hit for vpn %0h", v));
    if (hit) check(lk_pbn == p, $sformatf("vpn %0h -> %0d, expected %0d", v, lk_pbn, p));
    @(negedge clk);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    refill_valid = 0; upd_a_valid = 0; upd_b_valid = 0; lk_vpn = '0;
    refill_vpn = '0; refill_pbn = '0; upd_a_old = '0; upd_a_new = '0; upd_b_old = '0; upd_b_new = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    expect_map(20'h00010, 0, '0);
    for (int i = 0; i < E; i++) refill(vpn_t'(20'h00010 + i), pbn_t'(1000 + i));
    for (int i = 0; i < E; i++) expect_map(vpn_t'(20'h00010 + i), 1, pbn_t'(1000 + i));
    // refill of a present page updates in place, no eviction
    refill(20'h00012, 21'd5000);
    expect_map(20'h00012, 1, 21'd5000);
    expect_map(20'h00010, 1, 21'd1000);
    // a new page evicts the oldest entry (round robin)
    refill(20'h000FF, 21'd777);
    expect_map(20'h000FF, 1, 21'd777);
    expect_map(20'h00010, 0, '0);
    expect_map(20'h00011, 1, 21'd1001);
    // move: block 1001 now lives at 200000
    upd_a_valid = 1; upd_a_old = 21'd1001; upd_a_new = 21'd200000;
    @(negedge clk); upd_a_valid = 0;
    expect_map(20'h00011, 1, 21'd200000);
    // swap 1003 <-> 777
    upd_a_valid = 1; upd_a_old = 21'd1003; upd_a_new = 21'd777;
    upd_b_valid = 1; upd_b_old = 21'd777;  upd_b_new = 21'd1003;
    @(negedge clk); upd_a_valid = 0; upd_b_valid = 0;
    expect_map(20'h00013, 1, 21'd777);
    expect_map(20'h000FF, 1, 21'd1003);
    expect_map(20'h00014, 1, 21'd1004);
    // random traffic against a reference page table
    begin
      pbn_t pt [16];
      bit   used [24];
      int   last_v;
      foreach (used[b]) used[b] = 0;
      for (int v = 0; v < 16; v++) begin pt[v] = pbn_t'(v); used[v] = 1; end
      // start from a clean TLB
      rst_n = 0; @(negedge clk); rst_n = 1;
      last_v = -1;
      for (int i = 0; i < 3000; i++) begin
        int v, v2, f;
        pbn_t oa, ob;
        // lookup against the state before this cycle's changes
        v = (last_v >= 0 && $urandom_range(0, 1) == 1) ? last_v : $urandom_range(0, 15);
        lk_vpn = vpn_t'(v);
        // this cycle's refill (carries the table as it stands now)
        refill_valid = ($urandom_range(0, 2) == 0);
        refill_vpn   = vpn_t'($urandom_range(0, 15));
        refill_pbn   = pt[int'(refill_vpn)];
        // this cycle's update: none, a move to a free block, or a swap
        upd_a_valid = 0; upd_b_valid = 0;
        case ($urandom_range(0, 5))
          0: begin
            v2 = $urandom_range(0, 15);
            do f = $urandom_range(0, 23); while (used[f]);
            upd_a_valid = 1; upd_a_old = pt[v2]; upd_a_new = pbn_t'(f);
          end
          1: begin
            v2 = $urandom_range(0, 15);
            f  = (v2 + $urandom_range(1, 15)) % 16;
            upd_a_valid = 1; upd_a_old = pt[v2]; upd_a_new = pt[f];
            upd_b_valid = 1; upd_b_old = pt[f];  upd_b_new = pt[v2];
          end
          default: ;
        endcase
        #1;
        if (v == last_v) check(lk_hit, $sformatf("page %0d refilled last cycle hits", v));
        if (lk_hit) check(lk_pbn == pt[v], $sformatf("random: page %0d -> %0d, expected %0d", v, lk_pbn, pt[v]));
        // apply the update to the reference table
        oa = upd_a_old; ob = upd_b_old;
        for (int k = 0; k < 16; k++) begin
          if (upd_a_valid && pt[k] == oa)      pt[k] = upd_a_new;
          else if (upd_b_valid && pt[k] == ob) pt[k] = upd_b_new;
        end
        if (upd_a_valid && !upd_b_valid) begin used[int'(oa)] = 0; used[int'(upd_a_new)] = 1; end
        last_v = refill_valid ? int'(refill_vpn) : -1;
        @(negedge clk);
      end
      refill_valid = 0; upd_a_valid = 0; upd_b_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
