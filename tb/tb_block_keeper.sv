// tb_block_keeper: checks that the keeper holds the latest bandwidth-
// sensitive and insensitive 3D-DRAM blocks, ignores latency-sensitive ones,
// and forgets a block that has been relocated; then 2000 cycles of random
// observations and invalidations over 8 block numbers against a reference
// model (an observation in the same cycle as an invalidation wins).
module tb_block_keeper;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic obs_valid, inv_valid, keep_bw_valid, keep_ins_valid;
  app_t obs_app;
  pbn_t obs_pbn, inv_pbn, keep_bw_pbn, keep_ins_pbn;
  int checks = 0, failures = 0;

  block_keeper dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic obs(input app_t a, input pbn_t p);
    obs_valid = 1; obs_app = a; obs_pbn = p;
    @(negedge clk);
    obs_valid = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    obs_valid = 0; inv_valid = 0; obs_app = APP_LAT; obs_pbn = '0; inv_pbn = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check(!keep_bw_valid && !keep_ins_valid, "empty after reset");
    obs(APP_LAT, 21'd1);
    check(!keep_bw_valid && !keep_ins_valid, "latency-sensitive not kept");
    obs(APP_BW, 21'd2);
    obs(APP_INS, 21'd3);
    check(keep_bw_valid && keep_bw_pbn == 21'd2, "BW kept");
    check(keep_ins_valid && keep_ins_pbn == 21'd3, "INS kept");
    obs(APP_BW, 21'd4);
    check(keep_bw_pbn == 21'd4 && keep_ins_pbn == 21'd3, "BW replaced by newer");
    inv_valid = 1; inv_pbn = 21'd3;
    @(negedge clk); inv_valid = 0;
    check(!keep_ins_valid && keep_bw_valid, "relocated INS block forgotten");
    // random traffic against a reference model
    begin
      bit   rv [2];
      pbn_t rp [2];
      rv[0] = keep_bw_valid;  rp[0] = keep_bw_pbn;
      rv[1] = keep_ins_valid; rp[1] = keep_ins_pbn;
      for (int i = 0; i < 2000; i++) begin
        obs_valid = ($urandom_range(0, 1) == 1);
        obs_app   = app_t'($urandom_range(0, 2));
        obs_pbn   = pbn_t'($urandom_range(0, 7));
        inv_valid = ($urandom_range(0, 2) == 0);
        inv_pbn   = pbn_t'($urandom_range(0, 7));
        for (int k = 0; k < 2; k++) begin
          if (obs_valid && obs_app == app_t'(k + 1)) begin rv[k] = 1; rp[k] = obs_pbn; end
          else if (inv_valid && rp[k] == inv_pbn)    rv[k] = 0;
        end
        @(negedge clk);
        check(keep_bw_valid == rv[0] && (!rv[0] || keep_bw_pbn == rp[0]), "random: BW keeper");
        check(keep_ins_valid == rv[1] && (!rv[1] || keep_ins_pbn == rp[1]), "random: INS keeper");
      end
      obs_valid = 0; inv_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
