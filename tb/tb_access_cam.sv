// tb_access_cam: 64 3D blocks, L = 8, check period 200 cycles. After the
// clearing scan that follows reset, all blocks but eleven are accessed; the
// next scan must collect the first eight un-accessed blocks in order. An
// access to one of them hides it, take and invalidation remove entries, the
// scan takes one cycle per block, and the following period starts afresh.
// Then twelve periods of random accesses, takes and invalidations (paused
// while a scan runs) are checked cycle by cycle against a reference model:
// a scan records the first L blocks not accessed in the period before it,
// and the reported block is the lowest recorded one not accessed since.
module tb_access_cam;
  import hmm_pkg::*;
  localparam int NB = 64, L = 8, CP = 200;
  logic clk = 0, rst_n = 0;
  logic acc_valid, take, inv_valid, unacc_valid, scanning;
  pbn_t acc_pbn, inv_pbn, unacc_pbn;
  int checks = 0, failures = 0;

  access_cam #(.N3D_BLOCKS(NB), .L(L), .CHECK_PERIOD(CP)) dut (.*);
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

  int skip [11] = '{3, 10, 11, 40, 41, 42, 43, 44, 45, 46, 50};
  int exp1 [6]  = '{3, 11, 40, 42, 43, 44};
  int scan_len;

  function automatic bit skipped(int b);
    foreach (skip[i]) if (skip[i] == b) return 1;
    return 0;
  endfunction

  initial begin
    acc_valid = 0; take = 0; inv_valid = 0; acc_pbn = '0; inv_pbn = '0;
    @(negedge clk); rst_n = 1;
    // clearing scan after reset
    scan_len = 0;
    while (scanning) begin @(negedge clk); scan_len++; end
    check(scan_len == NB, $sformatf("scan took %0d cycles", scan_len));
    check(!unacc_valid, "nothing recorded by the clearing scan");
    for (int b = 0; b < NB; b++) begin
      if (!skipped(b)) begin
        acc_valid = 1; acc_pbn = pbn_t'(b);
        @(negedge clk);
      end
    end
    acc_valid = 0;
    check(!scanning && !unacc_valid, "no result before the check");
    while (!scanning) @(negedge clk);
    while (scanning) @(negedge clk);
    check(unacc_valid && unacc_pbn == 21'd3, "first un-accessed block");
    // block 10 is accessed again, 41 is overwritten by a relocation
    acc_valid = 1; acc_pbn = 21'd10;
    inv_valid = 1; inv_pbn = 21'd41;
    @(negedge clk);
    acc_valid = 0; inv_valid = 0;
    foreach (exp1[i]) begin
      check(unacc_valid && unacc_pbn == pbn_t'(exp1[i]),
            $sformatf("entry %0d: got %0d expected %0d", i, unacc_pbn, exp1[i]));
      take = 1;
      @(negedge clk);
      take = 0;
    end
    check(!unacc_valid, "only L blocks recorded (45, 46, 50 left out)");
    // next period: nothing accessed, so the first L blocks are recorded
    while (!scanning) @(negedge clk);
    while (scanning) @(negedge clk);
    for (int i = 0; i < L; i++) begin
      check(unacc_valid && unacc_pbn == pbn_t'(i), $sformatf("second period entry %0d", i));
      take = 1;
      @(negedge clk);
      take = 0;
    end
    // random periods against a reference model
    begin
      bit acc [NB];
      int ent [$];            // recorded blocks, ascending
      bit mark [int];
      bit in_scan;
      int periods;
      foreach (acc[b]) acc[b] = 0;
      in_scan = 0;
      periods = 0;
      while (periods < 12) begin
        if (scanning) begin
          in_scan = 1;
          acc_valid = 0; take = 0; inv_valid = 0;
          @(negedge clk);
          continue;
        end
        if (in_scan) begin
          in_scan = 0;
          periods++;
          ent.delete();
          mark.delete();
          for (int b = 0; b < NB && ent.size() < L; b++)
            if (!acc[b]) begin ent.push_back(b); mark[b] = 0; end
          foreach (acc[b]) acc[b] = 0;
        end
        begin
          int rep;
          rep = -1;
          foreach (ent[i]) if (!mark[ent[i]]) begin rep = ent[i]; break; end
          check(unacc_valid == (rep >= 0) && (rep < 0 || unacc_pbn == pbn_t'(rep)),
                $sformatf("random: reported %0d/%0d, expected %0d", unacc_valid, unacc_pbn, rep));
          acc_valid = ($urandom_range(0, 9) < 3);
          acc_pbn   = pbn_t'($urandom_range(0, NB - 1));
          take      = ($urandom_range(0, 9) == 0);
          inv_valid = ($urandom_range(0, 19) == 0);
          inv_pbn   = pbn_t'($urandom_range(0, NB - 1));
          if (acc_valid) begin
            acc[int'(acc_pbn)] = 1;
            if (mark.exists(int'(acc_pbn))) mark[int'(acc_pbn)] = 1;
          end
          for (int i = ent.size() - 1; i >= 0; i--)
            if ((inv_valid && ent[i] == int'(inv_pbn)) || (take && ent[i] == rep)) begin
              mark.delete(ent[i]);
              ent.delete(i);
            end
        end
        @(negedge clk);
      end
      acc_valid = 0; take = 0; inv_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
