// tb_free_space_regs: checks OS writes, consumption by a move, hand-back of
// a vacated block, the precedence give > OS write > take, and the need_*
// requests to the OS; then 2000 cycles of random inputs against a
// reference model of both registers.
module tb_free_space_regs;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic os_we_3d, os_we_ex, take_3d, take_ex, give_3d, give_ex;
  pbn_t os_pbn_3d, os_pbn_ex, give_pbn_3d, give_pbn_ex;
  logic free_3d_valid, free_ex_valid, need_3d, need_ex;
  pbn_t free_3d_pbn, free_ex_pbn;
  int checks = 0, failures = 0;

  free_space_regs dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic idle();
    {os_we_3d, os_we_ex, take_3d, take_ex, give_3d, give_ex} = '0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    os_pbn_3d = '0; os_pbn_ex = '0; give_pbn_3d = '0; give_pbn_ex = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check(need_3d && need_ex && !free_3d_valid && !free_ex_valid, "empty after reset");
    os_we_3d = 1; os_pbn_3d = 21'd100; os_we_ex = 1; os_pbn_ex = 21'd200000;
    @(negedge clk); idle();
    check(free_3d_valid && free_3d_pbn == 21'd100 && !need_3d, "OS filled 3D");
    check(free_ex_valid && free_ex_pbn == 21'd200000 && !need_ex, "OS filled ex");
    take_3d = 1;
    @(negedge clk); idle();
    check(!free_3d_valid && need_3d, "3D consumed");
    check(free_ex_valid, "ex untouched");
    give_3d = 1; give_pbn_3d = 21'd55; take_ex = 1;
    @(negedge clk); idle();
    check(free_3d_valid && free_3d_pbn == 21'd55, "vacated block handed back");
    check(!free_ex_valid, "ex consumed");
    give_ex = 1; give_pbn_ex = 21'd300000; os_we_ex = 1; os_pbn_ex = 21'd400000;
    @(negedge clk); idle();
    check(free_ex_pbn == 21'd300000, "give wins over OS write");
    os_we_3d = 1; os_pbn_3d = 21'd77; take_3d = 1;
    @(negedge clk); idle();
    check(free_3d_valid && free_3d_pbn == 21'd77, "OS write wins over take");
    // random inputs against a reference model
    begin
      bit   rv [2];
      pbn_t rp [2];
      bit   g, w, t;
      pbn_t gp, wp;
      rv[0] = free_3d_valid; rp[0] = free_3d_pbn;
      rv[1] = free_ex_valid; rp[1] = free_ex_pbn;
      for (int i = 0; i < 2000; i++) begin
        for (int k = 0; k < 2; k++) begin
          g  = ($urandom_range(0, 3) == 0);
          w  = ($urandom_range(0, 3) == 0);
          t  = ($urandom_range(0, 1) == 1);
          gp = pbn_t'($urandom);
          wp = pbn_t'($urandom);
          if (k == 0) begin give_3d = g; give_pbn_3d = gp; os_we_3d = w; os_pbn_3d = wp; take_3d = t; end
          else        begin give_ex = g; give_pbn_ex = gp; os_we_ex = w; os_pbn_ex = wp; take_ex = t; end
          if (g)      begin rv[k] = 1; rp[k] = gp; end
          else if (w) begin rv[k] = 1; rp[k] = wp; end
          else if (t) rv[k] = 0;
        end
        @(negedge clk);
        check(free_3d_valid == rv[0] && need_3d == !rv[0] && (!rv[0] || free_3d_pbn == rp[0]),
              "random: 3D register");
        check(free_ex_valid == rv[1] && need_ex == !rv[1] && (!rv[1] || free_ex_pbn == rp[1]),
              "random: ex register");
      end
      idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
