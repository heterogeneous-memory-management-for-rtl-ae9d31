// tb_mru_regs: checks the six MRU registers: an access records its block in
// the register of its memory and class, a newer access replaces it and
// restarts the lifetime, the entry expires LIFETIME cycles after its last
// update, and a relocated block is cleared; then 3000 cycles of random
// observations and clears against a reference model that remembers the
// cycle of each register's last update.
module tb_mru_regs;
  import hmm_pkg::*;
  localparam int LT = 20;
  logic clk = 0, rst_n = 0;
  logic obs_valid, inv_valid;
  mem_t obs_mem;
  app_t obs_app;
  pbn_t obs_pbn, inv_pbn;
  logic [1:0][2:0] mru_valid;
  pbn_t [1:0][2:0] mru_pbn;
  int checks = 0, failures = 0;

  mru_regs #(.LIFETIME(LT)) dut (.*);
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

  task automatic obs(input mem_t m, input app_t a, input pbn_t p);
    obs_valid = 1; obs_mem = m; obs_app = a; obs_pbn = p;
    @(negedge clk);
    obs_valid = 0;
  endtask

  int life;
  initial begin
    obs_valid = 0; inv_valid = 0; obs_mem = MEM_3D; obs_app = APP_LAT; obs_pbn = '0; inv_pbn = '0;
    @(negedge clk); rst_n = 1; @(negedge clk);
    check(mru_valid == '0, "empty after reset");
    obs(MEM_EX, APP_BW, 21'd200000);
    check(mru_valid[MEM_EX][APP_BW] && mru_pbn[MEM_EX][APP_BW] == 21'd200000, "ex/BW recorded");
    check(mru_valid[MEM_3D] == 3'b000 && mru_valid[MEM_EX] == 3'b010, "only that register");
    obs(MEM_3D, APP_LAT, 21'd7);
    obs(MEM_3D, APP_INS, 21'd9);
    check(mru_valid[MEM_3D][APP_LAT] && mru_pbn[MEM_3D][APP_LAT] == 21'd7, "3D/LAT recorded");
    check(mru_valid[MEM_3D][APP_INS] && mru_pbn[MEM_3D][APP_INS] == 21'd9, "3D/INS recorded");
    check(!mru_valid[MEM_3D][APP_BW] && !mru_valid[MEM_EX][APP_LAT], "others empty");
    // newer access in the same class replaces and restarts the lifetime
    repeat (10) @(negedge clk);
    obs(MEM_3D, APP_LAT, 21'd8);
    check(mru_pbn[MEM_3D][APP_LAT] == 21'd8, "replaced by newer access");
    // count how long 3D/LAT stays valid after its last update
    life = 0;   // cycles in which the entry is seen valid
    while (mru_valid[MEM_3D][APP_LAT] && life < 100) begin
      @(negedge clk);
      life++;
    end
    check(life == LT, $sformatf("lifetime %0d cycles", life));
    check(!mru_valid[MEM_EX][APP_BW], "ex/BW expired earlier");
    // invalidation of a moved block
    obs(MEM_EX, APP_LAT, 21'd300000);
    inv_valid = 1; inv_pbn = 21'd300000;
    @(negedge clk);
    inv_valid = 0;
    check(!mru_valid[MEM_EX][APP_LAT], "relocated block cleared");
    // observation wins over a simultaneous clear
    obs_valid = 1; obs_mem = MEM_EX; obs_app = APP_INS; obs_pbn = 21'd5;
    inv_valid = 1; inv_pbn = 21'd5;
    @(negedge clk);
    obs_valid = 0; inv_valid = 0;
    check(mru_valid[MEM_EX][APP_INS], "new access kept");
    // random traffic against a reference model
    begin
      bit   rv [2][3];
      pbn_t rp [2][3];
      int   upd [2][3];
      for (int m = 0; m < 2; m++)
        for (int a = 0; a < 3; a++) begin
          rv[m][a] = mru_valid[m][a]; rp[m][a] = mru_pbn[m][a]; upd[m][a] = -LT;
        end
      upd[MEM_EX][APP_INS] = -1;       // updated in the directed step above
      for (int i = 0; i < 3000; i++) begin
        obs_valid = ($urandom_range(0, 3) == 0);
        obs_mem   = mem_t'($urandom_range(0, 1));
        obs_app   = app_t'($urandom_range(0, 2));
        obs_pbn   = pbn_t'($urandom_range(0, 5));
        inv_valid = ($urandom_range(0, 7) == 0);
        inv_pbn   = pbn_t'($urandom_range(0, 5));
        for (int m = 0; m < 2; m++)
          for (int a = 0; a < 3; a++) begin
            if (obs_valid && obs_mem == mem_t'(m) && obs_app == app_t'(a)) begin
              rv[m][a] = 1; rp[m][a] = obs_pbn; upd[m][a] = i;
            end else if (inv_valid && rp[m][a] == inv_pbn) begin
              rv[m][a] = 0;
            end else if (i - upd[m][a] >= LT) begin
              rv[m][a] = 0;
            end
          end
        @(negedge clk);
        for (int m = 0; m < 2; m++)
          for (int a = 0; a < 3; a++)
            check(mru_valid[m][a] == rv[m][a] && (!rv[m][a] || mru_pbn[m][a] == rp[m][a]),
                  $sformatf("random: register %0d/%0d at step %0d", m, a, i));
      end
      obs_valid = 0; inv_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
