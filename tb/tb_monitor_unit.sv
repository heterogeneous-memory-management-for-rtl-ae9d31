// tb_monitor_unit: drives known busy patterns for one period (PERIOD = 100)
// and checks the measured counts, the eval pulse timing and the region of
// each memory against the 80 %/95 % thresholds and a run-time change to
// 55 %/80 %. Then 30 periods of random busy patterns, each with random
// thresholds written at its start.
module tb_monitor_unit;
  import hmm_pkg::*;
  localparam int P = 100;
  logic clk = 0, rst_n = 0;
  logic [1:0] busy_3d;
  logic busy_ex, cfg_we, eval;
  logic [9:0] cfg_th1, cfg_th2;
  region_t region_3d, region_ex;
  logic [$clog2(2*P+1)-1:0] last_cnt_3d;
  logic [$clog2(P+1)-1:0]   last_cnt_ex;
  int checks = 0, failures = 0;

  monitor_unit #(.PERIOD(P), .TH1(800), .TH2(950)) dut (.*);
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

  // one full period: n3a/n3b/nex busy cycles on the three controllers
  task automatic period(input int n3a, input int n3b, input int nex,
                        input region_t e3d, input region_t eex);
    // called at a negedge; cycle i is sampled at the i-th following posedge
    for (int i = 0; i < P; i++) begin
      busy_3d = {i < n3b, i < n3a};
      busy_ex = i < nex;
      if (i > 0) check(!eval, "eval only once per period");
      @(negedge clk);
    end
    busy_3d = '0; busy_ex = 0;
    check(eval, "eval pulse after the period");
    check(last_cnt_3d == n3a + n3b, $sformatf("3D count %0d", last_cnt_3d));
    check(last_cnt_ex == nex, $sformatf("ex count %0d", last_cnt_ex));
    check(region_3d == e3d, $sformatf("3D region %0d for %0d/%0d", region_3d, n3a + n3b, 2 * P));
    check(region_ex == eex, $sformatf("ex region %0d for %0d/%0d", region_ex, nex, P));
  endtask

  initial begin
    busy_3d = 0; busy_ex = 0; cfg_we = 0; cfg_th1 = 0; cfg_th2 = 0;
    @(negedge clk);
    rst_n = 1;
    period(50, 60, 10, REG_LMU, REG_LMU);     // 55 %, 10 %
    period(79, 80, 80, REG_LMU, REG_HMU);     // 79.5 %, 80 %
    period(90, 95, 94, REG_HMU, REG_HMU);     // 92.5 %, 94 %
    period(95, 95, 95, REG_C, REG_C);         // 95 %
    period(100, 100, 100, REG_C, REG_C);      // 100 %
    // thresholds of the blocker experiment: 55 % and 80 %; the write
    // happens during an idle period
    cfg_we = 1; cfg_th1 = 10'd550; cfg_th2 = 10'd800;
    @(negedge clk);
    cfg_we = 0;
    while (!eval) @(negedge clk);
    period(60, 50, 54, REG_HMU, REG_LMU);     // 55 %, 54 %
    period(80, 80, 79, REG_C, REG_HMU);       // 80 %, 79 %
    // random periods: each controller busy at its own random rate, new
    // random thresholds written in the first cycle of the period
    for (int k = 0; k < 30; k++) begin
      int r [3], n3, nx, t1, t2;
      for (int c = 0; c < 3; c++) r[c] = $urandom_range(0, 100);
      t1 = $urandom_range(1, 998);
      t2 = $urandom_range(t1, 999);
      n3 = 0; nx = 0;
      for (int i = 0; i < P; i++) begin
        busy_3d[0] = ($urandom_range(0, 99) < r[0]);
        busy_3d[1] = ($urandom_range(0, 99) < r[1]);
        busy_ex    = ($urandom_range(0, 99) < r[2]);
        n3 += int'(busy_3d[0]) + int'(busy_3d[1]);
        nx += int'(busy_ex);
        cfg_we = (i == 0); cfg_th1 = 10'(t1); cfg_th2 = 10'(t2);
        if (i > 0) check(!eval, "random: eval only once per period");
        @(negedge clk);
      end
      busy_3d = '0; busy_ex = 0; cfg_we = 0;
      check(eval, "random: eval pulse after the period");
      check(last_cnt_3d == n3 && last_cnt_ex == nx,
            $sformatf("random: counts %0d/%0d expected %0d/%0d", last_cnt_3d, last_cnt_ex, n3, nx));
      check(region_3d == ((n3 * 1000 < t1 * 2 * P) ? REG_LMU : (n3 * 1000 < t2 * 2 * P) ? REG_HMU : REG_C),
            $sformatf("random: 3D region for %0d/%0d with %0d/%0d", n3, 2 * P, t1, t2));
      check(region_ex == ((nx * 1000 < t1 * P) ? REG_LMU : (nx * 1000 < t2 * P) ? REG_HMU : REG_C),
            $sformatf("random: ex region for %0d/%0d with %0d/%0d", nx, P, t1, t2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
