// tb_qos_arbiter: checks the grant sequences of the QoS priority mechanism
// (M = 4, N = 4) against sequences worked out by hand from the rule:
// latency-sensitive first M times under contention, then a round-robin turn
// for bandwidth-sensitive / insensitive, a bandwidth-sensitive turn lasting
// up to N grants. Then 5000 cycles of random queue states, with the grant
// taken or not at random, are checked against properties of the rule:
// a grant goes to a waiting queue; a queue that waits alone is served; no
// more than M latency-sensitive grants in a row while another queue waits;
// an open bandwidth-sensitive turn of fewer than N grants continues while
// that queue has requests; no more than N bandwidth-sensitive grants in a
// row while another queue waits; and every waiting queue is served within
// M + N + 2 grants.
module tb_qos_arbiter;
  import hmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [2:0] req;
  logic take, gnt_valid;
  app_t gnt_app;
  int checks = 0, failures = 0;

  qos_arbiter #(.M(4), .N(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // L = latency, B = bandwidth, I = insensitive
  function automatic app_t code(byte c);
    return (c == "L") ? APP_LAT : (c == "B") ? APP_BW : APP_INS;
  endfunction

  task automatic expect_seq(input logic [2:0] r, input string seq);
    for (int i = 0; i < seq.len(); i++) begin
      @(negedge clk);
      req = r; take = 1'b1;
      #1;
      check(gnt_valid, $sformatf("grant valid at %0d of %s", i, seq));
      check(gnt_app == code(seq[i]),
            $sformatf("step %0d of %s: got %0d", i, seq, gnt_app));
    end
    @(negedge clk);
    take = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; take = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!gnt_valid, "no grant without request");
    // all three queues busy
    expect_seq(3'b111, "LLLLBBBBLLLLILLLLBBBBLLLLI");
    // reset, then only BW and INS busy: BW run of 4, then INS, alternating
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_seq(3'b110, "BBBBIBBBBI");
    // a single queue is just served in order
    expect_seq(3'b100, "IIII");
    expect_seq(3'b001, "LLLLLLLL");
    // without take the state does not move
    rst_n = 0; @(negedge clk); rst_n = 1;
    req = 3'b111; take = 0;
    repeat (10) @(negedge clk);
    expect_seq(3'b111, "LLLLB");
    // LS and INS only: INS gets one grant after every M LS grants
    rst_n = 0; @(negedge clk); rst_n = 1;
    expect_seq(3'b101, "LLLLILLLLI");
    // random queue states against properties of the rule
    begin
      localparam int M = 4, N = 4;
      int   run_l, run_b, pos_b, wait_n [3];
      app_t last;
      bit   last_valid;
      rst_n = 0; @(negedge clk); rst_n = 1;
      run_l = 0; run_b = 0; pos_b = 0; last_valid = 0; last = APP_LAT;
      wait_n = '{0, 0, 0};
      for (int i = 0; i < 5000; i++) begin
        @(negedge clk);
        // queues stay busy most of the time so that contention is common
        for (int q = 0; q < 3; q++) req[q] = ($urandom_range(0, 9) < 7);
        take = ($urandom_range(0, 9) < 8);
        #1;
        check(gnt_valid == |req, "random: grant offered iff a queue waits");
        if (!gnt_valid) continue;
        check(req[gnt_app], "random: grant to a waiting queue");
        if ($countones(req) == 1) check(req[gnt_app], "random: lone queue served");
        if (gnt_app == APP_LAT && (req[APP_BW] | req[APP_INS]))
          check(run_l < M, $sformatf("random: LS grant %0d in a row under contention", run_l + 1));
        if (last_valid && last == APP_BW && pos_b < N && req[APP_BW])
          check(gnt_app == APP_BW, "random: open BW turn continues");
        if (gnt_app == APP_BW && (req[APP_LAT] | req[APP_INS]))
          check(run_b < N, $sformatf("random: BW grant %0d in a row under contention", run_b + 1));
        if (take) begin
          // runs counted over grants given while another queue waited
          if (gnt_app == APP_LAT) run_l = (req[APP_BW] | req[APP_INS]) ? run_l + 1 : 0;
          else                    run_l = 0;
          // pos_b: place of this grant in its BW turn of up to N;
          // run_b: BW grants in a row given while another queue waited
          if (gnt_app == APP_BW) begin
            pos_b = (last_valid && last == APP_BW && pos_b < N) ? pos_b + 1 : 1;
            run_b = (req[APP_LAT] | req[APP_INS]) ? run_b + 1 : 0;
          end else begin
            pos_b = 0;
            run_b = 0;
          end
          for (int q = 0; q < 3; q++) begin
            if (q == int'(gnt_app) || !req[q]) wait_n[q] = 0;
            else begin
              wait_n[q]++;
              check(wait_n[q] <= M + N + 2, $sformatf("random: queue %0d waited %0d grants", q, wait_n[q]));
            end
          end
          last = gnt_app; last_valid = 1;
        end
      end
      take = 0; req = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
