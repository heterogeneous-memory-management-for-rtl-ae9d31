// tb_req_queue: random push/pop traffic against a reference queue; checks
// order, data, count, full and empty behaviour of req_queue (DEPTH 4).
module tb_req_queue;
  import hmm_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, pop_valid, pop_ready;
  mem_req_t push_data, pop_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  mem_req_t ref_q [$];
  int n_full = 0, n_empty = 0;

  req_queue #(.T(mem_req_t), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop_ready = 0; push_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      bit did_push, did_pop;
      @(negedge clk);
      push_valid = ($urandom_range(0, 99) < 55);
      pop_ready  = ($urandom_range(0, 99) < 45);
      push_data  = '0;
      push_data.addr  = PA_W'($urandom);
      push_data.wdata = {$urandom, $urandom};
      push_data.tag   = TAG_W'(cyc);
      #1;
      check(count == ref_q.size(), "count");
      check(push_ready == (ref_q.size() < DEPTH), "push_ready");
      check(pop_valid == (ref_q.size() > 0), "pop_valid");
      if (ref_q.size() == DEPTH) n_full++;
      if (ref_q.size() == 0) n_empty++;
      if (pop_valid && pop_ready) begin
        check(pop_data == ref_q[0], "pop data order");
      end
      did_pop  = pop_valid && pop_ready;
      did_push = push_valid && push_ready;
      @(posedge clk);
      if (did_pop) void'(ref_q.pop_front());
      if (did_push) ref_q.push_back(push_data);
    end
    check(n_full > 0 && n_empty > 0, "full and empty both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
