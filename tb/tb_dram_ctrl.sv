// tb_dram_ctrl: checks one memory controller (ex-DRAM timing, 12/12 clocks)
// with a DRAM storage model: write then read-back data, read latency and
// write recovery in cycles, 100 % busy under back-to-back requests, and the
// QoS service order of requests waiting in all three queues; then random
// traffic in all classes against a reference memory and per-class order.
module tb_dram_ctrl;
  import hmm_pkg::*;
  localparam int RL = 12, WR = 12;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, dram_cmd_valid, rsp_valid, rsp_ready, busy;
  mem_req_t in_req;
  dram_cmd_t dram_cmd;
  logic [DATA_W-1:0] dram_rdata;
  mem_rsp_t rsp;
  logic [2:0] q_nonempty;
  int checks = 0, failures = 0;
  int cyc = 0;

  dram_ctrl #(.READ_LAT(RL), .WR_REC(WR)) dut (.*);
  dram_model u_mem (.clk, .cmd_valid(dram_cmd_valid), .cmd(dram_cmd), .rdata(dram_rdata));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  int n_cmds = 0;
  always @(posedge clk) if (dram_cmd_valid) n_cmds <= n_cmds + 1;

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

  task automatic push(input logic we, input logic [PA_W-1:0] a, input logic [DATA_W-1:0] d,
                      input app_t app, input logic [TAG_W-1:0] tag);
    @(negedge clk);
    in_valid = 1; in_req = '0;
    in_req.we = we; in_req.addr = a; in_req.wdata = d; in_req.app = app; in_req.tag = tag;
    #1 check(in_ready, "queue accepts");
    @(negedge clk);
    in_valid = 0;
  endtask

  // one request alone: returns cycles from command to response and the data
  task automatic single(input logic we, input logic [PA_W-1:0] a, input logic [DATA_W-1:0] d,
                        output int lat, output logic [DATA_W-1:0] rd);
    int t0;
    push(we, a, d, APP_LAT, 8'h01);
    wait (dram_cmd_valid);
    t0 = cyc;
    @(posedge clk);
    while (!rsp_valid) @(posedge clk);
    lat = cyc - t0;
    rd  = rsp.rdata;
    @(negedge clk);
  endtask

  int lat, busy_cnt, t_first, t_last;
  logic [DATA_W-1:0] rd;
  logic [TAG_W-1:0] order [$];
  logic [TAG_W-1:0] exp_order [13] = '{8'h10, 8'h11, 8'h12, 8'h13, 8'h20, 8'h21, 8'h22,
                                       8'h23, 8'h14, 8'h15, 8'h30, 8'h24, 8'h31};


  initial begin
    in_valid = 0; in_req = '0; rsp_ready = 1; busy_cnt = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // write recovery
    single(1'b1, 33'h0_0000_1000, 64'hDEAD_BEEF_0123_4567, lat, rd);
    check(lat == WR + 1, $sformatf("write response after %0d cycles", lat));
    check(rsp.we, "write acknowledged as write");
    // read latency and data
    single(1'b0, 33'h0_0000_1000, '0, lat, rd);
    check(lat == RL + 1, $sformatf("read response after %0d cycles", lat));
    check(rd == 64'hDEAD_BEEF_0123_4567, "read back written word");
    single(1'b0, 33'h1_2345_6780, '0, lat, rd);
    check(rd == u_mem.init_word(33'h1_2345_6780), "read unwritten word");

    // back-to-back: 6 reads queued while the response register is held
    repeat (3) @(negedge clk);
    rsp_ready = 0;
    for (int i = 0; i < 6; i++) push(1'b0, PA_W'(i * 8), '0, APP_BW, TAG_W'(i));
    rsp_ready = 1;
    for (int i = 0; i < 6; i++) begin
      @(posedge clk);
      while (!rsp_valid) begin
        if (i > 0 && !busy) busy_cnt++;   // idle cycles between responses
        @(posedge clk);
      end
      t_last = cyc;
      if (i > 1) check(t_last - t_first == RL, $sformatf("response spacing %0d", t_last - t_first));
      t_first = t_last;
      check(rsp.tag == TAG_W'(i), "in-order responses within a queue");
      check(rsp.rdata == u_mem.init_word(PA_W'(i * 8)), "read data");
    end
    @(negedge clk);
    check(busy_cnt == 0, $sformatf("idle cycles while requests waited: %0d", busy_cnt));

    // restart from reset so the arbiter state is the documented initial one
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;

    // QoS order: block the response path, fill all three queues
    rsp_ready = 0;
    push(1'b1, 33'h0_0000_2000, 64'h1, APP_LAT, 8'h0F);
    repeat (RL + 2) @(negedge clk);
    for (int i = 0; i < 2; i++) push(1'b0, 33'h0_0000_3000, '0, APP_INS, TAG_W'(8'h30 + i));
    for (int i = 0; i < 5; i++) push(1'b0, 33'h0_0000_3000, '0, APP_BW,  TAG_W'(8'h20 + i));
    for (int i = 0; i < 6; i++) push(1'b0, 33'h0_0000_3000, '0, APP_LAT, TAG_W'(8'h10 + i));
    check(q_nonempty == 3'b111, "all queues hold requests");
    rsp_ready = 1;
    @(posedge clk);
    while (order.size() < 14) begin
      if (rsp_valid) order.push_back(rsp.tag);
      @(posedge clk);
    end
    check(order[0] == 8'h0F, "blocked request first");
    for (int i = 0; i < 13; i++)
      check(order[i + 1] == exp_order[i],
            $sformatf("QoS order position %0d: got %h expected %h", i, order[i + 1], exp_order[i]));

    // random traffic: requests of random class, direction and address over
    // 16 words, with random back-pressure on the response. Each response
    // must be the oldest unanswered request of its class, writes take
    // effect in response order, reads return the reference memory's word,
    // and every request is answered exactly once. One request is served
    // per READ_LAT or WR_REC cycles, so the queues are full most of the time.
    begin
      typedef struct { logic we; logic [PA_W-1:0] a; logic [DATA_W-1:0] d; logic [TAG_W-1:0] tag; } rq_t;
      rq_t pend [3][$];
      logic [DATA_W-1:0] ref_mem [logic [PA_W-1:0]];
      int n_req, n_rsp, n_cmd0;
      logic [TAG_W-1:0] tag;
      n_req = 0; n_rsp = 0; tag = '0;
      n_cmd0 = n_cmds;
      for (int i = 0; i < 3000 || (pend[0].size() + pend[1].size() + pend[2].size()) > 0; i++) begin
        @(negedge clk);
        rsp_ready = ($urandom_range(0, 9) < 7);
        in_valid  = (i < 3000) && ($urandom_range(0, 9) < 4);
        in_req    = '0;
        in_req.we    = $urandom_range(0, 1);
        in_req.addr  = 33'h0_0004_0000 + PA_W'($urandom_range(0, 15) * 8);
        in_req.wdata = {$urandom, $urandom};
        in_req.app   = app_t'($urandom_range(0, 2));
        in_req.tag   = tag;
        #1;
        if (rsp_valid && rsp_ready) begin
          bit found = 0;
          for (int c = 0; c < 3; c++)
            if (!found && pend[c].size() > 0 && pend[c][0].tag == rsp.tag) begin
              rq_t r = pend[c].pop_front();
              found = 1;
              check(rsp.we == r.we, "random: response direction");
              if (r.we) ref_mem[r.a] = r.d;
              else check(rsp.rdata == (ref_mem.exists(r.a) ? ref_mem[r.a] : u_mem.init_word(r.a)),
                         $sformatf("random: read data of tag %h", r.tag));
            end
          check(found, $sformatf("random: response %h is the oldest of its class", rsp.tag));
          n_rsp++;
        end
        if (in_valid && in_ready) begin
          pend[in_req.app].push_back('{in_req.we, in_req.addr, in_req.wdata, tag});
          tag++;
          n_req++;
        end
        if (i > 20000) break;
      end
      in_valid = 0;
      check(n_rsp == n_req && n_req > 200, $sformatf("random: %0d requests, %0d responses", n_req, n_rsp));
      check(n_cmds - n_cmd0 == n_req, "random: one DRAM command per request");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
