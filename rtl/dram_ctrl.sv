// dram_ctrl: one DRAM memory controller with its three QoS queues.
//
// The same module serves as 3D-DRAM memory controller 1 and 2 and as the
// ex-DRAM memory controller; only the timing parameters differ. A request
// pushed in is placed in the queue of its application class (hmm_pkg::app_t).
// qos_arbiter picks the queue to serve; the controller pops it, sends one
// command to the DRAM device and then is busy for READ_LAT cycles (read) or
// WR_REC cycles (write); the next command may go out in the last of those
// cycles, so back-to-back requests keep the controller busy 100 % of the
// time. In that last cycle the word on dram_rdata is captured, and the
// response (read data, or an acknowledge for a write) is valid from the next
// cycle: READ_LAT + 1 cycles after the command strobe. One request is in
// service at a time; a completed request waits while the single response
// register is still full.
//
// Timing follows the document: ex-DRAM read latency 12 and 3D-DRAM read
// latency 8 memory clocks; the 3D write recovery is 4 clocks shorter than the
// ex-DRAM one. The ex-DRAM write recovery of 12 clocks (15 ns at DDR3-1600)
// and the single-command-in-flight service model are this design's choices.
//
// Interface: in_valid/in_ready/in_req enqueue; dram_cmd_valid is a one-cycle
// command strobe with dram_cmd; the device must drive dram_rdata within
// READ_LAT-1 cycles of a read command and hold it. rsp_valid/rsp_ready/rsp
// return one response per request. busy is high in every cycle the
// controller is in use (the quantity the monitoring unit counts).
module dram_ctrl
  import hmm_pkg::*;
#(
  parameter int unsigned READ_LAT = 12,
  parameter int unsigned WR_REC   = 12,
  parameter int unsigned QDEPTH   = 16,
  parameter int unsigned M        = 4,
  parameter int unsigned N        = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  mem_req_t          in_req,
  output logic              dram_cmd_valid,
  output dram_cmd_t         dram_cmd,
  input  logic [DATA_W-1:0] dram_rdata,
  output logic              rsp_valid,
  input  logic              rsp_ready,
  output mem_rsp_t          rsp,
  output logic              busy,
  output logic [2:0]        q_nonempty
);
  localparam int unsigned TW = $clog2((READ_LAT > WR_REC ? READ_LAT : WR_REC) + 1);

  logic     [2:0] q_push_ready, q_pop_valid, q_pop_ready;
  mem_req_t       q_head [3];
  logic           gnt_valid;
  app_t           gnt_app;

  for (genvar i = 0; i < 3; i++) begin : g_q
    logic [$clog2(QDEPTH+1)-1:0] unused_cnt;
    req_queue #(.T(mem_req_t), .DEPTH(QDEPTH)) u_q (
      .clk, .rst_n,
      .push_valid (in_valid && (in_req.app == app_t'(i))),
      .push_ready (q_push_ready[i]),
      .push_data  (in_req),
      .pop_valid  (q_pop_valid[i]),
      .pop_ready  (q_pop_ready[i]),
      .pop_data   (q_head[i]),
      .count      (unused_cnt)
    );
  end

  // The app encoding 3 is unused: such a request is never accepted.
  assign in_ready   = (in_req.app != 2'd3) && q_push_ready[in_req.app];
  assign q_nonempty = q_pop_valid;

  logic          active;     // a request is in service
  logic [TW-1:0] timer;
  logic          cur_we, cur_reloc;
  logic [TAG_W-1:0] cur_tag;
  logic          slot_free;  // the response register can take a new response
  logic          finish;     // the request in service completes this cycle
  logic          issue;

  assign slot_free = !rsp_valid || rsp_ready;
  assign finish    = active && timer == '0 && slot_free;
  // A new command may go out in the cycle the previous one completes.
  assign issue     = gnt_valid && (!active || finish) && slot_free;

  qos_arbiter #(.M(M), .N(N)) u_arb (
    .clk, .rst_n,
    .req       (q_pop_valid),
    .take      (issue),
    .gnt_valid (gnt_valid),
    .gnt_app   (gnt_app)
  );

  always_comb begin
    q_pop_ready = '0;
    if (issue) q_pop_ready[gnt_app] = 1'b1;
  end

  assign dram_cmd_valid = issue;
  assign dram_cmd       = '{we: q_head[gnt_app].we, addr: q_head[gnt_app].addr,
                            wdata: q_head[gnt_app].wdata};
  assign busy           = active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active    <= 1'b0;
      timer     <= '0;
      cur_we    <= 1'b0;
      cur_reloc <= 1'b0;
      cur_tag   <= '0;
      rsp_valid <= 1'b0;
      rsp       <= '0;
    end else begin
      if (rsp_valid && rsp_ready) rsp_valid <= 1'b0;
      if (finish) begin
        active    <= 1'b0;
        rsp_valid <= 1'b1;
        rsp       <= '{we: cur_we, rdata: cur_we ? '0 : dram_rdata,
                       reloc: cur_reloc, tag: cur_tag};
      end
      if (issue) begin
        active    <= 1'b1;
        cur_we    <= q_head[gnt_app].we;
        cur_reloc <= q_head[gnt_app].reloc;
        cur_tag   <= q_head[gnt_app].tag;
        timer     <= q_head[gnt_app].we ? TW'(WR_REC - 1) : TW'(READ_LAT - 1);
      end else if (active && timer != '0) begin
        timer <= timer - 1'b1;
      end
    end
  end

  // A command is only sent for a granted, non-empty queue.
  assert property (@(posedge clk) disable iff (!rst_n) issue |-> q_pop_valid[gnt_app]);
endmodule
