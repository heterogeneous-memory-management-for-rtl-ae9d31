// qos_arbiter: the QoS priority mechanism that picks which of a memory
// controller's three queues is served next.
//
// Following the document: when a single queue holds requests it is simply
// served in order. When requests wait in two or three queues at once, the
// latency-sensitive queue wins the first M times; after that the
// bandwidth-sensitive and insensitive queues get a turn, chosen round-robin
// between the two. When the bandwidth-sensitive queue is granted it keeps the
// grant for up to N consecutive requests (as long as it has requests).
// After such a turn the latency-sensitive count starts again from zero.
// The values M = 4 and N = 4, and counting only grants made while another
// queue was waiting, are this design's choices.
//
// Interface: req[i] is "queue i is not empty" (index = hmm_pkg::app_t value).
// gnt_valid/gnt_app show the choice combinationally; the controller asserts
// take in the cycle it pops the granted queue, which advances the state.
module qos_arbiter
  import hmm_pkg::*;
#(
  parameter int unsigned M = 4,
  parameter int unsigned N = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] req,
  input  logic       take,
  output logic       gnt_valid,
  output app_t       gnt_app
);
  logic [$clog2(M+1)-1:0] lat_cnt;   // LS grants made under contention
  logic [$clog2(N+1)-1:0] bw_cnt;    // grants in the current BW run
  logic                   bw_run;    // a BW run of up to N grants is open
  logic                   rr_bw;     // round-robin: 1 = BW is preferred next

  logic others;
  assign others = req[APP_BW] | req[APP_INS];

  always_comb begin
    gnt_valid = |req;
    gnt_app   = APP_LAT;
    if (bw_run && req[APP_BW]) begin
      gnt_app = APP_BW;
    end else if (req[APP_LAT] && (!others || (32'(lat_cnt) < M))) begin
      gnt_app = APP_LAT;
    end else if (req[APP_BW] && req[APP_INS]) begin
      gnt_app = rr_bw ? APP_BW : APP_INS;
    end else if (req[APP_BW]) begin
      gnt_app = APP_BW;
    end else begin
      gnt_app = APP_INS;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lat_cnt <= '0;
      bw_cnt  <= '0;
      bw_run  <= 1'b0;
      rr_bw   <= 1'b1;
    end else if (take && gnt_valid) begin
      unique case (gnt_app)
        APP_LAT: begin
          bw_run <= 1'b0;
          if (others && 32'(lat_cnt) < M) lat_cnt <= lat_cnt + 1'b1;
        end
        APP_BW: begin
          lat_cnt <= '0;
          rr_bw   <= 1'b0;
          if (bw_run) begin
            bw_cnt <= bw_cnt + 1'b1;
            if (32'(bw_cnt) + 1 >= N) bw_run <= 1'b0;
          end else begin
            bw_cnt <= 1;
            bw_run <= (N > 1);
          end
        end
        default: begin
          lat_cnt <= '0;
          rr_bw   <= 1'b1;
          bw_run  <= 1'b0;
        end
      endcase
    end
  end

  // A grant is only ever given to a queue that has a request.
  assert property (@(posedge clk) disable iff (!rst_n) gnt_valid |-> req[gnt_app]);
endmodule
