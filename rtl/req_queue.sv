// req_queue: one QoS request queue of a memory controller.
//
// Every memory controller holds three of these, one per application class
// (latency sensitive, bandwidth sensitive, insensitive); inside a queue
// requests leave in arrival order. The document simulates queues of unbounded
// length; a hardware queue needs a depth, and DEPTH = 16 is this design's
// choice. It is a circular buffer with a valid/ready handshake on both sides:
// a push is taken when push_valid && push_ready, a pop when pop_valid &&
// pop_ready. The head is visible combinationally (zero-latency look-ahead),
// so a push is poppable on the next cycle. count gives the occupancy.
module req_queue #(
  parameter type         T     = hmm_pkg::mem_req_t,
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  T     push_data,
  output logic pop_valid,
  input  logic pop_ready,
  output T     pop_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  wire do_push = push_valid && push_ready;
  wire do_pop  = pop_valid && pop_ready;

  assign push_ready = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (cnt != '0);
  assign pop_data   = mem[rd_ptr];
  assign count      = cnt;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  // A full queue never accepts and an empty one never delivers.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(cnt) <= DEPTH);
endmodule
