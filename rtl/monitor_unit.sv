// monitor_unit: measures how busy the 3D-DRAM and the ex-DRAM are and
// classifies each into a utilization region.
//
// As the document describes, one counter is attached to each memory
// controller and counts the cycles in which that controller is in use during
// a fixed measurement period. At the end of a period the 3D-DRAM utilization
// (both 3D controllers together, out of 2 x PERIOD controller-cycles) and the
// ex-DRAM utilization are compared with two thresholds: below Threshold1 is
// the low memory utilization region (LMU), from Threshold1 up to Threshold2
// the high memory utilization region (HMU), and from Threshold2 on the
// congested region (C). The document's default thresholds are 80 % and 95 %;
// it also runs 55 %/80 % and sweeps Threshold1, so the thresholds are
// run-time registers (in per mille) loaded from TH1/TH2 at reset and
// rewritable through cfg_we. PERIOD = 10000 cycles is this design's choice.
//
// Timing: region_3d/region_ex change one cycle after the last cycle of a
// period, in the same cycle as the one-cycle eval pulse that tells the
// relocation unit a new measurement is available.
module monitor_unit
  import hmm_pkg::*;
#(
  parameter int unsigned PERIOD = 10000,
  parameter int unsigned TH1    = 800,    // per mille, LMU/HMU boundary
  parameter int unsigned TH2    = 950     // per mille, HMU/C boundary
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] busy_3d,      // 3D-DRAM controller 1 and 2
  input  logic       busy_ex,
  input  logic       cfg_we,
  input  logic [9:0] cfg_th1,
  input  logic [9:0] cfg_th2,
  output region_t    region_3d,
  output region_t    region_ex,
  output logic       eval,
  output logic [$clog2(2*PERIOD+1)-1:0] last_cnt_3d,
  output logic [$clog2(PERIOD+1)-1:0]   last_cnt_ex
);
  localparam int unsigned PW  = $clog2(PERIOD);
  localparam int unsigned C3W = $clog2(2*PERIOD+1);
  localparam int unsigned CXW = $clog2(PERIOD+1);

  logic [PW-1:0]  tick;
  logic [C3W-1:0] cnt_3d;
  logic [CXW-1:0] cnt_ex;
  logic [9:0]     th1, th2;

  // count * 1000 compared with threshold * available controller-cycles
  function automatic region_t classify(logic [63:0] used, logic [63:0] avail,
                                       logic [9:0] t1, logic [9:0] t2);
    if (used * 64'd1000 < avail * 64'(t1))      return REG_LMU;
    else if (used * 64'd1000 < avail * 64'(t2)) return REG_HMU;
    else                                        return REG_C;
  endfunction

  logic [C3W-1:0] cnt_3d_next;
  logic [CXW-1:0] cnt_ex_next;
  assign cnt_3d_next = cnt_3d + C3W'(busy_3d[0]) + C3W'(busy_3d[1]);
  assign cnt_ex_next = cnt_ex + CXW'(busy_ex);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tick        <= '0;
      cnt_3d      <= '0;
      cnt_ex      <= '0;
      th1         <= 10'(TH1);
      th2         <= 10'(TH2);
      region_3d   <= REG_LMU;
      region_ex   <= REG_LMU;
      eval        <= 1'b0;
      last_cnt_3d <= '0;
      last_cnt_ex <= '0;
    end else begin
      eval <= 1'b0;
      if (cfg_we) begin
        th1 <= cfg_th1;
        th2 <= cfg_th2;
      end
      if (32'(tick) == PERIOD - 1) begin
        tick        <= '0;
        cnt_3d      <= '0;
        cnt_ex      <= '0;
        last_cnt_3d <= cnt_3d_next;
        last_cnt_ex <= cnt_ex_next;
        region_3d   <= classify(64'(cnt_3d_next), 64'(2 * PERIOD), th1, th2);
        region_ex   <= classify(64'(cnt_ex_next), 64'(PERIOD), th1, th2);
        eval        <= 1'b1;
      end else begin
        tick   <= tick + 1'b1;
        cnt_3d <= cnt_3d_next;
        cnt_ex <= cnt_ex_next;
      end
    end
  end
endmodule
