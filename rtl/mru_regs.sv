// mru_regs: Most Recently Used block registers of the relocation unit.
//
// One register per (memory, application class) pair: 3D-DRAM and ex-DRAM
// times latency sensitive, bandwidth sensitive and insensitive, six in all.
// Each core access observed by the combined memory controller writes its
// physical block number into the register of its memory and class, marks it
// valid and restarts that register's lifetime. When LIFETIME cycles pass with
// no new access of that kind the entry becomes invalid, as the document
// describes. The relocation unit also clears entries whose block it has just
// moved (inv_valid/inv_pbn), since the recorded location is then stale; an
// observation in the same cycle wins over the clear. LIFETIME = 10000 cycles
// is this design's choice.
//
// Outputs are registered: an observation is visible the next cycle.
module mru_regs
  import hmm_pkg::*;
#(
  parameter int unsigned LIFETIME = 10000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic obs_valid,
  input  mem_t obs_mem,
  input  app_t obs_app,
  input  pbn_t obs_pbn,
  input  logic inv_valid,
  input  pbn_t inv_pbn,
  output logic [1:0][2:0] mru_valid,   // [mem][app]
  output pbn_t [1:0][2:0] mru_pbn
);
  localparam int unsigned LW = $clog2(LIFETIME + 1);

  logic [1:0][2:0][LW-1:0] life;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mru_valid <= '0;
      mru_pbn   <= '0;
      life      <= '0;
    end else begin
      for (int m = 0; m < 2; m++) begin
        for (int a = 0; a < 3; a++) begin
          if (obs_valid && obs_mem == mem_t'(m) && obs_app == app_t'(a)) begin
            mru_valid[m][a] <= 1'b1;
            mru_pbn[m][a]   <= obs_pbn;
            life[m][a]      <= LW'(LIFETIME - 1);
          end else if (inv_valid && mru_pbn[m][a] == inv_pbn) begin
            mru_valid[m][a] <= 1'b0;
          end else if (mru_valid[m][a]) begin
            if (life[m][a] == '0) mru_valid[m][a] <= 1'b0;
            else                  life[m][a] <= life[m][a] - 1'b1;
          end
        end
      end
    end
  end
endmodule
