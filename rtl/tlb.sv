// tlb: virtual-to-physical block translation used by the combined memory
// controller.
//
// The memory manager builds on the OS's virtual-to-physical translation, so
// that where a block lives (3D-DRAM or ex-DRAM) is simply part of its
// physical address and costs no extra lookup latency. This fully associative
// TLB (ENTRIES = 64, round-robin replacement; both this design's choices)
// translates a virtual page number combinationally. A miss is reported and
// the OS, or a page walker, installs the mapping through the refill port.
// When the relocation unit moves a block, the document has the TLB updated by
// hardware: every entry that maps to old_a is redirected to new_a, and every
// entry mapping to old_b to new_b, in one cycle, so a swap of two blocks
// (old_a = new_b, old_b = new_a) is atomic. A refill arriving in the same
// cycle as an update is redirected the same way, so an OS refill that still
// carries the old location cannot undo the update.
module tlb
  import hmm_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  vpn_t lk_vpn,
  output logic lk_hit,
  output pbn_t lk_pbn,
  input  logic refill_valid,
  input  vpn_t refill_vpn,
  input  pbn_t refill_pbn,
  input  logic upd_a_valid,
  input  pbn_t upd_a_old,
  input  pbn_t upd_a_new,
  input  logic upd_b_valid,
  input  pbn_t upd_b_old,
  input  pbn_t upd_b_new
);
  localparam int unsigned EW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  logic [ENTRIES-1:0] e_valid;
  vpn_t               e_vpn [ENTRIES];
  pbn_t               e_pbn [ENTRIES];
  logic [EW-1:0]      victim;

  always_comb begin
    lk_hit = 1'b0;
    lk_pbn = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (e_valid[i] && e_vpn[i] == lk_vpn) begin
        lk_hit = 1'b1;
        lk_pbn = e_pbn[i];
      end
    end
  end

  // refill overwrites an existing entry of the same page, else the victim
  logic          rf_hit;
  logic [EW-1:0] rf_idx;
  always_comb begin
    rf_hit = 1'b0;
    rf_idx = victim;
    for (int i = 0; i < ENTRIES; i++) begin
      if (e_valid[i] && e_vpn[i] == refill_vpn) begin
        rf_hit = 1'b1;
        rf_idx = EW'(i);
      end
    end
  end

  // a refill in the cycle of an update is redirected like a stored entry
  pbn_t rf_pbn;
  always_comb begin
    if (upd_a_valid && refill_pbn == upd_a_old)      rf_pbn = upd_a_new;
    else if (upd_b_valid && refill_pbn == upd_b_old) rf_pbn = upd_b_new;
    else                                             rf_pbn = refill_pbn;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_valid <= '0;
      victim  <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (e_valid[i]) begin
          if (upd_a_valid && e_pbn[i] == upd_a_old)      e_pbn[i] <= upd_a_new;
          else if (upd_b_valid && e_pbn[i] == upd_b_old) e_pbn[i] <= upd_b_new;
        end
      end
      if (refill_valid) begin
        e_valid[rf_idx] <= 1'b1;
        e_vpn[rf_idx]   <= refill_vpn;
        e_pbn[rf_idx]   <= rf_pbn;
        if (!rf_hit) victim <= (32'(victim) == ENTRIES - 1) ? '0 : victim + 1'b1;
      end
    end
  end
endmodule
