// block_keeper: the memory block keeper of the relocation unit.
//
// It holds the address of one bandwidth-sensitive and one insensitive block
// that currently live in the 3D-DRAM. When an ex-DRAM block must come into a
// full 3D-DRAM that has no un-accessed block either, the relocation unit swaps
// it with one of these lower-priority blocks, as the document describes. Which
// block is kept is this design's choice: the most recent 3D-DRAM access of
// each of the two classes, kept until it is replaced or the block is moved
// (inv_valid/inv_pbn), with no lifetime. Outputs are registered.
module block_keeper
  import hmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic obs_valid,        // a core access to the 3D-DRAM
  input  app_t obs_app,
  input  pbn_t obs_pbn,
  input  logic inv_valid,
  input  pbn_t inv_pbn,
  output logic keep_bw_valid,
  output pbn_t keep_bw_pbn,
  output logic keep_ins_valid,
  output pbn_t keep_ins_pbn
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      keep_bw_valid  <= 1'b0;
      keep_ins_valid <= 1'b0;
      keep_bw_pbn    <= '0;
      keep_ins_pbn   <= '0;
    end else begin
      if (obs_valid && obs_app == APP_BW) begin
        keep_bw_valid <= 1'b1;
        keep_bw_pbn   <= obs_pbn;
      end else if (inv_valid && keep_bw_pbn == inv_pbn) begin
        keep_bw_valid <= 1'b0;
      end
      if (obs_valid && obs_app == APP_INS) begin
        keep_ins_valid <= 1'b1;
        keep_ins_pbn   <= obs_pbn;
      end else if (inv_valid && keep_ins_pbn == inv_pbn) begin
        keep_ins_valid <= 1'b0;
      end
    end
  end
endmodule
