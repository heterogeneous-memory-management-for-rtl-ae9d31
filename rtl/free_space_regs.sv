// free_space_regs: the free space registers of the relocation unit.
//
// Two registers hold the address of one free block of the 3D-DRAM and one
// free block of the ex-DRAM. The OS fills them (os_we_*), as the document
// states; need_3d/need_ex ask it to do so while a register is empty (for the
// ex-DRAM the OS may first have to page a block out to the hard drive). The
// relocation unit consumes a register when it moves a block into that memory
// (take_*), and hands back the block a move has just vacated (give_*), so a
// move normally leaves a fresh free block behind. Precedence in one cycle:
// give, then OS write, then take. Outputs are registered.
module free_space_regs
  import hmm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic os_we_3d,
  input  pbn_t os_pbn_3d,
  input  logic os_we_ex,
  input  pbn_t os_pbn_ex,
  input  logic take_3d,
  input  logic take_ex,
  input  logic give_3d,
  input  pbn_t give_pbn_3d,
  input  logic give_ex,
  input  pbn_t give_pbn_ex,
  output logic free_3d_valid,
  output pbn_t free_3d_pbn,
  output logic free_ex_valid,
  output pbn_t free_ex_pbn,
  output logic need_3d,
  output logic need_ex
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      free_3d_valid <= 1'b0;
      free_ex_valid <= 1'b0;
      free_3d_pbn   <= '0;
      free_ex_pbn   <= '0;
    end else begin
      if (give_3d) begin
        free_3d_valid <= 1'b1;
        free_3d_pbn   <= give_pbn_3d;
      end else if (os_we_3d) begin
        free_3d_valid <= 1'b1;
        free_3d_pbn   <= os_pbn_3d;
      end else if (take_3d) begin
        free_3d_valid <= 1'b0;
      end
      if (give_ex) begin
        free_ex_valid <= 1'b1;
        free_ex_pbn   <= give_pbn_ex;
      end else if (os_we_ex) begin
        free_ex_valid <= 1'b1;
        free_ex_pbn   <= os_pbn_ex;
      end else if (take_ex) begin
        free_ex_valid <= 1'b0;
      end
    end
  end

  assign need_3d = !free_3d_valid;
  assign need_ex = !free_ex_valid;
endmodule
