// dram_model: behavioural storage model of one DRAM device, for simulation
// only (the DRAM chips themselves are not part of the RTL).
//
// On a command strobe a write stores the word, a read places the word on
// rdata in the next cycle and holds it there until the next read, which is
// within the READ_LAT-1 cycles the controller allows. Storage is sparse; a
// word never written reads as init_word(addr), a fixed function of its
// address, so tests can check reads without preloading memory.
module dram_model
  import hmm_pkg::*;
(
  input  logic              clk,
  input  logic              cmd_valid,
  input  dram_cmd_t         cmd,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] store [logic [PA_W-1:0]];
  int unsigned       n_rd, n_wr;

  function automatic logic [DATA_W-1:0] init_word(logic [PA_W-1:0] a);
    return {32'hD0D0_0000 | 32'(a[PA_W-1:16]), 32'(a[31:0])} ^ 64'h5A5A_0000_0000_A5A5;
  endfunction

  initial begin
    rdata = '0;
    n_rd  = 0;
    n_wr  = 0;
  end

  always @(posedge clk) begin
    if (cmd_valid) begin
      if (cmd.we) begin
        store[cmd.addr] = cmd.wdata;
        n_wr++;
      end else begin
        rdata <= store.exists(cmd.addr) ? store[cmd.addr] : init_word(cmd.addr);
        n_rd++;
      end
    end
  end
endmodule
