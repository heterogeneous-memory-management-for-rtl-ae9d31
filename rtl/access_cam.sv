// access_cam: finds 3D-DRAM blocks that have not been accessed recently.
//
// Mechanism from the document: every 3D-DRAM block owns one bit in a large
// access array, set when the block is accessed. Every CHECK_PERIOD cycles
// (the document's example: 1M cycles) the array is scanned; the first L
// (example: 64) blocks whose bit is still 0 are recorded in a small CAM, and
// the array is cleared. Entries of the small CAM are in turn marked when
// their block is accessed; an entry whose mark is still 0 is an "un-accessed"
// block that the relocation unit may dump to the ex-DRAM.
//
// Implementation choices: the large array is a one-bit-wide memory, so the
// scan reads and clears one block per cycle (N3D_BLOCKS cycles per scan,
// well inside the check period). The scan that runs right after reset only
// clears the array and records nothing. An access write has the single write port
// first and stalls the scan for that cycle. The small CAM is emptied when a
// scan starts. unacc_* shows the lowest-numbered valid, unmarked entry;
// take removes it, and inv_valid/inv_pbn removes any entry of a block the
// relocation unit has overwritten.
//
// Interface: acc_valid/acc_pbn is one core access to the 3D-DRAM per cycle
// (acc_pbn is the 3D block index, 0 .. N3D_BLOCKS-1). scanning is high while
// a scan runs.
module access_cam
  import hmm_pkg::*;
#(
  parameter int unsigned N3D_BLOCKS   = 131072,
  parameter int unsigned L            = 64,
  parameter int unsigned CHECK_PERIOD = 1000000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic acc_valid,
  input  pbn_t acc_pbn,
  input  logic take,
  input  logic inv_valid,
  input  pbn_t inv_pbn,
  output logic unacc_valid,
  output pbn_t unacc_pbn,
  output logic scanning
);
  localparam int unsigned IW = $clog2(N3D_BLOCKS);
  localparam int unsigned TW = $clog2(CHECK_PERIOD);
  localparam int unsigned LW = $clog2(L + 1);
  localparam int unsigned SW = (L > 1) ? $clog2(L) : 1;

  logic          bits [N3D_BLOCKS];   // large access array
  logic [TW-1:0] timer;
  logic [IW-1:0] scan_idx;
  logic          scan_step;

  // small CAM
  logic [L-1:0]  s_valid, s_mark;
  pbn_t          s_pbn [L];
  logic [LW-1:0] s_fill;
  logic          rec_en;             // off during the clearing scan after reset

  wire [IW-1:0] acc_idx = acc_pbn[IW-1:0];
  wire acc_in = acc_valid && (acc_pbn < pbn_t'(N3D_BLOCKS));
  assign scan_step = scanning && !acc_in;

  // large array: one write port, access first, scan clear otherwise
  always_ff @(posedge clk) begin
    if (acc_in)         bits[acc_idx]  <= 1'b1;
    else if (scan_step) bits[scan_idx] <= 1'b0;
  end

  // first un-accessed small-CAM entry
  logic [SW-1:0] sel;
  always_comb begin
    unacc_valid = 1'b0;
    sel         = '0;
    for (int i = L - 1; i >= 0; i--) begin
      if (s_valid[i] && !s_mark[i]) begin
        unacc_valid = 1'b1;
        sel         = SW'(i);
      end
    end
  end
  assign unacc_pbn = s_pbn[sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      timer    <= '0;
      scanning <= 1'b1;          // the first scan clears the array after reset
      scan_idx <= '0;
      s_valid  <= '0;
      s_mark   <= '0;
      s_fill   <= '0;
      rec_en   <= 1'b0;
    end else begin
      // check period
      if (32'(timer) == CHECK_PERIOD - 1) timer <= '0;
      else                                timer <= timer + 1'b1;

      // small CAM marking, removal
      for (int i = 0; i < L; i++) begin
        if (acc_valid && s_valid[i] && s_pbn[i] == acc_pbn) s_mark[i] <= 1'b1;
        if (inv_valid && s_valid[i] && s_pbn[i] == inv_pbn) s_valid[i] <= 1'b0;
      end
      if (take && unacc_valid) s_valid[sel] <= 1'b0;

      if (!scanning && 32'(timer) == CHECK_PERIOD - 1) begin
        scanning <= 1'b1;
        scan_idx <= '0;
        s_valid  <= '0;
        s_fill   <= '0;
      end else if (scan_step) begin
        if (rec_en && !bits[scan_idx] && 32'(s_fill) < L) begin
          s_valid[s_fill[SW-1:0]] <= 1'b1;
          s_mark[s_fill[SW-1:0]]  <= 1'b0;
          s_pbn[s_fill[SW-1:0]]   <= pbn_t'(scan_idx);
          s_fill                  <= s_fill + 1'b1;
        end
        if (32'(scan_idx) == N3D_BLOCKS - 1) begin
          scanning <= 1'b0;
          rec_en   <= 1'b1;
        end
        else scan_idx <= scan_idx + 1'b1;
      end
    end
  end
endmodule
