// hmm_pkg: types and constants shared by the heterogeneous 3D-DRAM / ex-DRAM
// memory manager.
//
// Memory is managed in 4 KB blocks (the page size the OS uses). Physical block
// numbers (PBN) form one space: PBN 0 .. N3D_BLOCKS-1 live in the 3D-DRAM,
// PBN N3D_BLOCKS and above live in the external DRAM. A physical byte address
// is {PBN, 12-bit offset}. Data moves in 64-bit words, so a block is 512 words.
// Applications are tagged with one of three QoS classes; their priority order
// (latency sensitive > bandwidth sensitive > insensitive) follows the document.
// The widths (virtual address, PBN, tag) and the capacities are this design's
// own choices; the document gives none of them.
// A lint run on a single module lists the constants here that the module
// does not use; that is expected for a shared package.
package hmm_pkg;

  localparam int unsigned BLOCK_BYTES   = 4096;           // document: 4 KB blocks
  localparam int unsigned OFFSET_W      = 12;
  localparam int unsigned DATA_W        = 64;             // ex-DRAM bus width, 64-bit case
  localparam int unsigned WORD_BYTES    = DATA_W / 8;
  localparam int unsigned WORDS_PER_BLK = BLOCK_BYTES / WORD_BYTES;  // 512
  localparam int unsigned WIDX_W        = $clog2(WORDS_PER_BLK);      // 9
  localparam int unsigned PBN_W         = 21;             // up to 8 GB of physical memory
  localparam int unsigned PA_W          = PBN_W + OFFSET_W;
  localparam int unsigned VA_W          = 32;
  localparam int unsigned VPN_W         = VA_W - OFFSET_W;
  localparam int unsigned TAG_W         = 8;

  // Default 3D-DRAM capacity (this design's assumption): 512 MB. The ex-DRAM
  // takes the rest of the 21-bit block space.
  localparam int unsigned DEF_N3D_BLOCKS = 131072;

  typedef logic [PBN_W-1:0] pbn_t;
  typedef logic [VPN_W-1:0] vpn_t;

  // QoS class of the application that owns a request or a block.
  // The numeric value is also the priority rank: 0 is the highest priority.
  typedef enum logic [1:0] {
    APP_LAT = 2'd0,   // latency sensitive   (very high priority)
    APP_BW  = 2'd1,   // bandwidth sensitive (high priority)
    APP_INS = 2'd2    // insensitive         (low priority)
  } app_t;

  // Utilization region of a memory, see the monitoring unit.
  typedef enum logic [1:0] {
    REG_LMU = 2'd0,   // low memory utilization
    REG_HMU = 2'd1,   // high memory utilization
    REG_C   = 2'd2    // congested
  } region_t;

  // Memory selector
  typedef enum logic {
    MEM_3D = 1'b0,
    MEM_EX = 1'b1
  } mem_t;

  // Core-side request (virtual address)
  typedef struct packed {
    logic              we;
    logic [VA_W-1:0]   vaddr;
    logic [DATA_W-1:0] wdata;
    app_t              app;
    logic [TAG_W-1:0]  tag;
  } core_req_t;

  // Physical request as held in a controller queue
  typedef struct packed {
    logic              we;
    logic [PA_W-1:0]   addr;
    logic [DATA_W-1:0] wdata;
    app_t              app;
    logic              reloc;    // issued by the relocation engine, not a core
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  // Response from a controller (reads return data, writes an acknowledge)
  typedef struct packed {
    logic              we;
    logic [DATA_W-1:0] rdata;
    logic              reloc;
    logic [TAG_W-1:0]  tag;
  } mem_rsp_t;

  // Command to a DRAM device
  typedef struct packed {
    logic              we;
    logic [PA_W-1:0]   addr;
    logic [DATA_W-1:0] wdata;
  } dram_cmd_t;

endpackage
