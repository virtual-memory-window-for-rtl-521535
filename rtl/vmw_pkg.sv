// Shared constants and types of the Virtual Memory Window (VMW) system and
// its IDEA coprocessor.
//
// The window memory is 16 KB, organised as eight pages of 2 KB, as on the
// original platform. Virtual and physical addresses are byte addresses; the
// coprocessor bus and the window memory are 32 bits wide (a choice of this
// design, matching a 32-bit host). Virtual addresses are split into a
// virtual page number (VPN) and an 11-bit page offset.
//
// The processor-visible WMU registers are word-addressed; the register map
// below is this design's own.
package vmw_pkg;

  localparam int unsigned DATA_W      = 32;            // coprocessor / window data width
  localparam int unsigned VADDR_W     = 32;            // coprocessor virtual address width
  localparam int unsigned PAGE_BYTES  = 2048;          // window page size
  localparam int unsigned N_PAGES     = 8;             // window pages (16 KB in total)
  localparam int unsigned OFFSET_W    = $clog2(PAGE_BYTES);       // 11
  localparam int unsigned VPN_W       = VADDR_W - OFFSET_W;        // 21
  localparam int unsigned PPN_W       = $clog2(N_PAGES);           // 3
  localparam int unsigned WORDS_PER_PAGE = PAGE_BYTES / (DATA_W / 8);  // 512
  localparam int unsigned WIN_WORDS   = N_PAGES * WORDS_PER_PAGE;     // 4096
  localparam int unsigned WADDR_W     = $clog2(WIN_WORDS);            // 12

  // Virtual address of the parameter-passing page (a reserved page at the
  // top of the coprocessor's virtual space).
  localparam logic [VADDR_W-1:0] PARAM_VADDR = 32'hFFFF_F800;

  // Maximum number of entries in the param array, entry 0 included.
  localparam int unsigned MAX_PARAMS  = 4;

  // One entry of the param array: a pointer (or, for entry 0, the number of
  // entries) and a size in bytes (or, for entry 0, flags).
  typedef struct packed {
    logic [DATA_W-1:0] u;
    logic [DATA_W-1:0] v;
  } param_t;

  // WMU register map (word index on the processor control bus).
  typedef enum logic [2:0] {
    REG_CR      = 3'd0,   // control: bit0 START (self-clearing), bit1 IE
    REG_SR      = 3'd1,   // status, see SR_* bits; write 1 to clear MISS/FIN
    REG_AR      = 3'd2,   // faulting virtual address (read only)
    REG_TLBIDX  = 3'd3,   // TLB line selected for management
    REG_TLBVPN  = 3'd4,   // VPN of the selected line (CAM part)
    REG_TLBPPN  = 3'd5    // {dirty, valid, PPN} of the selected line (RAM part)
  } wmu_reg_e;

  localparam int unsigned SR_MISS  = 0;  // translation miss pending
  localparam int unsigned SR_FIN   = 1;  // coprocessor finished
  localparam int unsigned SR_BUSY  = 2;  // coprocessor running
  localparam int unsigned SR_WRITE = 3;  // the faulting access was a write
  localparam int unsigned SR_INV   = 4;  // parameter page was invalidated

  localparam int unsigned CR_START = 0;
  localparam int unsigned CR_IE    = 1;

  // TLB line layout of the RAM part.
  localparam int unsigned TLB_VALID = PPN_W;      // bit 3
  localparam int unsigned TLB_DIRTY = PPN_W + 1;  // bit 4

  // States of the TLB controller.
  typedef enum logic [1:0] {
    TLB_IDLE   = 2'd0,   // nothing pending
    TLB_MANAGE = 2'd1,   // processor access to the WMU being served
    TLB_MATCH  = 2'd2,   // coprocessor translation in progress
    TLB_MISS   = 2'd3    // translation missed, waiting for the OS
  } tlb_state_e;

  // IDEA sizes
  localparam int unsigned IDEA_ROUNDS  = 8;
  localparam int unsigned IDEA_SUBKEYS = 52;

endpackage
