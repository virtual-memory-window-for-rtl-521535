// IDEA coprocessor for the Virtual Memory Window.
//
// Four blocks: IDEA Core and IDEA CTRL (the algorithm and its controller,
// slow clock domain) and Memory CTRL and Init CTRL (the access units that
// speak the WMU interface, fast clock domain). Three multiplexers, switched
// by Init CTRL's init_sel, give the WMU's cp_access, cp_wr and cp_vaddr to
// Init CTRL while it reads the parameters and to Memory CTRL afterwards;
// cp_dout comes from Memory CTRL, cp_din and cp_tlbhit go to both. Memory
// CTRL's stall holds the core and IDEA CTRL until an access is served.
//
// The coprocessor only ever issues virtual addresses: it knows neither the
// window memory size nor where data sits in it.
// Clocking: one clock `clk` (the fast clock); the slow domain advances at
// edges where core_ce is high. The document uses two clocks whose periods
// are in an integral ratio; an enable is this design's equivalent.
// Synchronous active-low reset.
module idea_coprocessor
  import vmw_pkg::*;
(
  input  logic               clk,
  input  logic               core_ce,
  input  logic               rst_n,
  output logic [VADDR_W-1:0] cp_vaddr,
  input  logic [DATA_W-1:0]  cp_din,
  output logic [DATA_W-1:0]  cp_dout,
  output logic               cp_access,
  output logic               cp_wr,
  input  logic               cp_tlbhit,
  input  logic               cp_start,
  output logic               cp_inv,
  output logic               cp_fin
);
  // Memory CTRL
  logic               mc_access, mc_wr;
  logic [VADDR_W-1:0] mc_vaddr;
  // Init CTRL
  logic               ic_access, ic_wr, init_sel;
  logic [VADDR_W-1:0] ic_vaddr;
  logic               start, fin;
  param_t             params [MAX_PARAMS];
  // IDEA CTRL <-> Memory CTRL / core
  logic               stall, rd_req, wr_req, req_sel;
  logic [VADDR_W-1:0] req_addr;
  logic [DATA_W-1:0]  x;
  logic [63:0]        y;
  logic               ld_key, ld_x, x_sel, go, core_busy, core_done;
  logic [4:0]         key_idx;
  logic [1:0]         x_slot, y_slot;
  logic [2:0]         n_blk;

  idea_core u_core (
    .clk, .rst_n, .ce(core_ce), .stall,
    .x_in(x), .ld_key, .key_idx, .ld_x, .x_slot, .x_sel, .go, .n_blk, .y_slot,
    .busy(core_busy), .done(core_done), .y
  );

  idea_ctrl u_ctrl (
    .clk, .rst_n, .ce(core_ce), .stall,
    .start, .params, .fin,
    .rd_req, .wr_req, .req_addr, .req_sel,
    .ld_key, .key_idx, .ld_x, .x_slot, .x_sel, .go, .n_blk, .y_slot,
    .core_busy, .core_done
  );

  mem_ctrl u_mem (
    .clk, .rst_n, .core_ce,
    .rd_req, .wr_req, .req_addr, .req_sel, .y, .x, .stall,
    .cp_access(mc_access), .cp_wr(mc_wr), .cp_vaddr(mc_vaddr), .cp_dout,
    .cp_din, .cp_tlbhit
  );

  init_ctrl u_init (
    .clk, .rst_n,
    .cp_start, .cp_access(ic_access), .cp_wr(ic_wr), .cp_vaddr(ic_vaddr),
    .cp_din, .cp_tlbhit, .cp_inv, .cp_fin, .init_sel,
    .start, .params, .fin
  );

  assign cp_access = init_sel ? ic_access : mc_access;
  assign cp_wr     = init_sel ? ic_wr     : mc_wr;
  assign cp_vaddr  = init_sel ? ic_vaddr  : mc_vaddr;
endmodule
