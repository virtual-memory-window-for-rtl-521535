// Virtual Memory Window system: the IDEA coprocessor, the Window Management
// Unit (WMU) and the dual-port window memory, wired as the platform
// integrates them.
//
// The host processor is outside: it reaches the WMU registers through the
// cpu_* request/ready bus and the window memory through the mem_* port,
// and it receives wmu_int. Software on it (the window manager) answers page
// faults by copying user data into window pages and writing TLB lines, and
// on completion copies dirty pages back; the coprocessor sees only virtual
// addresses.
//
// Clocking: `clk` is the fast clock of the WMU, the window memory and the
// coprocessor's access units (24 MHz on the original platform). The IDEA
// core and its controller advance once every CLK_RATIO cycles (6 MHz there,
// a ratio of 4), through an enable generated here. Synchronous active-low
// reset.
module vmw_top
  import vmw_pkg::*;
#(
  parameter int unsigned CLK_RATIO = 4,
  localparam int unsigned AW = $clog2(N_PAGES * WORDS_PER_PAGE)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor: WMU registers
  input  logic              cpu_sel,
  input  logic              cpu_wr,
  input  logic [2:0]        cpu_addr,
  input  logic [31:0]       cpu_wdata,
  output logic [31:0]       cpu_rdata,
  output logic              cpu_ready,
  output logic              wmu_int,
  // processor: window memory port
  input  logic              mem_en,
  input  logic              mem_wr,
  input  logic [AW-1:0]     mem_addr,
  input  logic [DATA_W-1:0] mem_wdata,
  output logic [DATA_W-1:0] mem_rdata
);
  logic [VADDR_W-1:0] cp_vaddr;
  logic [DATA_W-1:0]  cp_din, cp_dout;
  logic               cp_access, cp_wr, cp_tlbhit, cp_start, cp_inv, cp_fin;
  logic [AW-1:0]      dp_paddr;
  logic [DATA_W-1:0]  dp_din, dp_dout;
  logic               dp_en, dp_wr;
  logic               core_ce;

  clk_enable #(.RATIO(CLK_RATIO)) u_ce (.clk, .rst_n, .ce(core_ce));

  idea_coprocessor u_cop (
    .clk, .core_ce, .rst_n,
    .cp_vaddr, .cp_din, .cp_dout, .cp_access, .cp_wr, .cp_tlbhit,
    .cp_start, .cp_inv, .cp_fin
  );

  wmu u_wmu (
    .clk, .rst_n,
    .cp_vaddr, .cp_din, .cp_dout, .cp_access, .cp_wr, .cp_tlbhit,
    .cp_start, .cp_fin, .cp_inv,
    .dp_paddr, .dp_din, .dp_dout, .dp_en, .dp_wr,
    .cpu_sel, .cpu_wr, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_ready, .wmu_int
  );

  window_memory u_mem (
    .clk,
    .dp_en, .dp_wr, .dp_paddr, .dp_dout, .dp_din,
    .b_en(mem_en), .b_wr(mem_wr), .b_addr(mem_addr), .b_wdata(mem_wdata),
    .b_rdata(mem_rdata)
  );
endmodule
