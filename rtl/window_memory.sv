// Window memory: the dual-port RAM shared by the coprocessor side (through
// the WMU) and the host processor (through its system bus).
//
// Eight pages of 2 KB (16 KB) by default, as on the original platform,
// held as 32-bit words. Both ports are synchronous: a read returns its word
// the cycle after the enable, a write stores at the clock edge. If both
// ports write the same word in one cycle, port B (the processor) wins; a
// read during a write on the same port returns the old word. Port naming
// follows the WMU: the WMU drives dp_paddr/dp_dout/dp_en/dp_wr and reads
// dp_din. The memory has no reset (its contents are data).
module window_memory
  import vmw_pkg::*;
#(
  parameter int unsigned PAGES = N_PAGES,
  parameter int unsigned PAGE_WORDS = WORDS_PER_PAGE,
  localparam int unsigned WORDS = PAGES * PAGE_WORDS,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic              clk,
  // port A: WMU
  input  logic              dp_en,
  input  logic              dp_wr,
  input  logic [AW-1:0]     dp_paddr,
  input  logic [DATA_W-1:0] dp_dout,
  output logic [DATA_W-1:0] dp_din,
  // port B: host processor
  input  logic              b_en,
  input  logic              b_wr,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (dp_en) begin
      dp_din <= mem[dp_paddr];
      if (dp_wr) mem[dp_paddr] <= dp_dout;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_wr) mem[b_addr] <= b_wdata;
    end
  end
endmodule
