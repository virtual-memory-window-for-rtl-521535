// Translation Lookaside Buffer of the Window Management Unit.
//
// Each TLB line pairs a content-addressable part, holding a virtual page
// number (VPN), with a RAM part holding the physical window page number
// (PPN) and the valid and dirty bits, as the document describes for CAM and
// RAM blocks of an FPGA. The number of lines equals the number of window
// pages by default (eight), a choice of this design.
//
// Ports and timing:
//   lookup   when lookup_en is high, all lines are compared with lookup_vpn
//            and the result is registered: hit and line are valid the cycle
//            after. ppn is read from the RAM part for `line` without a
//            clock (distributed RAM).
//   set_dirty marks `line` dirty (a coprocessor write went through it).
//   inv_en   clears the valid bit of every line holding inv_vpn.
//   mgmt_*   processor management of line mgmt_idx: writes of the VPN or of
//            {dirty, valid, PPN}, and reads of both, without a clock.
// A management write takes precedence over set_dirty and inv_en in the same
// cycle. Synchronous active-low reset clears every line.
module tlb
  import vmw_pkg::*;
#(
  parameter int unsigned LINES = N_PAGES,
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // translation
  input  logic             lookup_en,
  input  logic [VPN_W-1:0] lookup_vpn,
  output logic             hit,
  output logic [IDX_W-1:0] line,
  output logic [PPN_W-1:0] ppn,
  input  logic             set_dirty,
  // invalidation of one virtual page
  input  logic             inv_en,
  input  logic [VPN_W-1:0] inv_vpn,
  // management
  input  logic [IDX_W-1:0] mgmt_idx,
  input  logic             mgmt_we_vpn,
  input  logic             mgmt_we_flags,
  input  logic [31:0]      mgmt_wdata,
  output logic [VPN_W-1:0] mgmt_vpn,
  output logic [PPN_W+1:0] mgmt_flags
);
  logic [VPN_W-1:0] vpn_cam  [LINES];
  logic [PPN_W-1:0] ppn_ram  [LINES];
  logic             valid    [LINES];
  logic             dirty    [LINES];

  // parallel compare of the CAM part
  logic             m_hit;
  logic [IDX_W-1:0] m_line;
  always_comb begin
    m_hit  = 1'b0;
    m_line = '0;
    for (int i = 0; i < LINES; i++)
      if (!m_hit && valid[i] && vpn_cam[i] == lookup_vpn) begin
        m_hit  = 1'b1;
        m_line = IDX_W'(i);
      end
  end

  assign ppn        = ppn_ram[line];
  assign mgmt_vpn   = vpn_cam[mgmt_idx];
  assign mgmt_flags = {dirty[mgmt_idx], valid[mgmt_idx], ppn_ram[mgmt_idx]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hit  <= 1'b0;
      line <= '0;
      for (int i = 0; i < LINES; i++) begin
        vpn_cam[i] <= '0;
        ppn_ram[i] <= '0;
        valid[i]   <= 1'b0;
        dirty[i]   <= 1'b0;
      end
    end else begin
      if (lookup_en) begin
        hit  <= m_hit;
        line <= m_line;
      end
      if (set_dirty) dirty[line] <= 1'b1;
      if (inv_en)
        for (int i = 0; i < LINES; i++)
          if (vpn_cam[i] == inv_vpn) valid[i] <= 1'b0;
      if (mgmt_we_vpn) vpn_cam[mgmt_idx] <= mgmt_wdata[VPN_W-1:0];
      if (mgmt_we_flags) begin
        ppn_ram[mgmt_idx] <= mgmt_wdata[PPN_W-1:0];
        valid[mgmt_idx]   <= mgmt_wdata[TLB_VALID];
        dirty[mgmt_idx]   <= mgmt_wdata[TLB_DIRTY];
      end
    end
  end
endmodule
