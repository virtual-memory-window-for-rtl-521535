// Window Management Unit (WMU): the platform-specific translation engine
// between a coprocessor that issues virtual addresses and the window memory.
//
// Coprocessor side: the coprocessor raises cp_access with cp_vaddr, cp_wr
// and, for a write, cp_dout, and holds them until cp_tlbhit. With no
// translation fault cp_tlbhit rises for one cycle, and cp_din carries the
// read data, on the fourth rising clock edge after cp_access was raised
// (the timing given by the document):
//   edge 1  coprocessor raises cp_access
//   edge 2  the TLB state machine enters MATCH, the access is latched
//   edge 3  CAM search result registered
//   edge 4  PPN read from the TLB RAM, window memory accessed, cp_tlbhit set
//   edge 5  coprocessor samples cp_din and drops or changes its request
// On a miss the state machine enters MISS: the faulting virtual address is
// kept in AR, SR.MISS is set and, if enabled, wmu_int raised. The
// coprocessor stays stalled on cp_tlbhit. No new translation starts while
// SR.MISS is set; the operating system fixes the TLB and window memory
// through management accesses and then clears SR.MISS, after which the
// held access is translated again.
//
// Processor side: a simple request/ready register bus (cpu_sel held until
// cpu_ready; reads return cpu_rdata while cpu_ready is high). Every access
// is a "manage" request to the state machine and is served in its MANAGE
// state, so it never overlaps a translation. Registers (vmw_pkg):
//   CR  bit0 START: writing 1 pulses cp_start; bit1 IE: interrupt enable
//   SR  MISS, FIN, BUSY, WRITE (faulting access was a write), INV (the
//       parameter page was invalidated); write 1 to clear MISS, FIN, INV
//   AR  faulting virtual address
//   TLBIDX, TLBVPN, TLBPPN  management of one TLB line
// cp_fin sets SR.FIN and clears SR.BUSY; cp_inv invalidates the TLB line of
// the parameter page and sets SR.INV.
//
// The document gives the signal names, the registers AR/SR/CR, the TLB
// organisation, the state machine and the four-cycle timing. The register
// bit layout, the processor bus handshake and the SR.MISS gating of new
// translations are this design's choices. Single clock (the fast clock),
// synchronous active-low reset.
module wmu
  import vmw_pkg::*;
#(
  parameter int unsigned PAGES = N_PAGES,
  parameter int unsigned PAGE_WORDS = WORDS_PER_PAGE,
  localparam int unsigned AW = $clog2(PAGES * PAGE_WORDS),
  localparam int unsigned PW = $clog2(PAGES),
  localparam int unsigned OW = $clog2(PAGE_WORDS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // coprocessor interface (portable)
  input  logic [VADDR_W-1:0] cp_vaddr,
  output logic [DATA_W-1:0]  cp_din,
  input  logic [DATA_W-1:0]  cp_dout,
  input  logic               cp_access,
  input  logic               cp_wr,
  output logic               cp_tlbhit,
  output logic               cp_start,
  input  logic               cp_fin,
  input  logic               cp_inv,
  // window memory interface (platform-specific)
  output logic [AW-1:0]      dp_paddr,
  input  logic [DATA_W-1:0]  dp_din,
  output logic [DATA_W-1:0]  dp_dout,
  output logic               dp_en,
  output logic               dp_wr,
  // processor control and data bus
  input  logic               cpu_sel,
  input  logic               cpu_wr,
  input  logic [2:0]         cpu_addr,
  input  logic [31:0]        cpu_wdata,
  output logic [31:0]        cpu_rdata,
  output logic               cpu_ready,
  output logic               wmu_int
);
  // In this design the word offset within a page is taken from the virtual
  // address bits just above the byte lane, so the page size must match.
  localparam int unsigned PAGE_OFF_W = OW + 2;

  tlb_state_e state;
  logic       fsm_hit, fsm_miss;
  logic       match, manage;
  logic       phase;              // MATCH: 0 = CAM search, 1 = RAM read

  logic [VADDR_W-1:0] va_q;
  logic               wr_q;
  logic [DATA_W-1:0]  wdata_q;

  logic [31:0] ar;
  logic        sr_miss, sr_fin, sr_busy, sr_write, sr_inv;
  logic        cr_ie;
  logic [PW-1:0] tlb_idx;

  logic          t_hit;
  logic [PPN_W-1:0] t_ppn;
  logic [VPN_W-1:0] t_mvpn;
  logic [PPN_W+1:0] t_mflags;
  logic             we_vpn, we_flags;

  assign manage = cpu_sel;
  // a new translation starts unless the hit of the previous one is still
  // being delivered or a miss is pending
  assign match  = cp_access && !cp_tlbhit && !sr_miss;

  tlb_fsm u_fsm (
    .clk, .rst_n,
    .manage, .match,
    .lookup_done (phase),
    .miss        (!t_hit),
    .state,
    .tlbhit      (fsm_hit),
    .cp_miss     (fsm_miss)
  );

  assign cpu_ready = (state == TLB_MANAGE);
  assign we_vpn    = cpu_ready && cpu_wr && cpu_addr == REG_TLBVPN;
  assign we_flags  = cpu_ready && cpu_wr && cpu_addr == REG_TLBPPN;

  tlb #(.LINES(PAGES)) u_tlb (
    .clk, .rst_n,
    .lookup_en   (state == TLB_MATCH && !phase),
    .lookup_vpn  (va_q[VADDR_W-1 -: VPN_W]),
    .hit         (t_hit),
    .line        (),
    .ppn         (t_ppn),
    .set_dirty   (fsm_hit && wr_q),
    .inv_en      (cp_inv),
    .inv_vpn     (PARAM_VADDR[VADDR_W-1 -: VPN_W]),
    .mgmt_idx    (tlb_idx),
    .mgmt_we_vpn (we_vpn),
    .mgmt_we_flags(we_flags),
    .mgmt_wdata  (cpu_wdata),
    .mgmt_vpn    (t_mvpn),
    .mgmt_flags  (t_mflags)
  );

  // window memory access in the second MATCH cycle, on a hit
  assign dp_en    = fsm_hit;
  assign dp_wr    = fsm_hit && wr_q;
  assign dp_paddr = {PW'(t_ppn), va_q[PAGE_OFF_W-1:2]};
  assign dp_dout  = wdata_q;
  assign cp_din   = dp_din;

  always_comb begin
    cpu_rdata = '0;
    unique case (cpu_addr)
      REG_CR:     cpu_rdata = {30'd0, cr_ie, 1'b0};
      REG_SR:     cpu_rdata = 32'({sr_inv, sr_write, sr_busy, sr_fin, sr_miss});
      REG_AR:     cpu_rdata = ar;
      REG_TLBIDX: cpu_rdata = 32'(tlb_idx);
      REG_TLBVPN: cpu_rdata = 32'(t_mvpn);
      REG_TLBPPN: cpu_rdata = 32'(t_mflags);
      default:    cpu_rdata = '0;
    endcase
  end

  assign wmu_int = cr_ie && (sr_miss || sr_fin);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= 1'b0;
      va_q      <= '0;
      wr_q      <= 1'b0;
      wdata_q   <= '0;
      cp_tlbhit <= 1'b0;
      cp_start  <= 1'b0;
      ar        <= '0;
      sr_miss   <= 1'b0;
      sr_fin    <= 1'b0;
      sr_busy   <= 1'b0;
      sr_write  <= 1'b0;
      sr_inv    <= 1'b0;
      cr_ie     <= 1'b0;
      tlb_idx   <= '0;
    end else begin
      cp_tlbhit <= fsm_hit;
      cp_start  <= 1'b0;
      // translation pipeline
      if (state == TLB_IDLE && !manage && match) begin
        va_q    <= cp_vaddr;
        wr_q    <= cp_wr;
        wdata_q <= cp_dout;
        phase   <= 1'b0;
      end else if (state == TLB_MATCH) begin
        phase <= !phase;
      end
      if (fsm_miss) begin
        ar       <= va_q;
        sr_miss  <= 1'b1;
        sr_write <= wr_q;
      end
      // coprocessor events
      if (cp_fin) begin
        sr_fin  <= 1'b1;
        sr_busy <= 1'b0;
      end
      if (cp_inv) sr_inv <= 1'b1;
      // processor register writes
      if (cpu_ready && cpu_wr) begin
        unique case (cpu_addr)
          REG_CR: begin
            cr_ie <= cpu_wdata[CR_IE];
            if (cpu_wdata[CR_START]) begin
              cp_start <= 1'b1;
              sr_busy  <= 1'b1;
              sr_fin   <= 1'b0;
              sr_inv   <= 1'b0;
            end
          end
          REG_SR: begin
            if (cpu_wdata[SR_MISS]) sr_miss <= 1'b0;
            if (cpu_wdata[SR_FIN])  sr_fin  <= 1'b0;
            if (cpu_wdata[SR_INV])  sr_inv  <= 1'b0;
          end
          REG_TLBIDX: tlb_idx <= cpu_wdata[PW-1:0];
          default: ;
        endcase
      end
    end
  end

  // A coprocessor request must be held until it is acknowledged.
  property p_hold_access;
    @(posedge clk) disable iff (!rst_n)
      (cp_access && !cp_tlbhit) |=> cp_access;
  endproperty
  a_hold_access: assert property (p_hold_access);
endmodule
