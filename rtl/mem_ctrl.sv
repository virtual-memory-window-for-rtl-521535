// Memory CTRL: the IDEA coprocessor's memory access unit.
//
// It turns a read or write request of IDEA CTRL into one access on the WMU
// interface and holds the IDEA side (core and controller) with `stall` until
// the access is done. It runs on the fast clock; IDEA CTRL and the core run
// on the slow one, modelled as the enable `core_ce` of the same clock (the
// slow period is an integral multiple of the fast one).
//
// Protocol towards IDEA CTRL: rd_req or wr_req is held, with req_addr (a
// byte address) and, for a write, req_sel choosing the half of the core
// output y (0: y[63:32], 1: y[31:0]). stall is high while a request is
// pending and not yet served. Once served, stall drops, the read word is on
// `x`, and the request counts as consumed at the next edge with core_ce
// high; a request still high after that is a new one.
// Towards the WMU: cp_access, cp_wr, cp_vaddr and cp_dout are registered and
// held until cp_tlbhit; cp_din is sampled with cp_tlbhit. One access takes
// five fast cycles when it translates without a fault; a TLB miss simply
// lengthens the wait for cp_tlbhit.
// The document gives the block's role and its signals; the state machine
// and request protocol are this design's. Synchronous active-low reset.
module mem_ctrl
  import vmw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               core_ce,
  // IDEA side
  input  logic               rd_req,
  input  logic               wr_req,
  input  logic [VADDR_W-1:0] req_addr,
  input  logic               req_sel,
  input  logic [63:0]        y,
  output logic [DATA_W-1:0]  x,
  output logic               stall,
  // WMU side
  output logic               cp_access,
  output logic               cp_wr,
  output logic [VADDR_W-1:0] cp_vaddr,
  output logic [DATA_W-1:0]  cp_dout,
  input  logic [DATA_W-1:0]  cp_din,
  input  logic               cp_tlbhit
);
  typedef enum logic [1:0] {MC_IDLE, MC_ACCESS, MC_DONE} mc_state_e;
  mc_state_e state;

  assign stall     = (rd_req || wr_req) && state != MC_DONE;
  assign cp_access = (state == MC_ACCESS);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= MC_IDLE;
      cp_wr    <= 1'b0;
      cp_vaddr <= '0;
      cp_dout  <= '0;
      x        <= '0;
    end else begin
      unique case (state)
        MC_IDLE:
          if (rd_req || wr_req) begin
            state    <= MC_ACCESS;
            cp_wr    <= wr_req;
            cp_vaddr <= req_addr;
            cp_dout  <= req_sel ? y[31:0] : y[63:32];
          end
        MC_ACCESS:
          if (cp_tlbhit) begin
            state <= MC_DONE;
            if (!cp_wr) x <= cp_din;
          end
        MC_DONE:
          if (core_ce) state <= MC_IDLE;
        default: state <= MC_IDLE;
      endcase
    end
  end

  a_one_req: assert property (@(posedge clk) disable iff (!rst_n) !(rd_req && wr_req));
endmodule
