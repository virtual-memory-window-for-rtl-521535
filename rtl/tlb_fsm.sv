// TLB state machine of the Window Management Unit.
//
// Four states, as in the document's TLB state diagram: IDLE, MANAGE (a
// processor access to the WMU is served), MATCH (a coprocessor access is
// being translated) and MISS (the translation failed; the coprocessor waits
// while the operating system updates the TLB and the window memory).
// Transitions:
//   IDLE   -> MANAGE  on manage (has priority over match)
//   IDLE   -> MATCH   on match and not manage
//   MATCH  -> IDLE    on not miss, emitting tlbhit
//   MATCH  -> MISS    on miss, emitting cp_miss
//   MISS   -> MANAGE  on manage, else stays in MISS
//   MANAGE -> IDLE    always
// The translation takes two clock cycles in this design (CAM search, then
// RAM read), so MATCH also has a `lookup_done` input: the miss input is
// evaluated only when it is high, and MATCH holds until then. tlbhit and
// cp_miss are Mealy outputs, valid in the cycle before the transition;
// the WMU registers them. Synchronous active-low reset to IDLE.
module tlb_fsm
  import vmw_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       manage,
  input  logic       match,
  input  logic       lookup_done,
  input  logic       miss,
  output tlb_state_e state,
  output logic       tlbhit,
  output logic       cp_miss
);
  tlb_state_e next;

  always_comb begin
    next    = state;
    tlbhit  = 1'b0;
    cp_miss = 1'b0;
    unique case (state)
      TLB_IDLE:
        if (manage)     next = TLB_MANAGE;
        else if (match) next = TLB_MATCH;
      TLB_MANAGE: next = TLB_IDLE;
      TLB_MATCH:
        if (lookup_done) begin
          if (miss) begin next = TLB_MISS; cp_miss = 1'b1; end
          else      begin next = TLB_IDLE; tlbhit  = 1'b1; end
        end
      TLB_MISS:
        if (manage) next = TLB_MANAGE;
      default: next = TLB_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= TLB_IDLE;
    else        state <= next;
  end
endmodule
