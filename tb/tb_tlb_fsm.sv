// Self-checking test of tlb_fsm: random manage/match/lookup_done/miss
// inputs for many cycles, with the state and the Mealy outputs compared
// each cycle against a transition table kept in the testbench; then a
// directed walk IDLE -> MATCH -> MISS -> MANAGE -> IDLE. Also counts that
// every transition was taken.
module tb_tlb_fsm;
  import vmw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic manage = 0, match = 0, lookup_done = 0, miss = 0;
  tlb_state_e state;
  logic tlbhit, cp_miss;
  int checks = 0, failures = 0;
  int taken [4][4];

  tlb_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tlb_state_e model = TLB_IDLE;

  task automatic step_check();
    tlb_state_e nxt;
    bit eh, em;
    nxt = model; eh = 0; em = 0;
    case (model)
      TLB_IDLE:   nxt = manage ? TLB_MANAGE : (match ? TLB_MATCH : TLB_IDLE);
      TLB_MANAGE: nxt = TLB_IDLE;
      TLB_MATCH:  if (lookup_done) begin
                    nxt = miss ? TLB_MISS : TLB_IDLE;
                    em = miss; eh = !miss;
                  end
      TLB_MISS:   nxt = manage ? TLB_MANAGE : TLB_MISS;
    endcase
    #1;
    checks++;
    if (tlbhit !== eh || cp_miss !== em) begin
      failures++;
      $display("FAIL outputs in %s: hit %b miss %b", model.name(), tlbhit, cp_miss);
    end
    @(posedge clk); #1;
    taken[model][nxt]++;
    model = nxt;
    checks++;
    if (state !== model) begin
      failures++;
      $display("FAIL state %s expected %s", state.name(), model.name());
    end
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    // directed walk
    match = 1; step_check();                    // IDLE -> MATCH
    match = 0; step_check();                    // MATCH holds (lookup not done)
    lookup_done = 1; miss = 1; step_check();    // MATCH -> MISS
    lookup_done = 0; miss = 0; step_check();    // MISS holds
    manage = 1; step_check();                   // MISS -> MANAGE
    manage = 0; step_check();                   // MANAGE -> IDLE
    checks++;
    if (state !== TLB_IDLE) begin failures++; $display("FAIL directed walk"); end
    repeat (20000) begin
      manage = ($urandom_range(0, 3) == 0);
      match = $urandom; lookup_done = $urandom; miss = $urandom;
      step_check();
    end
    checks++;
    if (!(taken[TLB_IDLE][TLB_MANAGE] && taken[TLB_IDLE][TLB_MATCH] && taken[TLB_MATCH][TLB_IDLE] &&
          taken[TLB_MATCH][TLB_MISS] && taken[TLB_MISS][TLB_MANAGE] && taken[TLB_MANAGE][TLB_IDLE] &&
          taken[TLB_MISS][TLB_MISS] && taken[TLB_IDLE][TLB_IDLE])) begin
      failures++; $display("FAIL not every transition taken");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
