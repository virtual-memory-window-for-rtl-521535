// Self-checking test of idea_core: the published IDEA vector, then random
// keys and batches of one to four blocks against the reference model. The
// core runs with a clock enable every fourth cycle (as the slow clock
// domain does in the system) and random stalls; it checks that a batch of n
// blocks takes 63+2n enabled, unstalled cycles, so a stall freezes it.
module tb_idea_core;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, stall = 0;
  logic ce;
  logic [31:0] x_in = 0;
  logic ld_key = 0, ld_x = 0, x_sel = 0, go = 0;
  logic [1:0] x_slot = 0, y_slot = 0;
  logic [2:0] n_blk = 0;
  logic [4:0] key_idx = 0;
  logic busy, done;
  logic [63:0] y;
  int checks = 0, failures = 0;
  int cecnt = 0;
  bit stall_rand = 0;

  idea_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cecnt <= (cecnt == 3) ? 0 : cecnt + 1;
  end
  assign ce = (cecnt == 3);
  always @(posedge clk) stall <= stall_rand && ($urandom_range(0, 3) == 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one enabled, unstalled slow-clock edge
  task automatic slow_edge();
    do @(posedge clk); while (!(ce && !stall));
  endtask

  task automatic drive_wait();
    // wait until the next enabled edge is about to happen
    @(negedge clk);
    while (!(ce && !stall)) @(negedge clk);
  endtask

  task automatic load_keys(subkeys_t k);
    for (int i = 0; i < 26; i++) begin
      drive_wait();
      ld_key = 1; key_idx = 5'(i); x_in = {k[2*i], k[2*i+1]};
      @(posedge clk);
      #1 ld_key = 0;
    end
  endtask

  task automatic run_batch(subkeys_t k, logic [63:0] blk [4], int n);
    logic [63:0] exp;
    int cyc;
    for (int i = 0; i < n; i++) begin
      drive_wait(); ld_x = 1; x_slot = 2'(i); x_sel = 0; x_in = blk[i][63:32]; @(posedge clk); #1;
      drive_wait(); ld_x = 1; x_slot = 2'(i); x_sel = 1; x_in = blk[i][31:0];  @(posedge clk); #1;
      ld_x = 0;
    end
    drive_wait(); go = 1; n_blk = 3'(n); @(posedge clk); #1 go = 0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      if (ce && !stall && !done) cyc++;
    end
    for (int i = 0; i < n; i++) begin
      y_slot = 2'(i);
      #1;
      exp = ref_encrypt(k, blk[i]);
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL block %h (slot %0d of %0d): got %h expected %h", blk[i], i, n, y, exp);
      end
    end
    checks++;
    if (cyc != 63 + 2 * n) begin
      failures++;
      $display("FAIL latency %0d enabled cycles for %0d blocks, expected %0d", cyc, n, 63 + 2 * n);
    end
  endtask

  initial begin
    subkeys_t k;
    logic [63:0] blks [4];
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reference model self-check on the published vector
    k = ref_expand(128'h0001_0002_0003_0004_0005_0006_0007_0008);
    checks++;
    if (ref_encrypt(k, 64'h0000_0001_0002_0003) !== 64'h11FB_ED2B_0198_6DE5) begin
      failures++; $display("FAIL reference model vector");
    end
    load_keys(k);
    blks[0] = 64'h0000_0001_0002_0003;
    run_batch(k, blks, 1);
    y_slot = 0;
    #1 checks++;
    if (y !== 64'h11FB_ED2B_0198_6DE5) begin failures++; $display("FAIL vector %h", y); end
    stall_rand = 1;
    for (int t = 0; t < 6; t++) begin
      k = ref_expand({$urandom, $urandom, $urandom, $urandom});
      stall_rand = 0; load_keys(k); stall_rand = 1;
      for (int b = 0; b < 8; b++) begin
        foreach (blks[i]) blks[i] = {$urandom, $urandom};
        run_batch(k, blks, $urandom_range(1, 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
