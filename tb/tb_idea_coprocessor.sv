// Self-checking test of the whole IDEA coprocessor against a behavioural
// WMU (a sparse virtual memory with random translation delays). The
// testbench writes a param array to the parameter page, the subkeys and the
// input data to memory, pulses cp_start and waits for cp_fin. Checks the
// output blocks against the IDEA reference model, one cp_inv per run, no
// access to the parameter page after cp_inv, and that writes only go to
// the output object. Two runs: with subkeys, then reusing them.
module tb_idea_coprocessor;
  import vmw_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, core_ce;
  logic [31:0] cp_vaddr, cp_din, cp_dout;
  logic cp_access, cp_wr, cp_tlbhit, cp_start = 0, cp_inv, cp_fin;
  int checks = 0, failures = 0, cnt = 0;
  int n_inv = 0;
  bit after_inv = 0, bad_param = 0, bad_write = 0;
  logic [31:0] out_lo, out_hi;

  idea_coprocessor dut (.*);
  wmu_model u_wmu (.clk, .rst_n, .cp_vaddr, .cp_din, .cp_dout, .cp_access, .cp_wr, .cp_tlbhit);

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= (cnt + 1) % 4;
  assign core_ce = (cnt == 3);

  always @(posedge clk) begin
    if (cp_inv) begin n_inv++; after_inv = 1; end
    if (cp_access && after_inv && cp_vaddr >= PARAM_VADDR) bad_param = 1;
    if (cp_access && cp_wr && (cp_vaddr < out_lo || cp_vaddr >= out_hi)) bad_write = 1;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(bit with_key, int blocks, subkeys_t k);
    logic [31:0] A, B, K;
    logic [63:0] blk, got;
    A = 32'h0040_0100; B = 32'h0050_0000; K = 32'h0060_0000;
    out_lo = B; out_hi = B + 8 * blocks;
    for (int i = 0; i < 2 * blocks; i++) u_wmu.mem[(A >> 2) + i] = $urandom;
    for (int i = 0; i < 26; i++) u_wmu.mem[(K >> 2) + i] = {k[2*i], k[2*i+1]};
    u_wmu.mem[(PARAM_VADDR >> 2) + 0] = with_key ? 4 : 3;
    u_wmu.mem[(PARAM_VADDR >> 2) + 1] = 0;
    u_wmu.mem[(PARAM_VADDR >> 2) + 2] = A;
    u_wmu.mem[(PARAM_VADDR >> 2) + 3] = 8 * blocks;
    u_wmu.mem[(PARAM_VADDR >> 2) + 4] = B;
    u_wmu.mem[(PARAM_VADDR >> 2) + 5] = 8 * blocks;
    u_wmu.mem[(PARAM_VADDR >> 2) + 6] = K;
    u_wmu.mem[(PARAM_VADDR >> 2) + 7] = 104;
    after_inv = 0;
    @(posedge clk); #1 cp_start = 1;
    @(posedge clk); #1 cp_start = 0;
    wait (cp_fin);
    @(posedge clk);
    for (int i = 0; i < blocks; i++) begin
      blk = {u_wmu.mem[(A >> 2) + 2*i], u_wmu.mem[(A >> 2) + 2*i + 1]};
      got = {u_wmu.mem[(B >> 2) + 2*i], u_wmu.mem[(B >> 2) + 2*i + 1]};
      chk(got == ref_encrypt(k, blk), $sformatf("block %0d: %h", i, got));
    end
  endtask

  initial begin
    subkeys_t k;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    k = ref_expand({$urandom, $urandom, $urandom, $urandom});
    run(1, 12, k);
    run(0, 20, k);
    chk(n_inv == 2, $sformatf("%0d cp_inv pulses", n_inv));
    chk(!bad_param, "parameter page accessed after cp_inv");
    chk(!bad_write, "write outside the output object");
    chk(u_wmu.n_slow > 0, "slow translations happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
