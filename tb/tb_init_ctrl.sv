// Self-checking test of init_ctrl against a behavioural WMU holding a
// parameter page. For param arrays of 0, 1, 3, 4 and 7 entries it checks
// that after cp_start exactly the expected words of the page are read (the
// entry count clamped to 1..4), that the entries appear on `params`, that
// cp_inv pulses once after the last read and before `start`, that init_sel
// covers the reads, and that `fin` gives one cp_fin pulse and drops start.
module tb_init_ctrl;
  import vmw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cp_start = 0, cp_access, cp_wr, cp_tlbhit, cp_inv, cp_fin, init_sel;
  logic [31:0] cp_vaddr, cp_din;
  logic start, fin = 0;
  param_t params [MAX_PARAMS];
  int checks = 0, failures = 0;

  init_ctrl dut (.*);
  wmu_model u_wmu (.clk, .rst_n, .cp_vaddr, .cp_din, .cp_dout(32'd0), .cp_access, .cp_wr, .cp_tlbhit);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic one(int no);
    logic [31:0] w [8];
    int n, reads, fins, invs, acc_before;
    bit inv_seen, bad_order, bad_sel;
    n = (no == 0) ? 1 : (no > 4 ? 4 : no);
    for (int i = 0; i < 8; i++) begin
      w[i] = (i == 0) ? no : $urandom;
      u_wmu.mem[(PARAM_VADDR >> 2) + i] = w[i];
    end
    acc_before = u_wmu.n_access;
    @(posedge clk); #1 cp_start = 1;
    @(posedge clk); #1 cp_start = 0;
    inv_seen = 0; bad_order = 0; bad_sel = 0; invs = 0;
    while (!start) begin
      @(posedge clk);
      if (cp_inv) begin invs++; inv_seen = 1; end
      if (cp_access && !init_sel) bad_sel = 1;
      if (cp_access && (cp_vaddr < PARAM_VADDR || cp_vaddr >= PARAM_VADDR + 4 * 2 * n)) bad_order = 1;
      if (cp_access && inv_seen) bad_order = 1;
    end
    reads = u_wmu.n_access - acc_before;
    chk(reads == 2 * n, $sformatf("no=%0d: %0d reads, expected %0d", no, reads, 2 * n));
    chk(invs == 1, $sformatf("no=%0d: %0d cp_inv pulses", no, invs));
    chk(!bad_order, "reads outside the expected words or after cp_inv");
    chk(!bad_sel, "access without init_sel");
    chk(!init_sel, "bus handed back at start");
    for (int i = 0; i < n; i++)
      chk(params[i].u == w[2*i] && params[i].v == w[2*i+1], $sformatf("no=%0d: entry %0d", no, i));
    for (int i = n; i < MAX_PARAMS; i++)
      chk(params[i] == '0, $sformatf("no=%0d: entry %0d not cleared", no, i));
    repeat ($urandom_range(5, 30)) begin
      @(posedge clk);
      chk(start && !cp_fin, "start held while running");
    end
    #1 fin = 1;
    fins = 0;
    repeat (5) begin
      @(posedge clk);
      if (cp_fin) fins++;
    end
    chk(fins == 1, "one cp_fin pulse");
    chk(!start, "start dropped after fin");
    #1 fin = 0;
  endtask

  initial begin
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    one(3);
    one(4);
    one(1);
    one(0);
    one(7);
    for (int i = 0; i < 5; i++) one($urandom_range(1, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
