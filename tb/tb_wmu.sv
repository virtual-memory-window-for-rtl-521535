// Self-checking test of the WMU, with the window memory attached.
// The testbench acts as processor (register bus, window memory port B) and
// as coprocessor (cp_* interface). It checks: translated reads return the
// right window word with cp_tlbhit on the fourth edge after cp_access;
// writes land in the right window page and set the line's dirty bit; a miss
// keeps the coprocessor waiting, sets SR.MISS/SR.WRITE and AR, raises the
// interrupt, and the access completes once the line is written and
// SR.MISS cleared; CR.START pulses cp_start for one cycle and sets busy;
// cp_fin sets SR.FIN; cp_inv invalidates the parameter page's line.
module tb_wmu;
  import vmw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] cp_vaddr = 0, cp_dout = 0, cp_din;
  logic cp_access = 0, cp_wr = 0, cp_tlbhit, cp_start, cp_fin = 0, cp_inv = 0;
  logic [WADDR_W-1:0] dp_paddr;
  logic [31:0] dp_din, dp_dout;
  logic dp_en, dp_wr;
  logic cpu_sel = 0, cpu_wr = 0;
  logic [2:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_ready, wmu_int;
  logic b_en = 0, b_wr = 0;
  logic [WADDR_W-1:0] b_addr = 0;
  logic [31:0] b_wdata = 0, b_rdata;
  int checks = 0, failures = 0;

  wmu dut (.*);
  window_memory u_mem (.clk, .dp_en, .dp_wr, .dp_paddr, .dp_dout, .dp_din,
                       .b_en, .b_wr, .b_addr, .b_wdata, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic cpu_write(wmu_reg_e a, logic [31:0] d);
    @(posedge clk); #1;
    cpu_sel = 1; cpu_wr = 1; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_ready);
    #1 cpu_sel = 0; cpu_wr = 0;
  endtask

  task automatic cpu_read(wmu_reg_e a, output logic [31:0] d);
    @(posedge clk); #1;
    cpu_sel = 1; cpu_wr = 0; cpu_addr = a;
    forever begin @(posedge clk); if (cpu_ready) break; end
    d = cpu_rdata;
    #1 cpu_sel = 0;
  endtask

  task automatic win_write(int unsigned a, logic [31:0] d);
    @(posedge clk); #1 b_en = 1; b_wr = 1; b_addr = WADDR_W'(a); b_wdata = d;
    @(posedge clk); #1 b_en = 0; b_wr = 0;
  endtask

  task automatic win_read(int unsigned a, output logic [31:0] d);
    @(posedge clk); #1 b_en = 1; b_wr = 0; b_addr = WADDR_W'(a);
    @(posedge clk); #1 b_en = 0; d = b_rdata;
  endtask

  task automatic map(int line, logic [31:0] va, int frame);
    cpu_write(REG_TLBIDX, line);
    cpu_write(REG_TLBVPN, va >> 11);
    cpu_write(REG_TLBPPN, 32'(frame) | (32'd1 << TLB_VALID));
  endtask

  // one coprocessor access; returns the number of edges from the raising
  // edge (edge 1) to the edge that samples cp_tlbhit
  task automatic cp_acc(logic [31:0] va, bit wr, logic [31:0] wd,
                        output logic [31:0] rd, output int edges);
    @(posedge clk); #1;
    cp_access = 1; cp_vaddr = va; cp_wr = wr; cp_dout = wd;
    edges = 0;
    forever begin
      @(posedge clk);
      edges++;
      if (cp_tlbhit) break;
    end
    rd = cp_din;
    #1 cp_access = 0;
  endtask

  initial begin
    logic [31:0] d, sr;
    int e;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    for (int w = 0; w < WIN_WORDS; w++) win_write(w, 32'hC000_0000 | w);
    map(0, 32'h0001_0000, 5);
    map(3, 32'h0001_0800, 2);
    map(7, PARAM_VADDR, 0);
    cpu_write(REG_CR, 32'h2);   // IE
    cpu_read(REG_CR, d);
    chk(d == 32'h2, "CR readback");
    // translated reads
    for (int i = 0; i < 40; i++) begin
      logic [31:0] va;
      int fr;
      va = ($urandom_range(0, 1) ? 32'h0001_0000 : 32'h0001_0800) + 4 * $urandom_range(0, 511);
      fr = (va[11]) ? 2 : 5;
      cp_acc(va, 0, 0, d, e);
      chk(d == (32'hC000_0000 | (fr * 512 + va[10:2])), $sformatf("read data %h at %h", d, va));
      chk(e == 4, $sformatf("read hit on edge %0d, expected 4", e));
    end
    // write through line 3
    cp_acc(32'h0001_0800 + 4 * 17, 1, 32'h1234_5678, d, e);
    chk(e == 4, "write latency");
    win_read(2 * 512 + 17, d);
    chk(d == 32'h1234_5678, "write landed in window page 2");
    cpu_write(REG_TLBIDX, 3);
    cpu_read(REG_TLBPPN, d);
    chk(d[TLB_DIRTY] && d[TLB_VALID] && d[PPN_W-1:0] == 2, "line 3 dirty after write");
    cpu_write(REG_TLBIDX, 0);
    cpu_read(REG_TLBPPN, d);
    chk(!d[TLB_DIRTY], "line 0 clean");
    // miss: write to an unmapped page
    fork
      begin
        cp_acc(32'h0004_0000 + 8, 1, 32'hCAFE_F00D, d, e);
        chk(e > 20, "missed access waited for the OS");
      end
      begin
        wait (wmu_int);
        cpu_read(REG_SR, sr);
        chk(sr[SR_MISS] && sr[SR_WRITE], "SR shows a write miss");
        cpu_read(REG_AR, d);
        chk(d == 32'h0004_0008, "AR holds the faulting address");
        repeat (20) @(posedge clk);
        chk(!cp_tlbhit, "no hit while the miss is pending");
        map(1, 32'h0004_0000, 6);
        cpu_write(REG_SR, 32'd1 << SR_MISS);
        chk(!wmu_int, "interrupt cleared");
      end
    join
    win_read(6 * 512 + 2, d);
    chk(d == 32'hCAFE_F00D, "write after miss landed in page 6");
    // start / fin / inv
    @(posedge clk); #1;
    cpu_sel = 1; cpu_wr = 1; cpu_addr = REG_CR; cpu_wdata = 32'h3;
    do @(posedge clk); while (!cpu_ready);
    #1 cpu_sel = 0; cpu_wr = 0;
    chk(cp_start, "cp_start after CR.START");
    @(posedge clk); #1;
    chk(!cp_start, "cp_start is one cycle");
    cpu_read(REG_SR, sr);
    chk(sr[SR_BUSY] && !sr[SR_FIN], "busy after start");
    @(posedge clk); #1 cp_inv = 1;
    @(posedge clk); #1 cp_inv = 0;
    cpu_write(REG_TLBIDX, 7);
    cpu_read(REG_TLBPPN, d);
    chk(!d[TLB_VALID], "parameter page line invalidated");
    cpu_read(REG_SR, sr);
    chk(sr[SR_INV], "SR.INV set");
    cpu_write(REG_TLBIDX, 0);
    cpu_read(REG_TLBPPN, d);
    chk(d[TLB_VALID], "other line still valid");
    @(posedge clk); #1 cp_fin = 1;
    @(posedge clk); #1 cp_fin = 0;
    @(posedge clk);
    chk(wmu_int, "interrupt on fin");
    cpu_read(REG_SR, sr);
    chk(sr[SR_FIN] && !sr[SR_BUSY], "SR.FIN set, busy cleared");
    cpu_write(REG_SR, 32'd1 << SR_FIN);
    cpu_read(REG_SR, sr);
    chk(!sr[SR_FIN] && !wmu_int, "SR.FIN cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
