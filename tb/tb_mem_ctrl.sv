// Self-checking test of mem_ctrl against a behavioural WMU. The testbench
// plays IDEA CTRL in the slow clock domain (enable every fourth cycle):
// random reads and writes, each held until stall is low at an enabled
// edge. Checks read data, the written words (and the choice of half of y),
// that stall stays high until the WMU acknowledged, and that the slow
// (page-fault) case happened.
module tb_mem_ctrl;
  import vmw_pkg::*;
  logic clk = 0, rst_n = 0, core_ce;
  logic rd_req = 0, wr_req = 0, req_sel = 0;
  logic [31:0] req_addr = 0;
  logic [63:0] y = 0;
  logic [31:0] x;
  logic stall;
  logic cp_access, cp_wr, cp_tlbhit;
  logic [31:0] cp_vaddr, cp_dout, cp_din;
  int checks = 0, failures = 0;
  int cnt = 0;

  mem_ctrl dut (.*);
  wmu_model u_wmu (.clk, .rst_n, .cp_vaddr, .cp_din, .cp_dout, .cp_access, .cp_wr, .cp_tlbhit);

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= (cnt + 1) % 4;
  assign core_ce = (cnt == 3);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] model [int unsigned];

  // issue a request at an enabled edge, wait until it is served; returns
  // the number of slow cycles it took
  task automatic req(bit wr, logic [31:0] a, bit sel, logic [63:0] yy, output int slow);
    bit seen_hit;
    do @(negedge clk); while (!core_ce);
    @(posedge clk); #1;
    rd_req = !wr; wr_req = wr; req_addr = a; req_sel = sel; y = yy;
    slow = 0; seen_hit = 0;
    forever begin
      @(negedge clk);
      if (cp_tlbhit) seen_hit = 1;
      if (core_ce) begin
        slow++;
        if (!stall) break;
      end
    end
    checks++;
    if (!seen_hit) begin failures++; $display("FAIL stall dropped before the WMU acknowledged"); end
    @(posedge clk); #1;
    rd_req = 0; wr_req = 0;
  endtask

  initial begin
    int s, slow_max;
    logic [31:0] a, d;
    logic [63:0] yy;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    repeat (400) begin
      a = 32'(4 * $urandom_range(0, 63));
      if ($urandom_range(0, 1)) begin
        yy = {$urandom, $urandom};
        s = $urandom_range(0, 1);
        req(1, a, s, yy, slow_max);
        model[a >> 2] = s ? yy[31:0] : yy[63:32];
        checks++;
        if (u_wmu.mem[a >> 2] !== model[a >> 2]) begin failures++; $display("FAIL write %h", a); end
      end else begin
        req(0, a, 0, 0, slow_max);
        d = model.exists(a >> 2) ? model[a >> 2] : 0;
        checks++;
        if (x !== d) begin failures++; $display("FAIL read %h: %h expected %h", a, x, d); end
      end
    end
    checks++;
    if (u_wmu.n_slow == 0) begin failures++; $display("FAIL no slow access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
