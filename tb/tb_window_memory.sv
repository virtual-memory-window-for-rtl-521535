// Self-checking test of window_memory: random reads and writes on both
// ports against a testbench copy of the 16 KB contents, with the one-cycle
// read latency, read-old-data on a same-port write, and port B winning a
// simultaneous write to one word.
module tb_window_memory;
  import vmw_pkg::*;
  logic clk = 0;
  logic dp_en = 0, dp_wr = 0, b_en = 0, b_wr = 0;
  logic [WADDR_W-1:0] dp_paddr = 0, b_addr = 0;
  logic [31:0] dp_dout = 0, b_wdata = 0, dp_din, b_rdata;
  int checks = 0, failures = 0;
  logic [31:0] model [WIN_WORDS];

  window_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ea, eb;
    bit ra, rb;
    // fill through both ports
    for (int i = 0; i < WIN_WORDS; i++) begin
      @(negedge clk);
      model[i] = $urandom;
      if (i % 2) begin dp_en = 1; dp_wr = 1; dp_paddr = WADDR_W'(i); dp_dout = model[i]; b_en = 0; end
      else       begin b_en = 1; b_wr = 1; b_addr = WADDR_W'(i); b_wdata = model[i]; dp_en = 0; end
    end
    @(negedge clk); dp_en = 0; b_en = 0;
    repeat (20000) begin
      @(negedge clk);
      dp_en = $urandom; dp_wr = $urandom; dp_paddr = WADDR_W'($urandom); dp_dout = $urandom;
      b_en = $urandom;  b_wr = $urandom;  b_addr = ($urandom_range(0, 7) == 0) ? dp_paddr : WADDR_W'($urandom);
      b_wdata = $urandom;
      ra = dp_en; rb = b_en;
      ea = model[dp_paddr]; eb = model[b_addr];
      if (dp_en && dp_wr) model[dp_paddr] = dp_dout;
      if (b_en && b_wr) model[b_addr] = b_wdata;
      @(posedge clk); #1;
      if (ra) begin checks++; if (dp_din !== ea) begin failures++; $display("FAIL port A read"); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL port B read"); end end
    end
    @(negedge clk); dp_en = 0; b_en = 0;
    for (int i = 0; i < WIN_WORDS; i++) begin
      @(negedge clk); dp_en = 1; dp_wr = 0; dp_paddr = WADDR_W'(i);
      @(posedge clk); #1;
      checks++;
      if (dp_din !== model[i]) begin failures++; $display("FAIL final word %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
