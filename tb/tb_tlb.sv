// Self-checking test of tlb: random management writes of lines, random
// lookups (hit, line's PPN), dirty marking, invalidation by VPN and
// management reads, all compared with a line array kept in the testbench.
module tb_tlb;
  import vmw_pkg::*;
  localparam int L = N_PAGES;
  logic clk = 0, rst_n = 0;
  logic lookup_en = 0, set_dirty = 0, inv_en = 0;
  logic [VPN_W-1:0] lookup_vpn = 0, inv_vpn = 0;
  logic hit;
  logic [2:0] line, mgmt_idx = 0;
  logic [PPN_W-1:0] ppn;
  logic mgmt_we_vpn = 0, mgmt_we_flags = 0;
  logic [31:0] mgmt_wdata = 0;
  logic [VPN_W-1:0] mgmt_vpn;
  logic [PPN_W+1:0] mgmt_flags;
  int checks = 0, failures = 0;

  tlb dut (.*);
  always #5 clk = ~clk;

  logic [VPN_W-1:0] m_vpn [L];
  logic [PPN_W-1:0] m_ppn [L];
  bit m_v [L], m_d [L];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [VPN_W-1:0] rvpn();
    return VPN_W'($urandom_range(0, 11));  // few pages, so lookups hit often
  endfunction

  task automatic mwrite(int i, logic [VPN_W-1:0] v, logic [PPN_W-1:0] p, bit val, bit d);
    @(negedge clk);
    mgmt_idx = 3'(i);
    mgmt_we_vpn = 1; mgmt_wdata = 32'(v);
    @(negedge clk);
    mgmt_we_vpn = 0; mgmt_we_flags = 1;
    mgmt_wdata = 32'(p) | (32'(val) << TLB_VALID) | (32'(d) << TLB_DIRTY);
    @(negedge clk);
    mgmt_we_flags = 0;
    m_vpn[i] = v; m_ppn[i] = p; m_v[i] = val; m_d[i] = d;
  endtask

  task automatic lookup(logic [VPN_W-1:0] v, bit dirty_it);
    int exp_line = -1;
    for (int i = 0; i < L; i++) if (exp_line < 0 && m_v[i] && m_vpn[i] == v) exp_line = i;
    @(negedge clk);
    lookup_en = 1; lookup_vpn = v;
    @(negedge clk);
    lookup_en = 0;
    checks++;
    if (hit !== (exp_line >= 0)) begin
      failures++; $display("FAIL hit %b for vpn %0d", hit, v);
    end else if (exp_line >= 0) begin
      checks++;
      if (line !== 3'(exp_line) || ppn !== m_ppn[exp_line]) begin
        failures++; $display("FAIL line %0d ppn %0d, expected %0d %0d", line, ppn, exp_line, m_ppn[exp_line]);
      end
      if (dirty_it) begin
        set_dirty = 1;
        @(negedge clk);
        set_dirty = 0;
        m_d[exp_line] = 1;
      end
    end
  endtask

  task automatic check_lines();
    for (int i = 0; i < L; i++) begin
      @(negedge clk);
      mgmt_idx = 3'(i);
      #1;
      checks++;
      if (mgmt_vpn !== m_vpn[i] || mgmt_flags !== {m_d[i], m_v[i], m_ppn[i]}) begin
        failures++;
        $display("FAIL line %0d reads %0d/%b expected %0d/%b", i, mgmt_vpn, mgmt_flags,
                 m_vpn[i], {m_d[i], m_v[i], m_ppn[i]});
      end
    end
  endtask

  initial begin
    for (int i = 0; i < L; i++) begin m_vpn[i] = 0; m_ppn[i] = 0; m_v[i] = 0; m_d[i] = 0; end
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    check_lines();
    for (int i = 0; i < L; i++) mwrite(i, rvpn(), PPN_W'(i), 1, 0);
    check_lines();
    repeat (2000) begin
      case ($urandom_range(0, 9))
        0: mwrite($urandom_range(0, L-1), rvpn(), PPN_W'($urandom), $urandom, $urandom);
        1: begin
          logic [VPN_W-1:0] v = rvpn();
          @(negedge clk); inv_en = 1; inv_vpn = v;
          @(negedge clk); inv_en = 0;
          for (int i = 0; i < L; i++) if (m_vpn[i] == v) m_v[i] = 0;
        end
        2: check_lines();
        default: lookup(rvpn(), $urandom);
      endcase
    end
    check_lines();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
