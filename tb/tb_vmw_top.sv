// End-to-end test of the Virtual Memory Window system at its default sizes
// (8 window pages of 2 KB, slow clock at a quarter of the fast one).
//
// The testbench plays the host processor and its operating-system window
// manager: it holds the user memory (input, output, subkeys, param array),
// launches the coprocessor, and serves its interrupts:
//   page fault   read AR, pick a window page (free, else round robin), copy a
//                dirty victim back to user memory, copy the missing user page
//                in, write the TLB line, clear SR.MISS;
//   end          copy every dirty page back and clear SR.FIN.
// The TLB line i always maps window page i (a choice of this model).
// Four runs encrypt 4, 8, 16 and 32 KB: the first passes the subkeys (four
// param entries), the others reuse them (three entries, as the document's
// example call). Each output block is compared with the IDEA reference
// model. Counted and required at least once: page faults, evictions,
// dirty write-backs, parameter page invalidation, core stalls, processor
// accesses held off by a translation, and the four-edge hit latency,
// which is checked on every access that did not miss.
module tb_vmw_top;
  import vmw_pkg::*;
  import idea_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cpu_sel = 0, cpu_wr = 0;
  logic [2:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_ready, wmu_int;
  logic mem_en = 0, mem_wr = 0;
  logic [WADDR_W-1:0] mem_addr = 0;
  logic [31:0] mem_wdata = 0, mem_rdata;

  vmw_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_fault = 0, n_evict = 0, n_wb = 0, n_inv = 0, n_stall = 0;
  int n_heldoff = 0, n_lat = 0, n_fin = 0;

  // user memory: word-addressed by virtual address >> 2
  logic [31:0] umem [int unsigned];

  localparam logic [31:0] A_BASE = 32'h0010_0000;
  localparam logic [31:0] B_BASE = 32'h0020_0000;
  localparam logic [31:0] K_BASE = 32'h0030_0400;

  // window manager bookkeeping
  logic [VPN_W-1:0] frame_vpn [N_PAGES];
  bit               frame_used [N_PAGES];
  int               victim = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- monitors ----------------------------------------------------------
  int  lat = 0;
  bit  in_req = 0, req_missed = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_cop.stall && dut.core_ce) n_stall++;
    if (dut.u_cop.cp_inv) n_inv++;
    if (cpu_sel && !cpu_ready && dut.u_wmu.state == TLB_MATCH) n_heldoff++;
    // hit latency: edges from the edge that raised cp_access to the one
    // where the coprocessor samples cp_tlbhit
    if (in_req) begin
      lat++;
      if (dut.u_wmu.sr_miss || cpu_sel) req_missed = 1;  // miss or processor access in between
      if (dut.cp_tlbhit) begin
        in_req = 0;
        if (!req_missed) begin
          n_lat++;
          checks++;
          if (lat != 4) begin
            failures++;
            $display("FAIL hit latency %0d edges, expected 4", lat);
          end
        end
      end
    end
    if (!in_req && dut.cp_access && !dut.cp_tlbhit) begin
      in_req = 1; lat = 1; req_missed = cpu_sel;  // the raising edge counts as edge 1
    end
  end

  // ---- processor bus -----------------------------------------------------
  task automatic cpu_write(wmu_reg_e a, logic [31:0] d);
    @(posedge clk); #1;
    cpu_sel = 1; cpu_wr = 1; cpu_addr = a; cpu_wdata = d;
    do @(posedge clk); while (!cpu_ready);
    #1 cpu_sel = 0; cpu_wr = 0;
  endtask

  task automatic cpu_read(wmu_reg_e a, output logic [31:0] d);
    @(posedge clk); #1;
    cpu_sel = 1; cpu_wr = 0; cpu_addr = a;
    forever begin
      @(posedge clk);
      if (cpu_ready) break;
    end
    d = cpu_rdata;
    #1 cpu_sel = 0;
  endtask

  task automatic win_write(int unsigned waddr, logic [31:0] d);
    @(posedge clk); #1;
    mem_en = 1; mem_wr = 1; mem_addr = WADDR_W'(waddr); mem_wdata = d;
    @(posedge clk); #1;
    mem_en = 0; mem_wr = 0;
  endtask

  task automatic win_read(int unsigned waddr, output logic [31:0] d);
    @(posedge clk); #1;
    mem_en = 1; mem_wr = 0; mem_addr = WADDR_W'(waddr);
    @(posedge clk); #1;
    mem_en = 0;
    d = mem_rdata;
  endtask

  function automatic logic [31:0] uread(logic [31:0] va);
    if (umem.exists(va >> 2)) return umem[va >> 2];
    return 32'hDEAD_BEEF;
  endfunction

  task automatic page_in(int f, logic [VPN_W-1:0] vpn);
    for (int w = 0; w < WORDS_PER_PAGE; w++)
      win_write(f * WORDS_PER_PAGE + w, uread({vpn, 11'(w * 4)}));
  endtask

  task automatic page_out(int f);
    logic [31:0] d;
    n_wb++;
    for (int w = 0; w < WORDS_PER_PAGE; w++) begin
      win_read(f * WORDS_PER_PAGE + w, d);
      umem[{frame_vpn[f], 11'(w * 4)} >> 2] = d;
    end
  endtask

  task automatic tlb_set(int f, logic [VPN_W-1:0] vpn, bit valid);
    cpu_write(REG_TLBIDX, f);
    cpu_write(REG_TLBVPN, 32'(vpn));
    cpu_write(REG_TLBPPN, 32'(f) | (32'(valid) << TLB_VALID));
  endtask

  task automatic tlb_get(int f, output bit valid, output bit dirty);
    logic [31:0] d;
    cpu_write(REG_TLBIDX, f);
    cpu_read(REG_TLBPPN, d);
    valid = d[TLB_VALID];
    dirty = d[TLB_DIRTY];
  endtask

  // FPGA_EXECUTE: map the param array and run the coprocessor to the end
  task automatic execute(logic [31:0] prm [8], int nwords);
    logic [31:0] sr, ar;
    bit v, dty, done;
    logic [VPN_W-1:0] vpn;
    int f;
    for (int i = 0; i < N_PAGES; i++) begin
      tlb_set(i, '0, 0);
      frame_used[i] = 0;
    end
    victim = 0;
    for (int w = 0; w < nwords; w++) win_write(w, prm[w]);
    frame_vpn[0] = PARAM_VADDR[31:11];
    frame_used[0] = 1;
    tlb_set(0, PARAM_VADDR[31:11], 1);
    cpu_write(REG_CR, 32'h3);  // IE, START
    done = 0;
    while (!done) begin
      @(posedge clk);
      if (!wmu_int) begin
        // occasional status poll while the coprocessor runs
        if ($urandom_range(0, 199) == 0) cpu_read(REG_SR, sr);
        continue;
      end
      cpu_read(REG_SR, sr);
      if (sr[SR_MISS]) begin
        n_fault++;
        cpu_read(REG_AR, ar);
        vpn = ar[31:11];
        // a page freed by the parameter-page invalidation can be reused
        if (sr[SR_INV]) begin
          for (int i = 0; i < N_PAGES; i++) begin
            tlb_get(i, v, dty);
            if (frame_used[i] && !v) frame_used[i] = 0;
          end
          cpu_write(REG_SR, 32'(1) << SR_INV);
        end
        f = -1;
        for (int i = 0; i < N_PAGES; i++) if (f < 0 && !frame_used[i]) f = i;
        if (f < 0) begin
          f = victim;
          victim = (victim + 1) % N_PAGES;
          n_evict++;
          tlb_get(f, v, dty);
          tlb_set(f, '0, 0);
          if (dty) page_out(f);
        end
        page_in(f, vpn);
        frame_vpn[f] = vpn;
        frame_used[f] = 1;
        tlb_set(f, vpn, 1);
        cpu_write(REG_SR, 32'(1) << SR_MISS);
      end else if (sr[SR_FIN]) begin
        n_fin++;
        for (int i = 0; i < N_PAGES; i++) begin
          tlb_get(i, v, dty);
          if (frame_used[i] && v && dty) page_out(i);
        end
        cpu_write(REG_SR, 32'(1) << SR_FIN);
        done = 1;
      end
    end
  endtask

  task automatic run(int bytes, bit with_key, subkeys_t k);
    logic [31:0] prm [8];
    logic [63:0] blk, exp, got;
    int nb = bytes / 8;
    int errs = 0;
    for (int i = 0; i < nb; i++) begin
      blk = {$urandom, $urandom};
      umem[(A_BASE >> 2) + 2*i]     = blk[63:32];
      umem[(A_BASE >> 2) + 2*i + 1] = blk[31:0];
      umem[(B_BASE >> 2) + 2*i]     = 32'hA5A5_0000 ^ i;
      umem[(B_BASE >> 2) + 2*i + 1] = 32'h5A5A_0000 ^ i;
    end
    prm = '{default: '0};
    prm[0] = with_key ? 4 : 3;  prm[1] = 0;
    prm[2] = A_BASE;            prm[3] = bytes;
    prm[4] = B_BASE;            prm[5] = bytes;
    prm[6] = K_BASE;            prm[7] = 104;
    execute(prm, with_key ? 8 : 6);
    for (int i = 0; i < nb; i++) begin
      blk = {umem[(A_BASE >> 2) + 2*i], umem[(A_BASE >> 2) + 2*i + 1]};
      exp = ref_encrypt(k, blk);
      got = {uread(B_BASE + 8*i), uread(B_BASE + 8*i + 4)};
      checks++;
      if (got !== exp) begin
        failures++;
        if (errs++ < 5) $display("FAIL %0d bytes, block %0d: got %h expected %h", bytes, i, got, exp);
      end
    end
    $display("run of %0d bytes done at %0t: faults %0d evictions %0d write-backs %0d",
             bytes, $time, n_fault, n_evict, n_wb);
  endtask

  initial begin
    subkeys_t k;
    int sizes [4] = '{4096, 8192, 16384, 32768};
    repeat (4) @(posedge clk);
    rst_n = 1;
    k = ref_expand({$urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < 26; i++) umem[(K_BASE >> 2) + i] = {k[2*i], k[2*i+1]};
    foreach (sizes[s]) run(sizes[s], s == 0, k);
    // every mechanism must have happened
    checks++; if (n_fault == 0)   begin failures++; $display("FAIL no page fault"); end
    checks++; if (n_evict == 0)   begin failures++; $display("FAIL no eviction"); end
    checks++; if (n_wb == 0)      begin failures++; $display("FAIL no write-back"); end
    checks++; if (n_inv != 4)     begin failures++; $display("FAIL %0d invalidations", n_inv); end
    checks++; if (n_stall == 0)   begin failures++; $display("FAIL no stall"); end
    checks++; if (n_heldoff == 0) begin failures++; $display("FAIL no held-off processor access"); end
    checks++; if (n_lat == 0)     begin failures++; $display("FAIL no hit latency measured"); end
    checks++; if (n_fin != 4)     begin failures++; $display("FAIL %0d completions", n_fin); end
    $display("faults %0d evictions %0d write-backs %0d invalidations %0d stalls %0d held-off %0d hits-timed %0d",
             n_fault, n_evict, n_wb, n_inv, n_stall, n_heldoff, n_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
