// Self-checking test of idea_ctrl, driving the real IDEA core. The
// testbench plays Init CTRL (start/params/fin) and Memory CTRL: every
// request is held with stall for a random number of cycles, then answered
// from a sparse memory (reads on x, writes taken from the core's y and
// req_sel). Checks the encrypted output against the reference model, the
// number of reads and writes per run, the key reload only with four param
// entries, a zero-length run, runs that end in a full or partial batch of
// four blocks, and the fin/start handshake.
module tb_idea_ctrl;
  import vmw_pkg::*;
  import idea_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce, stall;
  logic start = 0, fin;
  param_t params [MAX_PARAMS];
  logic rd_req, wr_req, req_sel, ld_key, ld_x, x_sel, go, core_busy, core_done;
  logic [31:0] req_addr, x;
  logic [4:0] key_idx;
  logic [1:0] x_slot, y_slot;
  logic [2:0] n_blk;
  logic [63:0] y;
  int checks = 0, failures = 0, cnt = 0;
  int n_rd = 0, n_wr = 0;

  idea_ctrl dut (.*);
  idea_core u_core (.clk, .rst_n, .ce, .stall, .x_in(x), .ld_key, .key_idx, .ld_x, .x_slot, .x_sel, .go, .n_blk, .y_slot,
                    .busy(core_busy), .done(core_done), .y);

  always #5 clk = ~clk;
  always @(posedge clk) cnt <= (cnt + 1) % 4;
  assign ce = (cnt == 3);

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory CTRL stand-in
  logic [31:0] mem [int unsigned];
  int wait_n = -1;
  logic served = 0;
  assign stall = (rd_req || wr_req) && !served;
  always @(posedge clk) begin
    if (served && ce) begin
      served <= 0;
      wait_n = -1;
    end else if ((rd_req || wr_req) && !served) begin
      if (wait_n < 0) wait_n = $urandom_range(0, 12);
      else if (wait_n == 0) begin
        served <= 1;
        if (rd_req) begin
          x <= mem.exists(req_addr >> 2) ? mem[req_addr >> 2] : 32'd0;
          n_rd++;
        end else begin
          mem[req_addr >> 2] = req_sel ? y[31:0] : y[63:32];
          n_wr++;
        end
      end else wait_n--;
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int nparams, int blocks, subkeys_t k);
    int r0, w0;
    logic [63:0] blk, got;
    for (int i = 0; i < blocks; i++) begin
      mem[(32'h1000 >> 2) + 2*i] = $urandom;
      mem[(32'h1000 >> 2) + 2*i + 1] = $urandom;
    end
    for (int i = 0; i < 26; i++) mem[(32'h3000 >> 2) + i] = {k[2*i], k[2*i+1]};
    params[0] = '{u: nparams, v: 0};
    params[1] = '{u: 32'h1000, v: 8 * blocks};
    params[2] = '{u: 32'h2000, v: 8 * blocks};
    params[3] = (nparams >= 4) ? '{u: 32'h3000, v: 104} : '{u: 0, v: 0};
    r0 = n_rd; w0 = n_wr;
    @(posedge clk); #1 start = 1;
    wait (fin);
    repeat (8) @(posedge clk);
    chk(fin, "fin held while start is high");
    #1 start = 0;
    repeat (8) @(posedge clk);
    chk(!fin, "fin dropped after start");
    chk(n_rd - r0 == 2 * blocks + (nparams >= 4 ? 26 : 0),
        $sformatf("%0d reads for %0d blocks, %0d entries", n_rd - r0, blocks, nparams));
    chk(n_wr - w0 == 2 * blocks, $sformatf("%0d writes", n_wr - w0));
    for (int i = 0; i < blocks; i++) begin
      blk = {mem[(32'h1000 >> 2) + 2*i], mem[(32'h1000 >> 2) + 2*i + 1]};
      got = {mem[(32'h2000 >> 2) + 2*i], mem[(32'h2000 >> 2) + 2*i + 1]};
      chk(got == ref_encrypt(k, blk), $sformatf("block %0d", i));
    end
  endtask

  initial begin
    subkeys_t k1, k2;
    foreach (params[i]) params[i] = '0;
    @(posedge clk); @(posedge clk); #1 rst_n = 1;
    k1 = ref_expand({$urandom, $urandom, $urandom, $urandom});
    k2 = ref_expand({$urandom, $urandom, $urandom, $urandom});
    run(4, 5, k1);
    run(3, 7, k1);   // subkeys kept from the previous run
    run(4, 3, k2);
    run(3, 0, k2);   // nothing to do
    run(4, 1, k1);
    run(3, 8, k1);   // two full batches
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
