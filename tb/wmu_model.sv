// Behavioural model of the coprocessor side of a WMU, for the coprocessor
// unit tests: a sparse virtual memory answering each cp_access. With
// MIN_ONLY set every access is acknowledged on the fourth edge after
// cp_access rose (the translation time without a fault); otherwise a
// quarter of the accesses wait 10 to 40 extra cycles, as if a page fault
// were being served. Reads return the stored word (or 0), writes store
// cp_dout. Counts accesses and slow ones. Not synthesizable logic.
module wmu_model #(
  parameter bit MIN_ONLY = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] cp_vaddr,
  output logic [31:0] cp_din,
  input  logic [31:0] cp_dout,
  input  logic        cp_access,
  input  logic        cp_wr,
  output logic        cp_tlbhit
);
  logic [31:0] mem [int unsigned];
  int busy = 0, wait_n = 0;
  int n_access = 0, n_slow = 0;

  initial begin cp_tlbhit = 0; cp_din = 0; end

  always @(posedge clk) begin
    cp_tlbhit <= 1'b0;
    if (!rst_n) begin
      busy = 0;
    end else if (busy == 0) begin
      if (cp_access && !cp_tlbhit) begin
        busy = 1;
        wait_n = 2;
        if (!MIN_ONLY && $urandom_range(0, 3) == 0) begin
          wait_n += $urandom_range(10, 40);
          n_slow++;
        end
      end
    end else if (wait_n > 0) begin
      wait_n--;
    end else begin
      busy = 0;
      n_access++;
      cp_tlbhit <= 1'b1;
      if (cp_wr) mem[cp_vaddr >> 2] = cp_dout;
      cp_din <= mem.exists(cp_vaddr >> 2) ? mem[cp_vaddr >> 2] : 32'd0;
    end
  end
endmodule
