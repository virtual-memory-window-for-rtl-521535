// Init CTRL: start-up and completion unit of the IDEA coprocessor.
//
// On cp_start it takes the WMU interface (init_sel high) and reads the
// param array from the parameter-passing page at the fixed virtual address
// PARAM_VADDR. Each entry is two 32-bit words {u, v}: entry 0 holds the
// number of entries (u, entry 0 included) and flags (v); each further entry
// holds a pointer and a size in bytes. It reads word 0 first, then the
// remaining 2*n-1 words, n being the entry count clamped to 1..MAX_PARAMS.
// It then pulses cp_inv for one cycle (the WMU invalidates the parameter
// page), hands the bus back (init_sel low) and raises `start` for IDEA CTRL
// with the entries on `params`. When IDEA CTRL raises `fin`, it drops
// `start` and pulses cp_fin to the WMU.
// Each read is one access: cp_access with cp_vaddr held until cp_tlbhit,
// data sampled from cp_din with cp_tlbhit; consecutive reads keep
// cp_access high and change the address after the hit.
// The parameter-passing protocol follows the document; the fixed page
// address, the word layout of an entry and the start/fin handshake
// (start held until fin) are this design's choices. Fast clock domain,
// synchronous active-low reset.
module init_ctrl
  import vmw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // WMU side
  input  logic               cp_start,
  output logic               cp_access,
  output logic               cp_wr,
  output logic [VADDR_W-1:0] cp_vaddr,
  input  logic [DATA_W-1:0]  cp_din,
  input  logic               cp_tlbhit,
  output logic               cp_inv,
  output logic               cp_fin,
  output logic               init_sel,
  // IDEA CTRL side
  output logic               start,
  output param_t             params [MAX_PARAMS],
  input  logic               fin
);
  typedef enum logic [1:0] {IC_IDLE, IC_READ, IC_INV, IC_RUN} ic_state_e;
  localparam int unsigned WIDX_W = $clog2(2 * MAX_PARAMS);

  ic_state_e         state;
  logic [WIDX_W-1:0] widx;      // word being read
  logic [WIDX_W:0]   nwords;    // words to read

  logic [DATA_W-1:0] cnt;
  logic [WIDX_W:0]   n_eff;
  always_comb begin
    cnt = cp_din;
    if (cnt == 0)               n_eff = (WIDX_W+1)'(2);
    else if (cnt >= MAX_PARAMS) n_eff = (WIDX_W+1)'(2 * MAX_PARAMS);
    else                        n_eff = (WIDX_W+1)'(2 * cnt);
  end

  assign cp_access = (state == IC_READ);
  assign cp_wr     = 1'b0;
  assign cp_vaddr  = PARAM_VADDR + VADDR_W'({widx, 2'b00});
  assign init_sel  = (state == IC_READ || state == IC_INV);
  assign cp_inv    = (state == IC_INV);
  assign start     = (state == IC_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IC_IDLE;
      widx   <= '0;
      nwords <= '0;
      cp_fin <= 1'b0;
      for (int i = 0; i < MAX_PARAMS; i++) params[i] <= '0;
    end else begin
      cp_fin <= 1'b0;
      unique case (state)
        IC_IDLE:
          if (cp_start) begin
            state <= IC_READ;
            widx  <= '0;
            for (int i = 0; i < MAX_PARAMS; i++) params[i] <= '0;
          end
        IC_READ:
          if (cp_tlbhit) begin
            if (widx[0]) params[widx[WIDX_W-1:1]].v <= cp_din;
            else         params[widx[WIDX_W-1:1]].u <= cp_din;
            if (widx == 0) nwords <= n_eff;
            if (widx != 0 && (WIDX_W+1)'(widx) + 1'b1 == nwords)
              state <= IC_INV;
            else
              widx <= widx + 1'b1;
          end
        IC_INV: state <= IC_RUN;
        IC_RUN:
          if (fin) begin
            state  <= IC_IDLE;
            cp_fin <= 1'b1;
          end
        default: state <= IC_IDLE;
      endcase
    end
  end
endmodule
