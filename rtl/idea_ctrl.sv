// IDEA CTRL: controller of the IDEA core.
//
// Started by Init CTRL (`start`, with the param array on `params`), it
//   1. if the array has a fourth entry, reads the 52 subkeys it points to
//      (26 words, two 16-bit subkeys per word, high half first) into the
//      core; otherwise the subkeys loaded by an earlier run are kept;
//   2. takes the 64-bit blocks of the input object (entry 1: pointer, size
//      in bytes; size/8 blocks) in batches of up to four: reads the batch's
//      words into the core's input slots, runs the core on the batch, and
//      writes the result words to the output object (entry 2);
//   3. raises `fin` and holds it until Init CTRL drops `start`.
// A 64-bit block is the word at the lower address (X1 in bits 31:16, X2 in
// 15:0) followed by the next word (X3, X4).
// Memory requests go to Memory CTRL as rd_req/wr_req with req_addr and
// req_sel, held until `stall` is low at an enabled edge. The core controls
// (ld_key, ld_x, go: the Cin bundle) are driven without a register so that
// the core loads the word Memory CTRL returns at the edge the request
// completes. The controller belongs to the slow clock domain: it advances
// only at edges where `ce` is high and `stall` low.
// The document gives the role of the block (it controls the core and issues
// rd_req/wr_req, it gets params and start, it returns fin); where the
// subkeys come from is not stated, and the key entry, word layout and
// sequencing here are this design's choices; batches of four fill the
// core's four-block round loop. Synchronous active-low reset.
module idea_ctrl
  import vmw_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ce,
  input  logic               stall,
  // Init CTRL
  input  logic               start,
  input  param_t             params [MAX_PARAMS],
  output logic               fin,
  // Memory CTRL
  output logic               rd_req,
  output logic               wr_req,
  output logic [VADDR_W-1:0] req_addr,
  output logic               req_sel,
  // IDEA core (Cin / Cout)
  output logic               ld_key,
  output logic [4:0]         key_idx,
  output logic               ld_x,
  output logic [1:0]         x_slot,
  output logic               x_sel,
  output logic               go,
  output logic [2:0]         n_blk,
  output logic [1:0]         y_slot,
  input  logic               core_busy,
  input  logic               core_done
);
  typedef enum logic [2:0] {
    IK_IDLE, IK_KEY, IK_RDX, IK_GO, IK_COMP, IK_WR, IK_DONE
  } ik_state_e;

  ik_state_e         state;
  logic              en, served;
  logic [4:0]        kcnt;
  logic              half;               // word of the block: 0 or 1
  logic [1:0]        slot;               // block within the batch
  logic [2:0]        nb;                 // blocks in the batch (1..4)
  logic [DATA_W-1:0] blk, nblk;          // first block of the batch, number of blocks
  logic [DATA_W-1:0] cur;                // block being transferred
  logic [DATA_W-1:0] blk_nx;             // first block of the next batch
  logic [VADDR_W-1:0] in_ptr, out_ptr, key_ptr;

  assign en     = ce && !stall;
  assign served = en && (rd_req || wr_req);

  assign ld_key  = (state == IK_KEY) && served;
  assign key_idx = kcnt;
  assign ld_x    = (state == IK_RDX) && served;
  assign x_slot  = slot;
  assign x_sel   = half;
  assign go      = (state == IK_GO);
  assign n_blk   = nb;
  assign y_slot  = slot;
  assign cur     = blk + DATA_W'(slot);
  assign blk_nx  = blk + DATA_W'(nb);

  // size of a batch starting with `remaining` blocks left
  function automatic logic [2:0] batch(input logic [DATA_W-1:0] remaining);
    return (remaining >= 4) ? 3'd4 : remaining[2:0];
  endfunction
  assign fin     = (state == IK_DONE);
  assign req_sel = half;

  always_comb begin
    unique case (state)
      IK_KEY:  req_addr = key_ptr + VADDR_W'({kcnt, 2'b00});
      IK_RDX:  req_addr = in_ptr  + VADDR_W'({cur, half, 2'b00});
      IK_WR:   req_addr = out_ptr + VADDR_W'({cur, half, 2'b00});
      default: req_addr = '0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= IK_IDLE;
      rd_req  <= 1'b0;
      wr_req  <= 1'b0;
      kcnt    <= '0;
      half    <= 1'b0;
      slot    <= '0;
      nb      <= '0;
      blk     <= '0;
      nblk    <= '0;
      in_ptr  <= '0;
      out_ptr <= '0;
      key_ptr <= '0;
    end else if (en) begin
      unique case (state)
        IK_IDLE:
          if (start) begin
            in_ptr  <= params[1].u;
            out_ptr <= params[2].u;
            key_ptr <= params[3].u;
            nblk    <= DATA_W'(params[1].v >> 3);
            blk     <= '0;
            half    <= 1'b0;
            slot    <= '0;
            nb      <= batch(DATA_W'(params[1].v >> 3));
            kcnt    <= '0;
            if (params[0].u >= 4) begin
              state  <= IK_KEY;
              rd_req <= 1'b1;
            end else if ((params[1].v >> 3) != 0) begin
              state  <= IK_RDX;
              rd_req <= 1'b1;
            end else begin
              state  <= IK_DONE;
            end
          end
        IK_KEY:
          if (served) begin
            if (kcnt == 5'(IDEA_SUBKEYS / 2 - 1)) begin
              if (nblk != 0) state <= IK_RDX;
              else begin state <= IK_DONE; rd_req <= 1'b0; end
            end else begin
              kcnt <= kcnt + 5'd1;
            end
          end
        IK_RDX:
          if (served) begin
            half <= !half;
            if (half) begin
              if (3'(slot) + 3'd1 == nb) begin
                rd_req <= 1'b0;
                slot   <= '0;
                state  <= IK_GO;
              end else begin
                slot <= slot + 2'd1;
              end
            end
          end
        IK_GO:   state <= IK_COMP;
        IK_COMP:
          if (!core_busy && core_done) begin
            state  <= IK_WR;
            wr_req <= 1'b1;
          end
        IK_WR:
          if (served) begin
            half <= !half;
            if (half) begin
              if (3'(slot) + 3'd1 != nb) begin
                slot <= slot + 2'd1;
              end else begin
                slot   <= '0;
                blk    <= blk_nx;
                nb     <= batch(nblk - blk_nx);
                wr_req <= 1'b0;
                if (blk_nx == nblk) begin
                  state  <= IK_DONE;
                end else begin
                  rd_req <= 1'b1;
                  state  <= IK_RDX;
                end
              end
            end
          end
        IK_DONE:
          if (!start) state <= IK_IDLE;
        default: state <= IK_IDLE;
      endcase
    end
  end
endmodule
