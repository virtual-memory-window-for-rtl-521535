// IDEA Core: encrypts (or, with inverted subkeys, decrypts) up to four
// 64-bit blocks at a time.
//
// The IDEA round is cut into five pipeline stages:
//   stage 0  t1 = X1*K1   t4 = X4*K4   t2 = X2+K2   t3 = X3+K3
//   stage 1  t7 = (t1^t3)*K5
//   stage 2  t8 = (t2^t4)+t7
//   stage 3  t9 = t8*K6
//   stage 4  t10 = t7+t9; X1=t1^t9 X2=t3^t9 X3=t2^t10 X4=t4^t10
// and only two modulo-(2^16+1) multipliers and two 16-bit adders serve all
// of them. Stage 0 needs all four operators; stages 1 to 4 need one each
// (multiplier 0, adder 0, multiplier 1, adder 1). So the operators alternate:
// on even cycles stage 0 works, on odd cycles stages 1-4 all work at once.
// A block leaving stage 4 goes back to stage 0 for its next round; after the
// eighth round stage 0 applies the output transformation instead
// (Y = {X1*K49, X3+K50, X2+K51, X4*K52}, the same four operators) and the
// result goes to the output buffer. The loop stage0 -> 1 -> 2 -> 3 -> 4 holds
// up to four blocks; a new block enters stage 0 on an even cycle when no
// block is coming back from stage 4. A round takes 8 cycles per block and
// the operators are busy every cycle once four blocks are in flight.
//
// Latency from `go` to `done`, in enabled cycles: 65 for one block,
// 63 + 2*n for n blocks (71 for four, about 18 per block).
//
// The document gives the operator count (two multipliers and two adders,
// time-multiplexed in the round pipeline) and the five-stage depth of the
// round; the stage split, the even/odd sharing and the four-block loop are
// this design's.
//
// Interface (the Cin/Cout control of the coprocessor's block diagram):
//   ld_key   writes subkeys 2*key_idx (x_in[31:16]) and 2*key_idx+1
//   ld_x     writes half x_sel of input slot x_slot from x_in
//            (half 0: X1 = x_in[31:16], X2 = x_in[15:0]; half 1: X3, X4)
//   go       starts the n_blk blocks (1..4) of slots 0..n_blk-1
//   busy     high while they run; done high from the end until the next go
//   y        result of output slot y_slot, {Y1,Y2,Y3,Y4}
// The core belongs to the slow clock domain: it advances only when `ce` is
// high and `stall` low. Loads are accepted only while not busy. Reset is
// synchronous, active low.
module idea_core
  import vmw_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,
  input  logic        stall,
  input  logic [31:0] x_in,
  input  logic        ld_key,
  input  logic [4:0]  key_idx,
  input  logic        ld_x,
  input  logic [1:0]  x_slot,
  input  logic        x_sel,
  input  logic        go,
  input  logic [2:0]  n_blk,
  input  logic [1:0]  y_slot,
  output logic        busy,
  output logic        done,
  output logic [63:0] y
);
  localparam int unsigned SLOTS = 4;

  // one block travelling through the stages
  typedef struct packed {
    logic        v;
    logic [1:0]  slot;
    logic [2:0]  round;
    logic [15:0] a, b, c, d;       // t1,t2,t3,t4 (stages 0-3) or X1..X4 (stage 4)
    logic [15:0] t7, t8, t9;
  } item_t;

  // a block leaving stage 4: its round and the next round's input X1..X4
  typedef struct packed {
    logic        v;
    logic [1:0]  slot;
    logic [2:0]  round;
    logic [15:0] a, b, c, d;
  } back_t;

  logic en;
  assign en = ce && !stall;

  logic [15:0] key [IDEA_SUBKEYS];
  logic [63:0] in_buf  [SLOTS];
  logic [63:0] out_buf [SLOTS];
  item_t       r0, r1, r2, r3;
  back_t       r4;
  logic        odd;                // operators serve stages 1-4
  logic [2:0]  n_q, injected, finished;

  // shared operators
  logic [15:0] m0_a, m0_b, m0_r, m1_a, m1_b, m1_r;
  logic [15:0] a0_a, a0_b, a0_r, a1_a, a1_b, a1_r;

  idea_mul u_mul0 (.a(m0_a), .b(m0_b), .r(m0_r));
  idea_mul u_mul1 (.a(m1_a), .b(m1_b), .r(m1_r));
  assign a0_r = a0_a + a0_b;
  assign a1_r = a1_a + a1_b;

  // what stage 0 does on an even cycle
  logic        s0_back, s0_ot, s0_new;
  logic [15:0] s0_x1, s0_x2, s0_x3, s0_x4;
  logic [2:0]  s0_round;
  logic [1:0]  s0_slot;
  logic [5:0]  k0;

  always_comb begin
    s0_back = r4.v;
    s0_ot   = r4.v && r4.round == 3'(IDEA_ROUNDS - 1);
    s0_new  = !r4.v && injected != n_q;
    if (s0_back) begin
      {s0_x1, s0_x2, s0_x3, s0_x4} = {r4.a, r4.b, r4.c, r4.d};
      s0_round = r4.round + 3'd1;
      s0_slot  = r4.slot;
    end else begin
      {s0_x1, s0_x2, s0_x3, s0_x4} = in_buf[injected[1:0]];
      s0_round = '0;
      s0_slot  = injected[1:0];
    end
    k0 = 6'(s0_round) * 6'd6;
  end

  logic [5:0] k1, k3;
  assign k1 = 6'(r0.round) * 6'd6 + 6'd4;
  assign k3 = 6'(r2.round) * 6'd6 + 6'd5;

  always_comb begin
    if (!odd) begin
      if (s0_ot) begin
        m0_a = s0_x1; m0_b = key[48];
        m1_a = s0_x4; m1_b = key[51];
        a0_a = s0_x3; a0_b = key[49];
        a1_a = s0_x2; a1_b = key[50];
      end else begin
        m0_a = s0_x1; m0_b = key[k0];
        m1_a = s0_x4; m1_b = key[k0 + 6'd3];
        a0_a = s0_x2; a0_b = key[k0 + 6'd1];
        a1_a = s0_x3; a1_b = key[k0 + 6'd2];
      end
    end else begin
      m0_a = r0.a ^ r0.c; m0_b = key[k1];     // stage 1
      a0_a = r1.b ^ r1.d; a0_b = r1.t7;       // stage 2
      m1_a = r2.t8;       m1_b = key[k3];     // stage 3
      a1_a = r3.t7;       a1_b = r3.t9;       // stage 4
    end
  end

  assign y = out_buf[y_slot];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      odd      <= 1'b0;
      n_q      <= '0;
      injected <= '0;
      finished <= '0;
      r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0;
      for (int i = 0; i < IDEA_SUBKEYS; i++) key[i] <= '0;
      for (int i = 0; i < SLOTS; i++) begin
        in_buf[i]  <= '0;
        out_buf[i] <= '0;
      end
    end else if (en) begin
      if (ld_key) begin
        key[{key_idx, 1'b0}] <= x_in[31:16];
        key[{key_idx, 1'b1}] <= x_in[15:0];
      end
      if (!busy) begin
        if (ld_x) begin
          if (!x_sel) in_buf[x_slot][63:32] <= x_in;
          else        in_buf[x_slot][31:0]  <= x_in;
        end
        if (go) begin
          busy     <= 1'b1;
          done     <= 1'b0;
          odd      <= 1'b0;
          n_q      <= (n_blk > 3'(SLOTS)) ? 3'(SLOTS) : n_blk;
          injected <= '0;
          finished <= '0;
          r0 <= '0; r1 <= '0; r2 <= '0; r3 <= '0; r4 <= '0;
        end
      end else begin
        odd <= !odd;
        if (!odd) begin
          // stage 0: next round, output transformation, or a new block
          r0 <= '0;
          if (s0_ot) begin
            out_buf[s0_slot] <= {m0_r, a0_r, a1_r, m1_r};
            finished <= finished + 3'd1;
            if (finished + 3'd1 == n_q) begin
              busy <= 1'b0;
              done <= 1'b1;
            end
          end else if (s0_back || s0_new) begin
            r0.v     <= 1'b1;
            r0.slot  <= s0_slot;
            r0.round <= s0_round;
            r0.a <= m0_r; r0.b <= a0_r; r0.c <= a1_r; r0.d <= m1_r;
            if (s0_new) injected <= injected + 3'd1;
          end
          r4.v <= 1'b0;   // consumed (or empty)
        end else begin
          // stages 1-4 advance together
          r1    <= r0;
          r1.t7 <= m0_r;
          r2    <= r1;
          r2.t8 <= a0_r;
          r3    <= r2;
          r3.t9 <= m1_r;
          r4.v     <= r3.v;
          r4.slot  <= r3.slot;
          r4.round <= r3.round;
          r4.a  <= r3.a ^ r3.t9;
          r4.b  <= r3.c ^ r3.t9;
          r4.c  <= r3.b ^ a1_r;
          r4.d  <= r3.d ^ a1_r;
        end
      end
    end
  end
endmodule
