// Self-checking test of idea_mul: corner cases (0 standing for 2^16, 1,
// 0xFFFF) and random operands against a modulo-65537 reference.
module tb_idea_mul;
  import idea_ref_pkg::*;
  logic [15:0] a, b, r;
  int checks = 0, failures = 0;

  idea_mul dut (.a(a), .b(b), .r(r));

  task automatic check(logic [15:0] ta, logic [15:0] tb_);
    logic [15:0] exp;
    a = ta; b = tb_;
    #1;
    exp = ref_mul(ta, tb_);
    checks++;
    if (r !== exp) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", ta, tb_, r, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] c [6] = '{16'h0000, 16'h0001, 16'h0002, 16'h8000, 16'hFFFF, 16'h1234};
    foreach (c[i]) foreach (c[j]) check(c[i], c[j]);
    repeat (5000) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
