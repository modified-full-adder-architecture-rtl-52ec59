// tb_csla_group: exhaustive self-check of the carry-select group at every
// width the adder uses (2, 3, 4 and 5 bits). For each width, every a, b and
// carry in is applied and {cout, s} is compared with a + b + cin. It also
// counts the cases where the converter path matters most: carry in 1 with
// an all-ones carry-in-0 sum, so the +1 ripples through the whole group
// into the carry out.
module tb_csla_group;
  logic [1:0] a2, b2, s2;
  logic [2:0] a3, b3, s3;
  logic [3:0] a4, b4, s4;
  logic [4:0] a5, b5, s5;
  logic       cin;
  logic       c2, c3, c4, c5;
  int checks = 0, failures = 0, full_ripple = 0;

  csla_group #(.W(2)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(c2));
  csla_group #(.W(3)) dut3 (.a(a3), .b(b3), .cin(cin), .s(s3), .cout(c3));
  csla_group #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .s(s4), .cout(c4));
  csla_group #(.W(5)) dut5 (.a(a5), .b(b5), .cin(cin), .s(s5), .cout(c5));

  task automatic check(input int unsigned w, input int unsigned a, input int unsigned b,
                       input logic ci, input int unsigned got);
    int unsigned expect_sum = a + b + int'(ci);
    checks++;
    if (got != expect_sum) begin
      failures++;
      $display("FAIL W=%0d a=%0d b=%0d cin=%0b got=%0d expected=%0d", w, a, b, ci, got, expect_sum);
    end
    if (ci && (a + b == (1 << w) - 1)) full_ripple++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 11); v++) begin
      {cin, b5, a5} = 11'(v);
      {b4, a4}      = {b5[3:0], a5[3:0]};
      {b3, a3}      = {b5[2:0], a5[2:0]};
      {b2, a2}      = {b5[1:0], a5[1:0]};
      #1;
      check(5, int'(a5), int'(b5), cin, int'({c5, s5}));
      if (b5[4] == 1'b0 && a5[4] == 1'b0) check(4, int'(a4), int'(b4), cin, int'({c4, s4}));
      if (b5[4:3] == 2'b00 && a5[4:3] == 2'b00) check(3, int'(a3), int'(b3), cin, int'({c3, s3}));
      if (b5[4:2] == 3'b000 && a5[4:2] == 3'b000) check(2, int'(a2), int'(b2), cin, int'({c2, s2}));
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no full-ripple case was applied");
    end
    $display("full-ripple cases: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
