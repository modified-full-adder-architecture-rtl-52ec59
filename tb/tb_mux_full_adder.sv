// tb_mux_full_adder: exhaustive self-check of the carry-selected full adder.
// Every (a, b, ci) is applied and {co, s} is compared with the integer sum
// a + b + ci. A watchdog ends a hung run.
module tb_mux_full_adder;
  logic a, b, ci, s, co;
  int checks = 0, failures = 0;

  mux_full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int unsigned total;
      {ci, b, a} = 3'(v);
      total = int'(a) + int'(b) + int'(ci);
      #1;
      checks++;
      if ({co, s} !== 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b ci=%0b -> co=%0b s=%0b", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
