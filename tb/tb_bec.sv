// tb_bec: exhaustive self-check of the binary-to-excess-1 converter at the
// smallest and largest widths used in the adder (3 and 6 bits) and at 4
// bits. Every input word is applied and x is compared with (b + 1) mod 2^W;
// the all-ones word, which wraps to zero, is counted separately and must
// have been seen.
module tb_bec;
  logic [2:0] b3, x3;
  logic [3:0] b4, x4;
  logic [5:0] b6, x6;
  int checks = 0, failures = 0, wraps = 0;

  bec #(.W(3)) dut3 (.b(b3), .x(x3));
  bec #(.W(4)) dut4 (.b(b4), .x(x4));
  bec #(.W(6)) dut6 (.b(b6), .x(x6));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      b3 = 3'(v);
      b4 = 4'(v);
      b6 = 6'(v);
      #1;
      if (v < 8) begin
        checks++;
        if (x3 !== 3'(v + 1)) begin failures++; $display("FAIL W=3 b=%0d x=%0d", b3, x3); end
        if (v == 7) wraps++;
      end
      if (v < 16) begin
        checks++;
        if (x4 !== 4'(v + 1)) begin failures++; $display("FAIL W=4 b=%0d x=%0d", b4, x4); end
        if (v == 15) wraps++;
      end
      checks++;
      if (x6 !== 6'(v + 1)) begin failures++; $display("FAIL W=6 b=%0d x=%0d", b6, x6); end
      if (v == 63) wraps++;
    end
    checks++;
    if (wraps != 3) begin failures++; $display("FAIL wrap cases seen: %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
