// tb_ripple_carry_adder: exhaustive self-check of both ripple-carry adder
// variants. A 5-bit adder with a carry in (full adder cells only) is checked
// for every a, b, cin against a + b + cin. A 4-bit adder with constant carry
// in 0 (half adder at bit 0) is checked for every a, b against a + b while
// its unused cin port is driven randomly, which must not matter.
module tb_ripple_carry_adder;
  localparam int unsigned WC = 5;
  localparam int unsigned WZ = 4;

  logic [WC-1:0] ac, bc, sc;
  logic          cinc, coutc;
  logic [WZ-1:0] az, bz, sz;
  logic          cinz, coutz;
  int checks = 0, failures = 0;

  ripple_carry_adder #(.W(WC), .HAS_CIN(1'b1)) dut_cin (
    .a(ac), .b(bc), .cin(cinc), .s(sc), .cout(coutc)
  );
  ripple_carry_adder #(.W(WZ), .HAS_CIN(1'b0)) dut_zero (
    .a(az), .b(bz), .cin(cinz), .s(sz), .cout(coutz)
  );

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*WC + 1)); v++) begin
      int unsigned expect_sum;
      {cinc, bc, ac} = (2*WC + 1)'(v);
      expect_sum = int'(ac) + int'(bc) + int'(cinc);
      #1;
      checks++;
      if ({coutc, sc} !== (WC + 1)'(expect_sum)) begin
        failures++;
        $display("FAIL cin-variant a=%0d b=%0d cin=%0b -> %0d", ac, bc, cinc, {coutc, sc});
      end
    end
    for (int v = 0; v < (1 << (2*WZ)); v++) begin
      int unsigned expect_sum;
      {bz, az} = (2*WZ)'(v);
      cinz = 1'($urandom);
      expect_sum = int'(az) + int'(bz);
      #1;
      checks++;
      if ({coutz, sz} !== (WZ + 1)'(expect_sum)) begin
        failures++;
        $display("FAIL zero-variant a=%0d b=%0d -> %0d", az, bz, {coutz, sz});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
