// tb_sqrt_csla16: end-to-end self-check of the 16-bit square-root
// carry-select adder at its only (published) size.
//
// Applies directed corner cases, then vectors built to make the carry
// ripple through each group, then uniformly random operands. Each result
// {cout, sum} is compared with the integer a + b + cin, and each carry
// between groups is compared with the carry of the low part of the
// operands. For every carry-select group it counts how often the group's
// multiplexer picked the carry-in-0 result (incoming carry 0), the
// converter result (incoming carry 1), and the full-ripple case (carry 1
// into an all-ones carry-in-0 sum, so the converter's +1 reaches the
// group's carry out). Every one of these must happen at least once, as must
// a full 16-bit ripple from cin to cout.
module tb_sqrt_csla16;
  import csla_pkg::*;

  localparam int unsigned N_RANDOM = 200000;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int checks = 0, failures = 0;
  int sel0 [NUM_GROUPS];
  int sel1 [NUM_GROUPS];
  int ripple [NUM_GROUPS];
  int full_chain = 0;

  sqrt_csla16 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Carry into bit position pos of a + b + ci.
  function automatic logic carry_at(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y,
                                    input logic ci, input int unsigned pos);
    longint unsigned mask = (64'd1 << pos) - 1;
    return 1'(((longint'(x) & mask) + (longint'(y) & mask) + longint'(ci)) >> pos);
  endfunction

  task automatic apply(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y, input logic ci);
    longint unsigned expect_sum;
    a = x; b = y; cin = ci;
    #1;
    expect_sum = longint'(x) + longint'(y) + longint'(ci);
    checks++;
    if ({cout, sum} !== (WIDTH + 1)'(expect_sum)) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b -> cout=%0b sum=%h, expected %h",
               x, y, ci, cout, sum, expect_sum);
    end
    for (int unsigned g = 1; g < NUM_GROUPS; g++) begin
      int unsigned lsb = group_lsb(g);
      int unsigned w   = GROUP_W[g];
      logic        cg  = carry_at(x, y, ci, lsb);
      longint unsigned slice = ((longint'(x) >> lsb) & ((64'd1 << w) - 1))
                             + ((longint'(y) >> lsb) & ((64'd1 << w) - 1));
      checks++;
      if (dut.c[g] !== cg) begin
        failures++;
        $display("FAIL carry into group %0d: got %0b expected %0b (a=%h b=%h cin=%0b)",
                 g, dut.c[g], cg, x, y, ci);
      end
      if (cg) sel1[g]++; else sel0[g]++;
      if (cg && slice == (64'd1 << w) - 1) ripple[g]++;
    end
    if (ci && expect_sum == (64'd1 << WIDTH)) full_chain++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < NUM_GROUPS; g++) begin
      sel0[g] = 0; sel1[g] = 0; ripple[g] = 0;
    end

    // Directed corners.
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);               // ripple from cin to cout
    apply('1, '1, 1'b0);
    apply('1, '1, 1'b1);
    apply(16'h5555, 16'hAAAA, 1'b1);
    apply(16'h8000, 16'h8000, 1'b0);

    // For each group: carry 1 into it and an all-ones slice sum, with
    // random bits above it.
    for (int unsigned g = 1; g < NUM_GROUPS; g++) begin
      for (int n = 0; n < 50; n++) begin
        automatic int unsigned lsb = group_lsb(g);
        automatic int unsigned w   = GROUP_W[g];
        logic [WIDTH-1:0] x, y, ones;
        ones = WIDTH'(((1 << w) - 1) << lsb);
        x = WIDTH'($urandom);
        y = (~x & ones) | (WIDTH'($urandom) & ~ones);
        // Force a carry into the group through the bit below it.
        x[lsb-1] = 1'b1;
        y[lsb-1] = 1'b1;
        apply(x, y, 1'($urandom));
      end
    end

    // Random operands.
    for (int n = 0; n < N_RANDOM; n++)
      apply(WIDTH'($urandom), WIDTH'($urandom), 1'($urandom));

    for (int unsigned g = 1; g < NUM_GROUPS; g++) begin
      $display("group %0d: carry-in-0 picks %0d, converter picks %0d, full ripples %0d",
               g, sel0[g], sel1[g], ripple[g]);
      checks += 3;
      if (sel0[g] == 0)   begin failures++; $display("FAIL group %0d never selected carry-in-0", g); end
      if (sel1[g] == 0)   begin failures++; $display("FAIL group %0d never selected the converter", g); end
      if (ripple[g] == 0) begin failures++; $display("FAIL group %0d never rippled fully", g); end
    end
    $display("full 16-bit ripples: %0d", full_chain);
    checks++;
    if (full_chain == 0) begin failures++; $display("FAIL no full 16-bit ripple"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
