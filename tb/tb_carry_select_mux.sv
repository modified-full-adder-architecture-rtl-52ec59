// tb_carry_select_mux: self-check of the 12:6 carry-select multiplexer (the
// widest one in the adder) with random data words and both select values.
module tb_carry_select_mux;
  localparam int unsigned W = 6;
  logic [W-1:0] d0, d1, y;
  logic         sel;
  int checks = 0, failures = 0;

  carry_select_mux #(.W(W)) dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      d0  = W'($urandom);
      d1  = W'($urandom);
      sel = 1'(n);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%0b d0=%0h d1=%0h y=%0h", sel, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
