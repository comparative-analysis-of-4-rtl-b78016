// tb_fredkin_gate: exhaustive self-checking test of the Fredkin gate.
// For each of the eight inputs the reference is a controlled swap: with the
// control low B and C pass straight, with it high they are exchanged. Also
// checks that all eight outputs differ (the gate is one-to-one) and that the
// ones count is preserved (a swap never creates or destroys a 1).
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  logic exp_q, exp_r;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      if (a) begin exp_q = c; exp_r = b; end
      else   begin exp_q = b; exp_r = c; end
      checks++;
      if (p !== a || q !== exp_q || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b -> pqr=%0b%0b%0b", a, b, c, p, q, r);
      end
      checks++;
      if (int'(p) + int'(q) + int'(r) != int'(a) + int'(b) + int'(c)) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b: ones count changed", a, b, c);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %0b%0b%0b repeated: not one-to-one", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
