// tb_feynman_gate: exhaustive self-checking test of the Feynman gate.
// Applies all four input pairs, compares P and Q with a reference truth
// table (Q is 1 exactly when the inputs differ) and checks that the four
// output pairs are all different, i.e. that the gate is one-to-one.
module tb_feynman_gate;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  bit [3:0] seen;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> p=%0b q=%0b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %0b%0b repeated: not one-to-one", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
