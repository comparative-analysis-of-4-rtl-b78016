// tb_peres_gate: exhaustive self-checking test of the Peres gate.
// Reference: with A and B added as integers, Q is the low bit of A + B and
// R is its carry bit inverted by C. Also checks that the gate is one-to-one.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;
  int sum;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

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
      sum = int'(a) + int'(b);
      checks++;
      if (p !== a || q !== sum[0] || r !== (sum[1] != c)) begin
        failures++;
        $display("FAIL abc=%0b%0b%0b -> pqr=%0b%0b%0b", a, b, c, p, q, r);
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
