// tb_bme_gate: exhaustive self-checking test of the BME gate.
// Reference for each output: Z decides whether the logic value is inverted;
// Q is 1 when X and Y are both 1, R when X and T are both 1, and S is the
// parity of (Y and not X), Z and T. Also checks the uses the ALU relies
// on: with T = X, R = X xor Z and S = (X OR Y) xor Z.
// The published equations leave the gate many-to-one when X = 0 (Q = R = Z),
// so one-to-one is not checked here; the ALU slice test checks it for the
// way the gate is wired there.
module tb_bme_gate;
  logic x, y, z, t, p, q, r, s;
  int checks = 0, failures = 0;
  logic eq, er, es;

  bme_gate dut (.x(x), .y(y), .z(z), .t(t), .p(p), .q(q), .r(r), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, y, z, t} = 4'(v);
      #1;
      eq = (x == 1'b1 && y == 1'b1) ? ~z : z;
      er = (x == 1'b1 && t == 1'b1) ? ~z : z;
      es = ((((x == 1'b0 && y == 1'b1) ? 1 : 0) + int'(z) + int'(t)) % 2) == 1;
      checks++;
      if (p !== x || q !== eq || r !== er || s !== es) begin
        failures++;
        $display("FAIL xyzt=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", x, y, z, t, p, q, r, s);
      end
      if (t == x) begin
        checks++;
        if (r !== (x ^ z) || s !== ((x | y) ^ z)) begin
          failures++;
          $display("FAIL logic-unit use xyz=%0b%0b%0b: r=%0b s=%0b", x, y, z, r, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
