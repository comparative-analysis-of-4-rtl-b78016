// tb_dkg_gate: exhaustive self-checking test of the DKG gate.
// Reference: Q selects Z (X = 0) or T (X = 1); S is the parity of Y, Z, T;
// R is, for X = 0, the carry of Y + Z + T and, for X = 1, the borrow of
// Y - Z - T, both computed as integers. P passes Y.
module tb_dkg_gate;
  logic x, y, z, t, p, q, r, s;
  int checks = 0, failures = 0;
  int tot;
  logic er;

  dkg_gate dut (.x(x), .y(y), .z(z), .t(t), .p(p), .q(q), .r(r), .s(s));

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
      if (!x) begin
        tot = int'(y) + int'(z) + int'(t);
        er  = (tot >= 2);
      end else begin
        tot = int'(y) - int'(z) - int'(t);
        er  = (tot < 0);
      end
      checks++;
      if (p !== y || q !== (x ? t : z) || r !== er ||
          s !== ((int'(y) + int'(z) + int'(t)) % 2 == 1)) begin
        failures++;
        $display("FAIL xyzt=%0b%0b%0b%0b -> pqrs=%0b%0b%0b%0b", x, y, z, t, p, q, r, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
