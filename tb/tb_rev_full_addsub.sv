// tb_rev_full_addsub: exhaustive self-checking test of the one-bit
// reversible full adder/subtractor.
// Reference, computed with integers: for ctrl = 0, A + B + Cin = 2*cb + sd;
// for ctrl = 1, A - B - Cin = sd - 2*cb. Also checks that the five outputs
// (sd, cb and three garbage lines) are distinct over the 16 inputs, i.e.
// the circuit with its 0 ancilla is one-to-one.
module tb_rev_full_addsub;
  logic ctrl, a, b, cin, sd, cb;
  logic [2:0] g;
  int checks = 0, failures = 0;
  bit [31:0] seen;
  int res;

  rev_full_addsub dut (.ctrl(ctrl), .a(a), .b(b), .cin(cin), .sd(sd), .cb(cb), .g(g));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {ctrl, a, b, cin} = 4'(v);
      #1;
      if (!ctrl) res = int'(a) + int'(b) + int'(cin);
      else       res = int'(a) - int'(b) - int'(cin);
      checks++;
      if (( ctrl && (int'(sd) - 2 * int'(cb) != res)) ||
          (!ctrl && (int'(sd) + 2 * int'(cb) != res))) begin
        failures++;
        $display("FAIL ctrl=%0b a=%0b b=%0b cin=%0b -> sd=%0b cb=%0b", ctrl, a, b, cin, sd, cb);
      end
      checks++;
      if (seen[{sd, cb, g}]) begin
        failures++;
        $display("FAIL output repeated: not one-to-one");
      end
      seen[{sd, cb, g}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
