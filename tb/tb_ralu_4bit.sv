// tb_ralu_4bit: the 4-bit configuration of the reversible ALU.
// Applies every combination of the 4-bit operands, carry/borrow in and all
// 32 codes of the five select lines (16,384 cases). Checks the result and,
// in the arithmetic codes, the carry/borrow out against an integer
// reference, and checks that the ALU as a whole is one-to-one: no two input
// combinations give the same result, carry out and garbage outputs.
module tb_ralu_4bit;
  import ralu_pkg::*;

  localparam int W = 4;

  logic [W-1:0] a, b, f;
  logic cin, cout;
  logic [SEL_W-1:0] sel;
  logic [W-1:0][SLICE_GARBAGE_W-1:0] garbage;
  int checks = 0, failures = 0;
  int n_arith = 0, n_logic = 0, n_carry = 0, n_borrow = 0;
  bit seen [bit [W*SLICE_GARBAGE_W+W:0]];
  logic [W-1:0] exp_f, lv;
  logic exp_c;
  int res;

  ralu #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sel(sel), .f(f), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2 * W + 1 + SEL_W)); v++) begin
      {sel, cin, a, b} = (2 * W + 1 + SEL_W)'(v);
      #1;
      exp_c = 1'b0;
      if (sel[4:2] == 3'b000) begin
        n_arith++;
        if (sel[0]) begin
          res   = int'(a) - int'(b) - int'(cin);
          exp_c = res < 0;
          if (exp_c) n_borrow++;
        end else begin
          res   = int'(a) + int'(b) + int'(cin);
          exp_c = res >= (1 << W);
          if (exp_c) n_carry++;
        end
        exp_f = W'(res);
      end else begin
        n_logic++;
        if (sel[4]) lv = a ^ b;
        else if (sel[3:2] == 2'b01) lv = a;
        else if (sel[3:2] == 2'b10) lv = a & b;
        else lv = a | b;
        exp_f = sel[1] ? ~lv : lv;
      end
      checks++;
      if (f !== exp_f || (sel[4:2] == 3'b000 && cout !== exp_c)) begin
        failures++;
        if (failures < 10)
          $display("FAIL sel=%05b a=%0d b=%0d cin=%0b: f=%0d cout=%0b expected f=%0d cout=%0b",
                   sel, a, b, cin, f, cout, exp_f, exp_c);
      end
      checks++;
      if (seen.exists({f, cout, garbage})) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%05b a=%0d b=%0d cin=%0b: outputs not unique", sel, a, b, cin);
      end
      seen[{f, cout, garbage}] = 1'b1;
    end
    $display("arithmetic cases %0d (carry out %0d, borrow out %0d), logic cases %0d",
             n_arith, n_carry, n_borrow, n_logic);
    if (n_carry == 0 || n_borrow == 0 || n_logic == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
