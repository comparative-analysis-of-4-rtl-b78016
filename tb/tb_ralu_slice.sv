// tb_ralu_slice: exhaustive self-checking test of one ALU bit slice.
// All 256 combinations of A, B, Cin and the five select lines are applied.
// The result is compared with a reference written from the select-line
// table of ralu_pkg (arithmetic by integer addition/subtraction, logic by
// SystemVerilog operators), the carry/borrow out with the integer result
// in the arithmetic codes, and the 15 outputs (F, Cout, 13 garbage) are
// checked to be distinct over all inputs: the slice loses no information.
module tb_ralu_slice;
  import ralu_pkg::*;

  logic a, b, cin, f, cout;
  logic [SEL_W-1:0] sel;
  logic [SLICE_GARBAGE_W-1:0] garbage;
  int checks = 0, failures = 0;
  bit seen [bit [SLICE_GARBAGE_W+1:0]];
  logic exp_f, lv;
  int res;

  ralu_slice dut (.a(a), .b(b), .cin(cin), .sel(sel), .f(f), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {sel, a, b, cin} = 8'(v);
      #1;
      // reference
      if (sel[4]) lv = a ^ b;
      else case (sel[3:2])
        2'b00:   lv = 1'b0;
        2'b01:   lv = a;
        2'b10:   lv = a & b;
        default: lv = a | b;
      endcase
      if (sel[4:2] == 3'b000) begin
        res   = sel[0] ? int'(a) - int'(b) - int'(cin) : int'(a) + int'(b) + int'(cin);
        exp_f = res[0];
        checks++;
        if (cout !== (sel[0] ? (res < 0) : (res > 1))) begin
          failures++;
          $display("FAIL sel=%05b a=%0b b=%0b cin=%0b: cout=%0b", sel, a, b, cin, cout);
        end
      end else begin
        exp_f = lv ^ sel[1];
      end
      checks++;
      if (f !== exp_f) begin
        failures++;
        $display("FAIL sel=%05b a=%0b b=%0b cin=%0b: f=%0b expected %0b", sel, a, b, cin, f, exp_f);
      end
      checks++;
      if (seen.exists({f, cout, garbage})) begin
        failures++;
        $display("FAIL sel=%05b a=%0b b=%0b cin=%0b: outputs repeat an earlier input's", sel, a, b, cin);
      end
      seen[{f, cout, garbage}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
