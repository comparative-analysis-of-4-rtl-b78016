// tb_ralu: end-to-end test of the reversible ALU at its default size
// (8 bits).
// For each of the ten operations every pair of 8-bit operands is applied
// with carry/borrow in 0 and 1 (1,310,720 cases). The result is compared
// with a reference computed by integer arithmetic and SystemVerilog
// operators; for ADD and SUB the carry/borrow out is checked too. The test
// counts how often each mechanism happened: every operation, a carry out of
// the top bit in ADD, a borrow out in SUB, a carry/borrow rippling through
// all eight slices, and the carry/borrow input being used. It also checks
// that each slice passes S0, S2, S3 and S4 through on its garbage lines. Any mechanism
// that never happened counts as a failure.
module tb_ralu;
  import ralu_pkg::*;

  localparam int W = 8;

  logic [W-1:0] a, b, f;
  logic cin, cout;
  logic [SEL_W-1:0] sel;
  logic [W-1:0][SLICE_GARBAGE_W-1:0] garbage;
  int checks = 0, failures = 0;
  int op_count [10];
  int n_carry_out = 0, n_borrow_out = 0, n_full_ripple = 0, n_cin_used = 0;
  ralu_op_e ops [10] = '{OP_ADD, OP_SUB, OP_TRA, OP_NOT, OP_AND,
                         OP_NAND, OP_OR, OP_NOR, OP_XOR, OP_XNOR};
  logic [W-1:0] exp_f;
  logic exp_c;
  int res;

  ralu dut (.a(a), .b(b), .cin(cin), .sel(sel), .f(f), .cout(cout), .garbage(garbage));

  initial begin : watchdog
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (op_count[k]) op_count[k] = 0;
    for (int k = 0; k < 10; k++) begin
      sel = ops[k];
      for (int ci = 0; ci < 2; ci++) begin
        for (int ia = 0; ia < (1 << W); ia++) begin
          for (int ib = 0; ib < (1 << W); ib++) begin
            a = W'(ia); b = W'(ib); cin = ci[0];
            #1;
            exp_c = 1'b0;
            case (ops[k])
              OP_ADD: begin
                res = ia + ib + ci;
                exp_f = W'(res);
                exp_c = res >= (1 << W);
                if (exp_c) n_carry_out++;
                if ((ia ^ ib) == (1 << W) - 1 && ci == 1) n_full_ripple++;
              end
              OP_SUB: begin
                res = ia - ib - ci;
                exp_f = W'(res);
                exp_c = res < 0;
                if (exp_c) n_borrow_out++;
                if (ia == 0 && ci == 1 && ib == 0) n_full_ripple++;
              end
              OP_TRA:  exp_f = W'(ia);
              OP_NOT:  exp_f = ~W'(ia);
              OP_AND:  exp_f = W'(ia & ib);
              OP_NAND: exp_f = ~W'(ia & ib);
              OP_OR:   exp_f = W'(ia | ib);
              OP_NOR:  exp_f = ~W'(ia | ib);
              OP_XOR:  exp_f = W'(ia ^ ib);
              default: exp_f = ~W'(ia ^ ib);
            endcase
            if ((ops[k] == OP_ADD || ops[k] == OP_SUB) && ci == 1) n_cin_used++;
            op_count[k]++;
            // select lines passed through each slice on its garbage outputs
            for (int i = 0; i < W; i++) begin
              checks++;
              if (garbage[i][11] !== sel[4] || garbage[i][9] !== sel[3] ||
                  garbage[i][7] !== sel[2] || garbage[i][2] !== sel[0]) begin
                failures++;
                if (failures < 10) $display("FAIL slice %0d garbage pass-through", i);
              end
            end
            checks++;
            if (f !== exp_f || ((ops[k] == OP_ADD || ops[k] == OP_SUB) && cout !== exp_c)) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s a=%0d b=%0d cin=%0d: f=%0d cout=%0b expected f=%0d cout=%0b",
                         ops[k].name(), ia, ib, ci, f, cout, exp_f, exp_c);
            end
          end
        end
      end
    end
    for (int k = 0; k < 10; k++) begin
      $display("operation %-5s applied %0d times", ops[k].name(), op_count[k]);
      if (op_count[k] == 0) failures++;
    end
    $display("carry out %0d, borrow out %0d, full-width ripple %0d, carry/borrow in used %0d",
             n_carry_out, n_borrow_out, n_full_ripple, n_cin_used);
    if (n_carry_out == 0 || n_borrow_out == 0 || n_full_ripple == 0 || n_cin_used == 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
