// tb_alu_top: end-to-end self-checking test of the ALU at its default
// parameters (8-bit word).
//
// Every operation is applied to every pair of 8-bit operands, with both
// carry-in values, and result, cout and zero are compared with a reference
// model written with the SystemVerilog operators. The test also counts how
// often each mechanism of the design occurs and fails if one never does:
// each operation, a carry-out from the adder, a carry-in of 1 that changes
// the adder result, a carry rippling through all eight bits, a subtraction
// with borrow and without, and the zero flag. One directed vector,
// a = 1, b = 0, cin = 1 on the adder (sum bit 0 cleared, carry into bit 1),
// is checked first.
module tb_alu_top;
  import alu_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a, b, result;
  logic       cin, cout, zero;
  alu_op_e    op;

  int checks = 0, failures = 0;
  int op_seen[8];
  int n_carry_out = 0, n_cin_used = 0, n_full_ripple = 0;
  int n_borrow = 0, n_no_borrow = 0, n_zero = 0;

  alu_top dut (.a(a), .b(b), .cin(cin), .op(op), .result(result), .cout(cout), .zero(zero));

  function automatic logic [8:0] model(alu_op_e o, logic [7:0] x, logic [7:0] y, logic k);
    logic [8:0] r;
    case (o)
      OP_ADD:  r = {1'b0, x} + {1'b0, y} + 9'(k);
      OP_SUB:  r = {1'b0, x} + {1'b0, ~y} + 9'd1;
      OP_AND:  r = {1'b0, x & y};
      OP_OR:   r = {1'b0, x | y};
      OP_XOR:  r = {1'b0, x ^ y};
      OP_XNOR: r = {1'b0, ~(x ^ y)};
      OP_NAND: r = {1'b0, ~(x & y)};
      default: r = {1'b0, ~(x | y)};
    endcase
    return r;
  endfunction

  task automatic apply(alu_op_e o, logic [7:0] x, logic [7:0] y, logic k);
    logic [8:0] e;
    op = o; a = x; b = y; cin = k;
    #1;
    e = model(o, x, y, k);
    checks++;
    if ({cout, result} !== e || zero !== (e[7:0] == 8'h00)) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h cin=%0b: got cout=%0b res=%h zero=%0b, expected %h",
                 o.name(), x, y, k, cout, result, zero, e);
    end
    op_seen[int'(o)]++;
    if (zero) n_zero++;
    if (o == OP_ADD && cout) n_carry_out++;
    if (o == OP_ADD && k && (result != 8'(x + y))) n_cin_used++;
    // Carry enters bit 0 and leaves bit 7 with every bit propagating.
    if ((o == OP_ADD || o == OP_SUB) && cout && (x ^ (o == OP_SUB ? ~y : y)) == 8'hFF) n_full_ripple++;
    if (o == OP_SUB) begin
      if (cout) n_no_borrow++;
      else n_borrow++;
    end
  endtask

  initial begin
    apply(OP_ADD, 8'h01, 8'h00, 1'b1);
    checks++;
    if (result[0] !== 1'b0 || result[1] !== 1'b1) begin
      failures++;
      $display("FAIL directed 1 + 0 + 1");
    end

    for (int o = 0; o < 8; o++) begin
      for (int x = 0; x < 256; x++) begin
        for (int y = 0; y < 256; y++) begin
          apply(alu_op_e'(o), 8'(x), 8'(y), 1'b0);
          apply(alu_op_e'(o), 8'(x), 8'(y), 1'b1);
        end
        @(posedge clk);
      end
    end

    for (int o = 0; o < 8; o++) begin
      checks++;
      if (op_seen[o] == 0) begin
        failures++;
        $display("FAIL operation %0d never exercised", o);
      end
    end
    checks += 6;
    if (n_carry_out == 0)   begin failures++; $display("FAIL no adder carry-out"); end
    if (n_cin_used == 0)    begin failures++; $display("FAIL carry-in never selected"); end
    if (n_full_ripple == 0) begin failures++; $display("FAIL no full-length carry ripple"); end
    if (n_borrow == 0)      begin failures++; $display("FAIL no subtraction with borrow"); end
    if (n_no_borrow == 0)   begin failures++; $display("FAIL no subtraction without borrow"); end
    if (n_zero == 0)        begin failures++; $display("FAIL zero flag never set"); end

    $display("mechanisms: carry_out=%0d cin_selected=%0d full_ripple=%0d borrow=%0d no_borrow=%0d zero=%0d",
             n_carry_out, n_cin_used, n_full_ripple, n_borrow, n_no_borrow, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
