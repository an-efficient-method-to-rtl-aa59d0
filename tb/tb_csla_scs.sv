// tb_csla_scs: self-checking test of the sum and carry selection unit alone.
// The testbench forms the half sums and both candidate carries itself
// (s0 = a^b, c0 = a&b, c1 = a|b), feeds them to the unit for every 8-bit
// operand pair and both carry-ins, and compares {cout, sum} with a + b + cin.
module tb_csla_scs;
  localparam int W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, s0, c0, c1, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  assign s0 = a ^ b;
  assign c0 = a & b;
  assign c1 = a | b;

  csla_scs #(.WIDTH(W)) dut (.s0(s0), .c0(c0), .c1(c1), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        for (int k = 0; k < 2; k++) begin
          logic [W:0] expect_v;
          a   = W'(x);
          b   = W'(y);
          cin = k[0];
          #1;
          expect_v = (W+1)'(x + y + k);
          checks++;
          if ({cout, sum} !== expect_v) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h cin=%0b: got %h expected %h", a, b, cin, {cout, sum}, expect_v);
          end
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
