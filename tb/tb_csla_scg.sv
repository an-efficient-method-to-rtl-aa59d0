// tb_csla_scg: exhaustive self-checking test of the sum and carry generator.
// For every pair of 8-bit operands it checks, bit by bit, the half sum, the
// carry-out for carry-in 0 and the carry-out for carry-in 1 against a
// one-bit full addition computed in the testbench ((a+b+k) >> 1 for k = 0, 1).
module tb_csla_scg;
  localparam int W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0] a, b, s0, c0, c1;
  int checks = 0, failures = 0;

  csla_scg #(.WIDTH(W)) dut (.a(a), .b(b), .s0(s0), .c0(c0), .c1(c1));

  initial begin
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        a = W'(x);
        b = W'(y);
        #1;
        for (int i = 0; i < W; i++) begin
          int unsigned t0, t1;
          t0 = int'(a[i]) + int'(b[i]);
          t1 = t0 + 1;
          checks++;
          if (s0[i] !== t0[0] || c0[i] !== t0[1] || c1[i] !== t1[1]) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%h b=%h bit %0d: s0=%0b c0=%0b c1=%0b", a, b, i, s0[i], c0[i], c1[i]);
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
