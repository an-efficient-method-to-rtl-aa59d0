// tb_aoi_xor: exhaustive self-checking test of the AOI exclusive OR.
// Drives all four input pairs and compares y with a truth table written out
// in the testbench. A watchdog ends the run after a fixed number of cycles.
module tb_aoi_xor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic a, b, y;
  int checks = 0, failures = 0;

  // Expected outputs, indexed by {a, b}.
  localparam logic [3:0] TRUTH = 4'b0110;

  aoi_xor dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      @(posedge clk);
      checks++;
      if (y !== TRUTH[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b expected %0b", a, b, y, TRUTH[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
