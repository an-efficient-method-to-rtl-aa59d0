// tb_proposed_csla: self-checking test of the carry select adder.
// The 8-bit default instance is checked exhaustively (every a, b and cin)
// against integer addition. A 1-bit instance (the single adder cell) is
// checked on all eight input combinations, and a 32-bit instance on random
// operands plus the full-length carry chain 0xFFFFFFFF + 0 + 1.
module tb_proposed_csla;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Default width
  logic [7:0] a8, b8, s8;
  logic       ci8, co8;
  proposed_csla dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));

  // Single cell
  logic a1, b1, s1, ci1, co1;
  proposed_csla #(.WIDTH(1)) dut1 (.a(a1), .b(b1), .cin(ci1), .sum(s1), .cout(co1));

  // Wide instance
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  proposed_csla #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic k);
    logic [32:0] e;
    a32 = x; b32 = y; ci32 = k;
    #1;
    e = {1'b0, x} + {1'b0, y} + 33'(k);
    checks++;
    if ({co32, s32} !== e) begin
      failures++;
      if (failures < 10) $display("FAIL32 %h + %h + %0b = %h, expected %h", x, y, k, {co32, s32}, e);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        for (int k = 0; k < 2; k++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = k[0];
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + k)) begin
            failures++;
            if (failures < 10) $display("FAIL8 %h + %h + %0d = %h", a8, b8, k, {co8, s8});
          end
        end
      end
      @(posedge clk);
    end

    for (int v = 0; v < 8; v++) begin
      {a1, b1, ci1} = 3'(v);
      #1;
      checks++;
      if ({co1, s1} !== 2'(int'(a1) + int'(b1) + int'(ci1))) begin
        failures++;
        $display("FAIL1 a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a1, b1, ci1, co1, s1);
      end
    end

    check32(32'hFFFF_FFFF, 32'h0, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h0, 32'h0, 1'b0);
    for (int n = 0; n < 2000; n++) check32($urandom, $urandom, 1'($urandom));

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
