// Self-checking testbench for cbl_adder.
// The 8-bit adder is checked exhaustively (all a, b and cin); a 64-bit
// instance is checked on random and corner operands. Expected values come
// from the simulator's own + operator. A watchdog ends the run if it hangs.
module tb_cbl_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [63:0] a64, b64, s64;
  logic        ci64, co64;

  cbl_adder #(.W(8))  u_dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  cbl_adder #(.W(64)) u_dut64 (.a(a64), .b(b64), .cin(ci64), .sum(s64), .cout(co64));

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] exp;
    a64 = x; b64 = y; ci64 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 65'(c);
    checks++;
    if ({co64, s64} !== exp) begin
      failures++;
      $display("FAIL 64: %h + %h + %0d = %h, expected %h", x, y, c, {co64, s64}, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(x); b8 = 8'(y); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(x + y + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8: %0d + %0d + %0d = %0d", x, y, c, {co8, s8});
          end
        end
    check64('1, '0, 1'b1);
    check64('1, '1, 1'b1);
    check64(64'h8000_0000_0000_0000, 64'h8000_0000_0000_0000, 1'b0);
    for (int n = 0; n < 2000; n++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
