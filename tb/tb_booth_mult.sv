// Self-checking testbench for booth_mult.
// The default 8x8 multiplier is checked exhaustively in both modes
// (unsigned and two's complement); a 32x32 instance is checked on random and
// corner operands. Expected products use the simulator's * operator on
// 64-bit signed or unsigned integers.
module tb_booth_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        sgn8;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic        sgn32;

  booth_mult                u_dut8  (.a(a8),  .b(b8),  .sgn(sgn8),  .p(p8));
  booth_mult #(.W(32))      u_dut32 (.a(a32), .b(b32), .sgn(sgn32), .p(p32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic s);
    logic [63:0] exp;
    a32 = x; b32 = y; sgn32 = s;
    #1;
    if (s) exp = 64'($signed(64'(signed'(x))) * $signed(64'(signed'(y))));
    else   exp = 64'(x) * 64'(y);
    checks++;
    if (p32 !== exp) begin
      failures++;
      $display("FAIL 32 sgn=%0d: %h * %h = %h, expected %h", s, x, y, p32, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          int exp;
          a8 = 8'(x); b8 = 8'(y); sgn8 = 1'(s);
          #1;
          exp = s ? int'(signed'(8'(x))) * int'(signed'(8'(y))) : x * y;
          checks++;
          if (p8 !== 16'(exp)) begin
            failures++;
            if (failures < 10) $display("FAIL 8 sgn=%0d: %0d * %0d = %h", s, x, y, p8);
          end
        end
    for (int s = 0; s < 2; s++) begin
      check32('1, '1, 1'(s));
      check32(32'h8000_0000, 32'h8000_0000, 1'(s));
      check32(32'h8000_0000, 32'h7fff_ffff, 1'(s));
      for (int n = 0; n < 3000; n++) check32($urandom, $urandom, 1'(s));
    end
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
