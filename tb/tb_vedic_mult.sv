// Self-checking testbench for vedic_mult.
// An 8-bit instance with 4-bit leaves (the published 8-bit arrangement) is
// checked exhaustively; the default 32-bit instance (8-bit Booth leaves) on
// random and corner operands. c3 must stay 0. Expected products come from
// the simulator's * operator.
module tb_vedic_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic        c8;
  logic [31:0] a32, b32;
  logic [63:0] p32;
  logic        c32;

  vedic_mult #(.W(8), .LEAF_W(4)) u_dut8  (.a(a8),  .b(b8),  .p(p8),  .c3(c8));
  vedic_mult                      u_dut32 (.a(a32), .b(b32), .p(p32), .c3(c32));

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    a32 = x; b32 = y;
    #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (p32 !== exp || c32 !== 1'b0) begin
      failures++;
      $display("FAIL 32: %h * %h = %h c3=%b, expected %h", x, y, p32, c32, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y) || c8 !== 1'b0) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d * %0d = %0d c3=%b", x, y, p8, c8);
        end
      end
    check32('1, '1);
    check32('1, 32'h0000_ffff);
    check32(32'hffff_0000, 32'h0000_ffff);
    check32(32'h8000_0001, 32'h8000_0001);
    for (int n = 0; n < 5000; n++) check32($urandom, $urandom);
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
