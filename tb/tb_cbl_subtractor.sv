// Self-checking testbench for cbl_subtractor.
// Exhaustive at 8 bits and random at 64 bits; the expected {borrow, diff}
// is the (W+1)-bit two's-complement difference of the unsigned operands.
module tb_cbl_subtractor;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8, d8;
  logic        bo8;
  logic [63:0] a64, b64, d64;
  logic        bo64;

  cbl_subtractor #(.W(8))  u_dut8  (.a(a8),  .b(b8),  .diff(d8),  .borrow(bo8));
  cbl_subtractor #(.W(64)) u_dut64 (.a(a64), .b(b64), .diff(d64), .borrow(bo64));

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if ({bo8, d8} !== 9'(x - y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8: %0d - %0d = %b", x, y, {bo8, d8});
        end
      end
    for (int n = 0; n < 2000; n++) begin
      logic [64:0] exp;
      a64 = {$urandom, $urandom};
      b64 = (n % 3 == 0) ? a64 : {$urandom, $urandom};
      #1;
      exp = {1'b0, a64} - {1'b0, b64};
      checks++;
      if ({bo64, d64} !== exp) begin
        failures++;
        $display("FAIL 64: %h - %h = %h", a64, b64, {bo64, d64});
      end
    end
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
