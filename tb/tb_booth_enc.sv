// Self-checking testbench for booth_enc: all eight groups against the
// radix-4 Booth truth table, written out here as constants
// (operation and {neg, one, two}).
module tb_booth_enc;
  import cvm_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0] grp;
  booth_sel_t sel;

  booth_enc u_dut (.grp(grp), .sel(sel));

  // Rows of the truth table, index = {B(i+1), B(i), B(i-1)}.
  localparam logic [2:0] EXPECTED [8] = '{
    3'b000,   // 000  +0
    3'b010,   // 001  +A
    3'b010,   // 010  +A
    3'b001,   // 011  +2A
    3'b101,   // 100  -2A
    3'b110,   // 101  -A
    3'b110,   // 110  -A
    3'b100    // 111  -0
  };
  localparam int MULTIPLE [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  initial begin
    for (int g = 0; g < 8; g++) begin
      int m;
      grp = 3'(g);
      #1;
      checks++;
      if (sel !== EXPECTED[g]) begin
        failures++;
        $display("FAIL grp=%b sel=%b expected %b", grp, sel, EXPECTED[g]);
      end
      // The selected multiple must equal -2*b2 + b1 + b0.
      m = (sel.two ? 2 : (sel.one ? 1 : 0)) * (sel.neg ? -1 : 1);
      checks++;
      if (m != MULTIPLE[g]) begin
        failures++;
        $display("FAIL grp=%b multiple %0d expected %0d", grp, m, MULTIPLE[g]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
