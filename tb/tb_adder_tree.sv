// tb_adder_tree: self-checking test of the balanced adder tree.
//
// Two trees are tested, 25 inputs (the 5x5 PE array, padded to 32 leaves) and
// 8 inputs (the FC lanes), with random 16-bit signed inputs and with all
// inputs at the extremes; each sum is compared with a sequential sum.
module tb_adder_tree;
  logic signed [15:0] a25 [25];
  logic signed [15:0] a8  [8];
  logic signed [23:0] s25, s8;
  int checks = 0, failures = 0;

  adder_tree #(.N(25), .IW(16), .OW(24)) dut25 (.in(a25), .sum(s25));
  adder_tree #(.N(8),  .IW(16), .OW(24)) dut8  (.in(a8),  .sum(s8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < 500; r++) begin
      int e25, e8;
      e25 = 0;
      e8  = 0;
      for (int i = 0; i < 25; i++) begin
        case (r)
          0: a25[i] = 16'sh7fff;
          1: a25[i] = -16'sh8000;
          default: a25[i] = 16'($urandom);
        endcase
        e25 += int'(a25[i]);
      end
      for (int i = 0; i < 8; i++) begin
        a8[i] = (r == 1) ? -16'sh8000 : 16'($urandom);
        e8 += int'(a8[i]);
      end
      #1;
      check(int'(s25) == e25, $sformatf("25-input sum %0d expected %0d", s25, e25));
      check(int'(s8) == e8, $sformatf("8-input sum %0d expected %0d", s8, e8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
