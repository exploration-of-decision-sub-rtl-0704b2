// tb_pe_array: self-checking test of the 5x5 processing-element array.
//
// Random signed Q3.5 windows and kernels, including -128 x -128, are applied
// for kernel sizes 5, 3 and 1. Each PE output must be the 16-bit product of
// its two inputs when the PE lies in the top k rows and the right-most k
// columns, and zero otherwise.
module tb_pe_array;
  import lenet_pkg::*;

  fx_t                win [25];
  fx_t                w   [25];
  logic [2:0]         k;
  logic signed [15:0] prod [25];
  int checks = 0, failures = 0;

  pe_array #(.K(5)) dut (.win, .w, .k, .prod);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < 300; r++) begin
      k = (r % 3 == 0) ? 3'd5 : (r % 3 == 1) ? 3'd3 : 3'd1;
      for (int i = 0; i < 25; i++) begin
        win[i] = (r == 0) ? -8'sd128 : fx_t'($urandom);
        w[i]   = (r == 0) ? -8'sd128 : fx_t'($urandom);
      end
      #1;
      for (int rr = 0; rr < 5; rr++)
        for (int cc = 0; cc < 5; cc++) begin
          int e;
          e = (rr < int'(k) && cc >= 5 - int'(k)) ? int'(win[rr*5+cc]) * int'(w[rr*5+cc]) : 0;
          check(int'(prod[rr*5+cc]) == e, $sformatf("k=%0d PE(%0d,%0d) = %0d expected %0d",
                                                   k, rr, cc, prod[rr*5+cc], e));
        end
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
