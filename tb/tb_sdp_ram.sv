// tb_sdp_ram: self-checking test of the simple dual-port block-RAM model.
//
// A 200-word x 8-bit memory (not a power of two) is written with random data
// through the write port while the read port reads other words; a shadow
// array kept by the testbench gives the expected data. Checked: the one-cycle
// read latency, read-before-write on a same-address collision, that a write
// beyond DEPTH changes nothing, and that such a read returns 0. A second,
// 256-word memory (a power of two, where every address is in range) is
// written and read back completely.
module tb_sdp_ram;
  logic       clk = 1'b0;
  always #5 clk = ~clk;

  localparam int DEPTH = 200;
  logic       we = 1'b0;
  logic [7:0] waddr = '0, raddr = '0, wdata = '0, rdata;
  logic [7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  sdp_ram #(.WIDTH(8), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic       we2 = 1'b0;
  logic [7:0] rdata2;
  sdp_ram #(.WIDTH(8), .DEPTH(256)) dut2 (.clk, .we(we2), .waddr, .wdata, .raddr, .rdata(rdata2));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1'b1; waddr = 8'(i); wdata = 8'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int r = 0; r < 2000; r++) begin
      int a, b;
      logic [7:0] exp_old;
      a = $urandom % DEPTH;
      b = ($urandom % 4 == 0) ? a : $urandom % DEPTH;
      raddr = 8'(a);
      we = 1'b1; waddr = 8'(b); wdata = 8'($urandom);
      exp_old = shadow[a];
      @(posedge clk);
      shadow[b] = wdata;
      #1;
      check(rdata == exp_old, $sformatf("read %0d gave %h, expected %h", a, rdata, exp_old));
      @(negedge clk);
    end
    // out-of-range write is ignored, out-of-range read is 0
    we = 1'b1; waddr = 8'(DEPTH + 3); wdata = 8'hA5; raddr = 8'(DEPTH + 3);
    @(posedge clk); #1;
    check(rdata == 8'h00, "out-of-range read not 0");
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = 8'(i); @(posedge clk); #1;
      check(rdata == shadow[i], $sformatf("final word %0d", i));
      @(negedge clk);
    end
    // power-of-two depth: all 256 addresses hold data
    for (int i = 0; i < 256; i++) begin
      we2 = 1'b1; waddr = 8'(i); wdata = 8'(i * 7 + 1);
      @(negedge clk);
    end
    we2 = 1'b0;
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i); @(posedge clk); #1;
      check(rdata2 == 8'(i * 7 + 1), $sformatf("256-word memory word %0d gave %h", i, rdata2));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
