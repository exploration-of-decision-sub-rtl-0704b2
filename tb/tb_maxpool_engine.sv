// tb_maxpool_engine: self-checking test of the 2x2 stride-2 max-pooling engine.
//
// Random signed feature maps of the three pooled shapes of the network
// (24x24x5, 8x8x10, and an odd 5x5x3 whose last row and column must be
// dropped) are pooled from one sdp_ram into another. Every output is compared
// with the direct-loop model, and the time from start to done with
// 4*ch*(h/2)*(w/2) + 2 cycles. An abort in mid-layer must leave the engine idle.
module tb_maxpool_engine;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, abort = 1'b0;
  pool_cfg_t        cfg = '0;
  logic             busy, done, fm_we;
  logic [FM_AW-1:0] fm_raddr, fm_waddr;
  fx_t              fm_rdata, fm_wdata, out_rdata;
  logic             in_we = 1'b0;
  logic [FM_AW-1:0] in_waddr = '0, out_raddr = '0;
  fx_t              in_wdata = '0;

  maxpool_engine dut (.clk, .rst_n, .start, .abort, .cfg, .busy, .done,
                      .fm_raddr, .fm_rdata, .fm_we, .fm_waddr, .fm_wdata);

  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_in (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(fm_raddr), .rdata(fm_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_out (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata), .raddr(out_raddr), .rdata(out_rdata));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(int ch, int h, int w, bit do_abort);
    iarr_t x = new[ch*h*w];
    iarr_t y;
    int n, no = ch*(h/2)*(w/2);
    for (int i = 0; i < ch*h*w; i++) begin
      x[i] = rnd(-128, 127);
      @(negedge clk); in_we = 1'b1; in_waddr = FM_AW'(i); in_wdata = fx_t'(x[i]);
    end
    @(negedge clk); in_we = 1'b0;
    y = pool(x, ch, h, w);
    cfg = mk_pool(ch, h, w);
    if (do_abort) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      repeat (no) @(negedge clk);
      abort = 1'b1; @(negedge clk); abort = 1'b0;
      check(!busy, "busy after abort");
    end
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    check(n == 4*no + 2, $sformatf("%0dx%0dx%0d took %0d cycles, expected %0d", h, w, ch, n, 4*no + 2));
    for (int i = 0; i < no; i++) begin
      out_raddr = FM_AW'(i);
      @(negedge clk);
      check(int'(out_rdata) == y[i], $sformatf("out[%0d] = %0d, expected %0d", i, out_rdata, y[i]));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_layer(C1_OUT, 24, 24, 0);
    run_layer(C2_OUT, 8, 8, 1);
    run_layer(3, 5, 5, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
