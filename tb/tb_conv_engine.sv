// tb_conv_engine: self-checking test of the convolution engine.
//
// The engine is connected to block-RAM models (sdp_ram) for its input map,
// output map, kernels and biases. Three layer shapes of the network are run
// with random data and random weights (5x5 single-channel, 3x3 with five
// input channels, 3x3 with ten input channels); every output pixel is
// compared with the direct-loop model of lenet_ref_pkg and the run time with
// out_ch*oh*(in_ch*(in_w*k + 5) + ow) + 1 cycles from start to done. A layer
// is also aborted half way and then rerun, which must still give the right
// result.
module tb_conv_engine;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, abort = 1'b0;
  conv_cfg_t        cfg = '0;
  logic             busy, done;
  logic [FM_AW-1:0] fm_raddr, fm_waddr;
  fx_t              fm_rdata, fm_wdata, b_rdata, out_rdata;
  logic             fm_we;
  logic [CW_AW-1:0] w_raddr;
  logic [CW_W-1:0]  w_rdata;
  logic [CB_AW-1:0] b_raddr;

  logic             in_we = 1'b0, cw_we = 1'b0, cb_we = 1'b0;
  logic [FM_AW-1:0] in_waddr = '0, out_raddr = '0;
  fx_t              in_wdata = '0, cb_wdata = '0;
  logic [CW_AW-1:0] cw_waddr = '0;
  logic [CW_W-1:0]  cw_wdata = '0;
  logic [CB_AW-1:0] cb_waddr = '0;

  conv_engine #(.OW_MAX(24)) dut (
    .clk, .rst_n, .start, .abort, .cfg, .busy, .done,
    .fm_raddr, .fm_rdata, .fm_we, .fm_waddr, .fm_wdata,
    .w_raddr, .w_rdata, .b_raddr, .b_rdata);

  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_in (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(fm_raddr), .rdata(fm_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_out (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata), .raddr(out_raddr), .rdata(out_rdata));
  sdp_ram #(.WIDTH(CW_W), .DEPTH(CW_WORDS), .AW(CW_AW)) u_cw (
    .clk, .we(cw_we), .waddr(cw_waddr), .wdata(cw_wdata), .raddr(w_raddr), .rdata(w_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(CB_WORDS), .AW(CB_AW)) u_cb (
    .clk, .we(cb_we), .waddr(cb_waddr), .wdata(cb_wdata), .raddr(b_raddr), .rdata(b_rdata));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(int ic, int h, int w, int oc, int k, int wb, int bb, bit do_abort);
    iarr_t x = new[ic*h*w];
    iarr_t y;
    int oh = h - k + 1, ow = w - k + 1;
    int n, expect_cycles;
    for (int i = 0; i < ic*h*w; i++) begin
      x[i] = rnd(-16, 48);
      @(negedge clk); in_we = 1'b1; in_waddr = FM_AW'(i); in_wdata = fx_t'(x[i]);
    end
    @(negedge clk); in_we = 1'b0;
    y = conv(x, ic, h, w, oc, k, wb, bb, 1);
    cfg = mk_conv(ic, oc, h, w, k, wb, bb);
    if (do_abort) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      repeat (oc*oh*ow) @(negedge clk);
      abort = 1'b1; @(negedge clk); abort = 1'b0;
      check(!busy, "engine still busy after abort");
    end
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    expect_cycles = oc*oh*(ic*(w*k + 5) + ow) + 1;
    check(n == expect_cycles, $sformatf("layer %0dx%0dx%0d k%0d took %0d cycles, expected %0d",
                                        h, w, ic, k, n, expect_cycles));
    @(negedge clk);
    for (int i = 0; i < oc*oh*ow; i++) begin
      out_raddr = FM_AW'(i);
      @(negedge clk);
      check(int'(out_rdata) == y[i], $sformatf("k%0d out[%0d] = %0d, expected %0d", k, i, out_rdata, y[i]));
    end
  endtask

  initial begin
    gen_weights(4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < CW_WORDS; a++) begin
      @(negedge clk); cw_we = 1'b1; cw_waddr = CW_AW'(a); cw_wdata = cw_img[a];
    end
    for (int a = 0; a < CB_WORDS; a++) begin
      @(negedge clk); cw_we = 1'b0; cb_we = 1'b1; cb_waddr = CB_AW'(a); cb_wdata = fx_t'(cb_img[a]);
    end
    @(negedge clk); cb_we = 1'b0;

    run_layer(1, 28, 28, C1_OUT, C1_K, CW_C1, CB_C1, 0);
    run_layer(C1_OUT, 12, 12, BC_OUT, BC_K, CW_BC, CB_BC, 1);
    run_layer(C2_OUT, 4, 4, C3_OUT, C3_K, CW_C3, CB_C3, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
