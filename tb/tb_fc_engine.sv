// tb_fc_engine: self-checking test of the fully connected engine.
//
// The three FC layers of the network (80->84 with ReLU, 84->10 and the
// branch's 1000->10 without) run on random inputs with the random weight
// image of lenet_ref_pkg; 84 is not a multiple of the 8 lanes, so the zeroed
// tail of the last chunk is exercised. Each output is compared with the
// direct dot-product model and the run time with
// ceil(n_in/8)*(8 + n_out + 2) + n_out + 2 cycles from start to done. A
// mid-layer abort followed by a rerun must give the right result.
module tb_fc_engine;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, abort = 1'b0;
  fc_cfg_t          cfg = '0;
  logic             busy, done, fm_we;
  logic [FM_AW-1:0] fm_raddr, fm_waddr;
  fx_t              fm_rdata, fm_wdata, out_rdata, b_rdata;
  logic [FW_AW-1:0] w_raddr;
  logic [FW_W-1:0]  w_rdata;
  logic [FB_AW-1:0] b_raddr;

  logic             in_we = 1'b0, fw_we = 1'b0, fb_we = 1'b0;
  logic [FM_AW-1:0] in_waddr = '0, out_raddr = '0;
  fx_t              in_wdata = '0, fb_wdata = '0;
  logic [FW_AW-1:0] fw_waddr = '0;
  logic [FW_W-1:0]  fw_wdata = '0;
  logic [FB_AW-1:0] fb_waddr = '0;

  fc_engine #(.NOUT_MAX(F1_OUT)) dut (
    .clk, .rst_n, .start, .abort, .cfg, .busy, .done,
    .fm_raddr, .fm_rdata, .fm_we, .fm_waddr, .fm_wdata,
    .w_raddr, .w_rdata, .b_raddr, .b_rdata);

  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_in (
    .clk, .we(in_we), .waddr(in_waddr), .wdata(in_wdata), .raddr(fm_raddr), .rdata(fm_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_out (
    .clk, .we(fm_we), .waddr(fm_waddr), .wdata(fm_wdata), .raddr(out_raddr), .rdata(out_rdata));
  sdp_ram #(.WIDTH(FW_W), .DEPTH(FW_WORDS), .AW(FW_AW)) u_fw (
    .clk, .we(fw_we), .waddr(fw_waddr), .wdata(fw_wdata), .raddr(w_raddr), .rdata(w_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(FB_WORDS), .AW(FB_AW)) u_fb (
    .clk, .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata), .raddr(b_raddr), .rdata(b_rdata));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic run_layer(int nin, int nout, bit relu, int wb, int bb, bit do_abort);
    iarr_t x = new[nin];
    iarr_t y;
    int n, expect_cycles;
    for (int i = 0; i < nin; i++) begin
      x[i] = rnd(-32, 64);
      @(negedge clk); in_we = 1'b1; in_waddr = FM_AW'(i); in_wdata = fx_t'(x[i]);
    end
    @(negedge clk); in_we = 1'b0;
    y = fc(x, nin, nout, wb, bb, relu);
    cfg = mk_fc(nin, nout, relu, wb, bb);
    if (do_abort) begin
      start = 1'b1; @(negedge clk); start = 1'b0;
      repeat (3*nout) @(negedge clk);
      abort = 1'b1; @(negedge clk); abort = 1'b0;
      check(!busy, "busy after abort");
    end
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    expect_cycles = ((nin + 7) / 8) * (8 + nout + 2) + nout + 2;
    check(n == expect_cycles, $sformatf("fc %0d->%0d took %0d cycles, expected %0d", nin, nout, n, expect_cycles));
    for (int i = 0; i < nout; i++) begin
      out_raddr = FM_AW'(i);
      @(negedge clk);
      check(int'(out_rdata) == y[i], $sformatf("fc %0d->%0d out[%0d] = %0d, expected %0d", nin, nout, i, out_rdata, y[i]));
    end
  endtask

  initial begin
    gen_weights(8);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < FW_WORDS; a++) begin
      @(negedge clk); fw_we = 1'b1; fw_waddr = FW_AW'(a); fw_wdata = fw_img[a];
    end
    for (int a = 0; a < FB_WORDS; a++) begin
      @(negedge clk); fw_we = 1'b0; fb_we = 1'b1; fb_waddr = FB_AW'(a); fb_wdata = fx_t'(fb_img[a]);
    end
    @(negedge clk); fb_we = 1'b0;
    run_layer(F1_IN, F1_OUT, 1, FW_F1, FB_F1, 0);
    run_layer(F1_OUT, NCLS, 0, FW_F2, FB_F2, 1);
    run_layer(BF_IN, NCLS, 0, FW_BF, FB_BF, 0);
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
