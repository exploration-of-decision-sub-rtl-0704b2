// tb_dyn_lenet_stream: a stream of images through both decision sub-network
// architectures, as in the average-time measurement of the source work.
//
// The source reports the time per sample averaged over MNIST, where the
// early exit was taken for 94.37% of the images. Here 16 random images run
// one after the other through a pipeline-approach and a parallel-approach top
// that share the host bus: each image is loaded as soon as the previous
// inference is done and started at once, the way an inference "restarts
// with the next input sample". The threshold makes 15 of the 16 take the
// early exit (93.75%): exit_thr = 0 for those and 255 for every 16th image.
// Checked for every image: class and exit flag against lenet_ref_pkg, and the
// exact cycle count of each top against the latency model (pipe_cycles and
// par_cycles). At the end, the average cycles per image of each approach,
// and the average the two would reach at the source's 94.37% exit rate, are
// printed, and the parallel approach must have the lower average.
module tb_dyn_lenet_stream;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  localparam int NIMG = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0;
  logic [7:0]       exit_thr = '0;
  logic             img_we = 1'b0, cw_we = 1'b0, cb_we = 1'b0, fw_we = 1'b0, fb_we = 1'b0;
  logic [FM_AW-1:0] img_addr = '0;
  fx_t              img_data = '0, cb_data = '0, fb_data = '0;
  logic [CW_AW-1:0] cw_addr = '0;
  logic [CW_W-1:0]  cw_data = '0;
  logic [CB_AW-1:0] cb_addr = '0;
  logic [FW_AW-1:0] fw_addr = '0;
  logic [FW_W-1:0]  fw_data = '0;
  logic [FB_AW-1:0] fb_addr = '0;

  logic        p_busy, p_done, p_exit, q_busy, q_done, q_exit;
  logic [3:0]  p_cls, q_cls;
  logic [31:0] p_cyc, q_cyc, p_sa, q_sa;
  logic [15:0] p_sb, q_sb;

  dyn_lenet_top u_pipe (
    .clk, .rst_n, .start, .exit_thr, .img_we, .img_addr, .img_data,
    .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
    .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
    .busy(p_busy), .done(p_done), .class_id(p_cls), .early_exit(p_exit),
    .cycles(p_cyc), .stat_a(p_sa), .stat_b(p_sb));

  dyn_lenet_top #(.APPROACH(APPR_PARALLEL)) u_par (
    .clk, .rst_n, .start, .exit_thr, .img_we, .img_addr, .img_data,
    .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
    .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
    .busy(q_busy), .done(q_done), .class_id(q_cls), .early_exit(q_exit),
    .cycles(q_cyc), .stat_a(q_sa), .stat_b(q_sb));

  int checks = 0, failures = 0;
  longint p_total = 0, q_total = 0;
  int n_exit = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_weights();
    for (int a = 0; a < CW_WORDS; a++) begin
      @(negedge clk); cw_we = 1'b1; cw_addr = CW_AW'(a); cw_data = cw_img[a];
    end
    for (int a = 0; a < CB_WORDS; a++) begin
      @(negedge clk); cw_we = 1'b0; cb_we = 1'b1; cb_addr = CB_AW'(a); cb_data = fx_t'(cb_img[a]);
    end
    for (int a = 0; a < FW_WORDS; a++) begin
      @(negedge clk); cb_we = 1'b0; fw_we = 1'b1; fw_addr = FW_AW'(a); fw_data = fw_img[a];
    end
    for (int a = 0; a < FB_WORDS; a++) begin
      @(negedge clk); fw_we = 1'b0; fb_we = 1'b1; fb_addr = FB_AW'(a); fb_data = fx_t'(fb_img[a]);
    end
    @(negedge clk); fb_we = 1'b0;
  endtask

  initial begin
    iarr_t img;
    int bc, fcls, exp_cls, thr;
    bit bex;
    bit pd, qd;
    real p_avg, q_avg, p_src, q_src;
    gen_weights(4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_weights();

    for (int n = 0; n < NIMG; n++) begin
      img = gen_image();
      thr = (n % 16 == 15) ? 255 : 0;
      network(img, thr, bc, bex, fcls);
      exp_cls = bex ? bc : fcls;
      for (int i = 0; i < IMG_H*IMG_W; i++) begin
        @(negedge clk); img_we = 1'b1; img_addr = FM_AW'(i); img_data = fx_t'(img[i]);
      end
      @(negedge clk); img_we = 1'b0; exit_thr = 8'(thr); start = 1'b1;
      @(negedge clk); start = 1'b0;
      pd = 0; qd = 0;
      while (!(pd && qd)) begin
        @(posedge clk);
        if (p_done) begin
          pd = 1;
          check(p_cls == 4'(exp_cls) && p_exit == bex,
                $sformatf("image %0d pipeline class %0d exit %0d, expected %0d %0d", n, p_cls, p_exit, exp_cls, bex));
          check(int'(p_cyc) == pipe_cycles(bex),
                $sformatf("image %0d pipeline %0d cycles, expected %0d", n, p_cyc, pipe_cycles(bex)));
          p_total += longint'(p_cyc);
        end
        if (q_done) begin
          qd = 1;
          check(q_cls == 4'(exp_cls) && q_exit == bex,
                $sformatf("image %0d parallel class %0d exit %0d, expected %0d %0d", n, q_cls, q_exit, exp_cls, bex));
          check(int'(q_cyc) == par_cycles(bex),
                $sformatf("image %0d parallel %0d cycles, expected %0d", n, q_cyc, par_cycles(bex)));
          q_total += longint'(q_cyc);
        end
      end
      if (bex) n_exit++;
    end

    check(n_exit == NIMG - NIMG / 16, $sformatf("%0d of %0d images exited", n_exit, NIMG));
    p_avg = real'(p_total) / NIMG;
    q_avg = real'(q_total) / NIMG;
    p_src = 0.9437 * pipe_cycles(1) + 0.0563 * pipe_cycles(0);
    q_src = 0.9437 * par_cycles(1) + 0.0563 * par_cycles(0);
    check(q_avg < p_avg, "parallel approach not faster on average");
    $display("stream of %0d images, %0d early exits: average cycles per image pipeline %0.1f, parallel %0.1f",
             NIMG, n_exit, p_avg, q_avg);
    $display("at a 94.37%% exit rate: pipeline %0.1f, parallel %0.1f cycles per image", p_src, q_src);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
