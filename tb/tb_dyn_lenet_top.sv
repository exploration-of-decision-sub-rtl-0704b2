// tb_dyn_lenet_top: end-to-end test of the early-exit LeNet-5 accelerator in
// both decision sub-network architectures.
//
// A pipeline-approach top (default parameters) and a parallel-approach top
// share one host bus: random weights and images are loaded into both, both
// are started together, and each result (class, early-exit flag) is compared
// with the golden model in lenet_ref_pkg. The exit threshold is chosen per
// run to force an exit, to forbid one, and to sit just on either side of the
// branch's own confidence. The test also checks the mechanisms of the two
// architectures and counts how often each was seen:
//   early exit taken / not taken (both), store+load of the conv1 output and
//   the stall it causes (pipeline), branch running alongside the backbone and
//   abort of a running backbone (parallel), and the parallel approach being
//   faster than the pipeline approach when no exit is taken.
module tb_dyn_lenet_top;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

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
  logic [31:0] p_cyc, q_cyc, p_stall, q_overlap;
  logic [15:0] p_xfer, q_abort;

  dyn_lenet_top u_pipe (
    .clk, .rst_n, .start, .exit_thr, .img_we, .img_addr, .img_data,
    .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
    .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
    .busy(p_busy), .done(p_done), .class_id(p_cls), .early_exit(p_exit),
    .cycles(p_cyc), .stat_a(p_stall), .stat_b(p_xfer));

  dyn_lenet_top #(.APPROACH(APPR_PARALLEL)) u_par (
    .clk, .rst_n, .start, .exit_thr, .img_we, .img_addr, .img_data,
    .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
    .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
    .busy(q_busy), .done(q_done), .class_id(q_cls), .early_exit(q_exit),
    .cycles(q_cyc), .stat_a(q_overlap), .stat_b(q_abort));

  int checks = 0, failures = 0;
  int n_exit = 0, n_noexit = 0, n_store = 0, n_stall = 0, n_overlap = 0, n_abort = 0, n_faster = 0;

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

  task automatic load_image(iarr_t img);
    for (int i = 0; i < IMG_H*IMG_W; i++) begin
      @(negedge clk); img_we = 1'b1; img_addr = FM_AW'(i); img_data = fx_t'(img[i]);
    end
    @(negedge clk); img_we = 1'b0;
  endtask

  task automatic run(iarr_t img, int thr, string tag);
    int bc, fcls;
    bit bex;
    bit pd = 0, qd = 0;
    int exp_cls;
    network(img, thr, bc, bex, fcls);
    exp_cls = bex ? bc : fcls;
    load_image(img);
    @(negedge clk); exit_thr = 8'(thr); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!(pd && qd)) begin
      @(posedge clk);
      if (p_done) begin
        pd = 1;
        check(p_cls == 4'(exp_cls), $sformatf("%s pipeline class %0d expected %0d", tag, p_cls, exp_cls));
        check(p_exit == bex, $sformatf("%s pipeline exit %0d expected %0d", tag, p_exit, bex));
        // store always, load only when the backbone resumes
        check(p_xfer == 16'((bex ? 1 : 2) * SAVE_WORDS),
              $sformatf("%s pipeline moved %0d words", tag, p_xfer));
        check(p_stall > 0, {tag, " pipeline stall not seen"});
        if (p_xfer != 0) n_store++;
        if (p_stall > 0) n_stall++;
      end
      if (q_done) begin
        qd = 1;
        check(q_cls == 4'(exp_cls), $sformatf("%s parallel class %0d expected %0d", tag, q_cls, exp_cls));
        check(q_exit == bex, $sformatf("%s parallel exit %0d expected %0d", tag, q_exit, bex));
        check(q_overlap > 0, {tag, " parallel overlap not seen"});
        if (q_overlap > 0) n_overlap++;
        if (q_abort[0]) n_abort++;
      end
    end
    if (bex) n_exit++; else n_noexit++;
    if (!bex) begin
      check(q_cyc < p_cyc, $sformatf("%s parallel %0d cycles not below pipeline %0d", tag, q_cyc, p_cyc));
      if (q_cyc < p_cyc) n_faster++;
    end
    $display("%s: thr=%0d exit=%0d class=%0d  pipeline %0d cycles (stall %0d)  parallel %0d cycles (overlap %0d, abort %0d)",
             tag, thr, bex, exp_cls, p_cyc, p_stall, q_cyc, q_overlap, q_abort[0]);
  endtask

  initial begin
    iarr_t img;
    int conf, thr_mid;
    gen_weights(4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_weights();

    img = gen_image();
    run(img, 0, "force-exit");
    run(img, 255, "no-exit");
    img = gen_image();
    conf = branch_conf(img);
    thr_mid = 8388608 / conf;           // largest thr that still exits
    if (thr_mid > 254) thr_mid = 254;
    run(img, thr_mid, "at-threshold");
    run(img, thr_mid + 1, "above-threshold");
    repeat (2) begin
      img = gen_image();
      run(img, 200, "typical");
    end

    check(n_exit > 0,    "early exit never taken");
    check(n_noexit > 0,  "early exit never refused");
    check(n_store > 0,   "pipeline store/load never happened");
    check(n_stall > 0,   "pipeline stall never happened");
    check(n_overlap > 0, "parallel overlap never happened");
    check(n_abort > 0,   "parallel backbone abort never happened");
    check(n_faster > 0,  "parallel never faster than pipeline without exit");
    $display("mechanisms: exit=%0d no-exit=%0d store/load=%0d stall=%0d overlap=%0d abort=%0d parallel-faster=%0d",
             n_exit, n_noexit, n_store, n_stall, n_overlap, n_abort, n_faster);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
