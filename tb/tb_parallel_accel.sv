// tb_parallel_accel: self-checking test of the parallel-approach accelerator.
//
// Random weights and images are loaded through the host ports; inferences
// are run with thresholds that force, forbid and just allow or refuse the
// early exit. Checked against the golden model: class and exit flag. Checked
// against the architecture: the decision sub-network runs alongside the
// backbone for its whole length; an exit aborts the still-running backbone;
// and the run time is conv1 followed by the longer of the two paths (only
// the branch when it exits), with one launch cycle per step.
module tb_parallel_accel;
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
  logic             busy, done, early_exit;
  logic [3:0]       class_id;
  logic [31:0]      cyc;
  logic [31:0] stat_a;
  logic        aborted;

  parallel_accel dut (
    .clk, .rst_n, .start, .exit_thr, .img_we, .img_addr, .img_data,
    .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
    .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
    .busy, .done, .class_id, .early_exit, .cycles(cyc), .overlap_cycles(stat_a), .bb_aborted(aborted));

  int checks = 0, failures = 0, n_exit = 0, n_noexit = 0, n_mech = 0;

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

  task automatic run(iarr_t img, int thr, string tag);
    int bc, fcls, exp_cls;
    bit bex;
    network(img, thr, bc, bex, fcls);
    exp_cls = bex ? bc : fcls;
    for (int i = 0; i < IMG_H*IMG_W; i++) begin
      @(negedge clk); img_we = 1'b1; img_addr = FM_AW'(i); img_data = fx_t'(img[i]);
    end
    @(negedge clk); img_we = 1'b0; exit_thr = 8'(thr); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (1) begin
      @(posedge clk);
      if (done) begin
        check(class_id == 4'(exp_cls), $sformatf("%s class %0d expected %0d", tag, class_id, exp_cls));
        check(early_exit == bex, $sformatf("%s exit %0d expected %0d", tag, early_exit, bex));
        check(stat_a == 32'(lat_branch()), $sformatf("%s overlap %0d cycles, expected %0d", tag, stat_a, lat_branch()));
        check(aborted == bex, $sformatf("%s abort flag %0d", tag, aborted));
        check(cyc == 32'(par_cycles(bex)), $sformatf("%s took %0d cycles, expected %0d", tag, cyc, par_cycles(bex)));
        if (aborted) n_mech++;
        break;
      end
    end
    if (bex) n_exit++; else n_noexit++;
    $display("%s: thr=%0d exit=%0d class=%0d cycles=%0d", tag, thr, bex, exp_cls, cyc);
  endtask

  initial begin
    iarr_t img;
    int t;
    gen_weights(4);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_weights();
    for (int n = 0; n < 2; n++) begin
      img = gen_image();
      t = 8388608 / branch_conf(img);
      if (t > 254) t = 254;
      run(img, 0, "force-exit");
      run(img, 255, "no-exit");
      run(img, t, "at-threshold");
      run(img, t + 1, "above-threshold");
    end
    check(n_exit > 0 && n_noexit > 0, "exit and no-exit not both seen");
    check(n_mech > 0, "backbone abort never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
