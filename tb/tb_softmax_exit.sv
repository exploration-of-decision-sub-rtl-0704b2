// tb_softmax_exit: self-checking test of the exit-point softmax and decision.
//
// Random and hand-picked logit vectors (ties, one dominant class, all equal,
// extreme values) are placed in an sdp_ram. For each, the class must be the
// first index of the largest logit; conf_sum must be within 2.5% (+4 LSB) of
// 32768 * sum(exp(z_i - zmax)) computed with real arithmetic; and exit_ok
// must match pmax >= thr/256 wherever the real-valued pmax is not within 3%
// of the threshold (the bit-exact rule is checked too). Latency: 2*NCLS + 4
// cycles from start to done.
module tb_softmax_exit;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, abort = 1'b0;
  logic [7:0]       thr = '0;
  logic             busy, done, exit_ok;
  logic [FM_AW-1:0] fm_raddr;
  fx_t              fm_rdata;
  logic [3:0]       class_id;
  logic [19:0]      conf_sum;
  logic             we = 1'b0;
  logic [FM_AW-1:0] waddr = '0;
  fx_t              wdata = '0;

  softmax_exit dut (.clk, .rst_n, .start, .abort, .thr, .busy, .done, .fm_raddr, .fm_rdata,
                    .class_id, .exit_ok, .conf_sum);
  sdp_ram #(.WIDTH(8), .DEPTH(16), .AW(FM_AW)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr(fm_raddr), .rdata(fm_rdata));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic run(iarr_t z, int t);
    int n, cls, conf, zm;
    bit ex;
    real s, pmax;
    for (int i = 0; i < NCLS; i++) begin
      @(negedge clk); we = 1'b1; waddr = FM_AW'(i); wdata = fx_t'(z[i]);
    end
    @(negedge clk); we = 1'b0; thr = 8'(t);
    start = 1'b1; @(negedge clk); start = 1'b0;
    n = 1;
    while (!done) begin @(negedge clk); n++; end
    check(n == 2*NCLS + 4, $sformatf("latency %0d", n));
    // independent: real softmax
    zm = z[0]; cls = 0;
    for (int i = 1; i < NCLS; i++) if (z[i] > zm) begin zm = z[i]; cls = i; end
    s = 0.0;
    for (int i = 0; i < NCLS; i++) s += $exp(real'(z[i] - zm) / 32.0);
    pmax = 1.0 / s;
    check(class_id == 4'(cls), $sformatf("class %0d expected %0d", class_id, cls));
    check(fabs(real'(conf_sum) - 32768.0 * s) <= 0.025 * 32768.0 * s + 4.0,
          $sformatf("conf_sum %0d, real %f", conf_sum, 32768.0 * s));
    if (fabs(pmax - real'(t) / 256.0) > 0.03 * pmax)
      check(exit_ok == (pmax >= real'(t) / 256.0), $sformatf("exit %0d pmax %f thr %0d", exit_ok, pmax, t));
    // bit-exact rule
    smax(z, t, cls, ex, conf);
    check(conf_sum == 20'(conf) && exit_ok == ex, $sformatf("bit-exact conf %0d/%0d exit %0d/%0d", conf_sum, conf, exit_ok, ex));
  endtask

  initial begin
    iarr_t z = new[NCLS];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 60; r++) begin
      for (int i = 0; i < NCLS; i++) z[i] = rnd(-128, 127);
      if (r % 3 == 1) z[rnd(0, 9)] = 127;
      if (r % 3 == 2) for (int i = 0; i < NCLS; i++) z[i] = rnd(-20, 20);
      run(z, rnd(0, 255));
    end
    for (int i = 0; i < NCLS; i++) z[i] = 5;             // all equal: class 0, pmax 0.1
    run(z, 25); run(z, 26); run(z, 0);
    for (int i = 0; i < NCLS; i++) z[i] = -128;
    z[3] = 127; z[7] = 127;                               // tie: first index wins
    run(z, 127); run(z, 129);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
