// tb_fmap_mover: self-checking test of the store/load copier.
//
// Random words fill a source sdp_ram; blocks of 2880 (the conv1 output of the
// network), 1 and 37 words are copied to a destination sdp_ram whose other
// words are preset to a marker. Every copied word must match, the word after
// the block must still hold the marker, and each copy must take n + 2 cycles
// from start to done (one word per cycle).
module tb_fmap_mover;
  import lenet_pkg::*;
  import lenet_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0;
  logic [FM_AW-1:0] n_words = '0;
  logic             busy, done, dst_we;
  logic [FM_AW-1:0] src_raddr, dst_waddr;
  fx_t              src_rdata, dst_wdata, chk_rdata;
  logic             s_we = 1'b0, d_we_tb = 1'b0;
  logic [FM_AW-1:0] s_waddr = '0, d_waddr_tb = '0, chk_raddr = '0;
  fx_t              s_wdata = '0, d_wdata_tb = '0;

  fmap_mover dut (.clk, .rst_n, .start, .n_words, .busy, .done, .src_raddr, .src_rdata,
                  .dst_we, .dst_waddr, .dst_wdata);
  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_src (
    .clk, .we(s_we), .waddr(s_waddr), .wdata(s_wdata), .raddr(src_raddr), .rdata(src_rdata));
  sdp_ram #(.WIDTH(8), .DEPTH(FM_WORDS), .AW(FM_AW)) u_dst (
    .clk, .we(dst_we || d_we_tb), .waddr(d_we_tb ? d_waddr_tb : dst_waddr),
    .wdata(d_we_tb ? d_wdata_tb : dst_wdata), .raddr(chk_raddr), .rdata(chk_rdata));

  int checks = 0, failures = 0;
  int src_img[FM_WORDS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic copy(int n);
    int c;
    for (int i = 0; i < FM_WORDS; i++) begin
      src_img[i] = rnd(-128, 127);
      @(negedge clk); s_we = 1'b1; s_waddr = FM_AW'(i); s_wdata = fx_t'(src_img[i]);
      d_we_tb = 1'b1; d_waddr_tb = FM_AW'(i); d_wdata_tb = 8'sh55;
    end
    @(negedge clk); s_we = 1'b0; d_we_tb = 1'b0;
    n_words = FM_AW'(n); start = 1'b1; @(negedge clk); start = 1'b0;
    c = 1;
    while (!done) begin @(negedge clk); c++; end
    check(c == n + 2, $sformatf("copy of %0d took %0d cycles", n, c));
    for (int i = 0; i <= n && i < FM_WORDS; i++) begin
      chk_raddr = FM_AW'(i);
      @(negedge clk);
      if (i < n) check(int'(chk_rdata) == src_img[i], $sformatf("word %0d", i));
      else       check(chk_rdata == 8'sh55, $sformatf("word %0d past the block overwritten", i));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    copy(SAVE_WORDS);
    copy(1);
    copy(37);
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
