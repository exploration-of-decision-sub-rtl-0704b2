// pipeline_accel: early-exit LeNet-5 with the decision sub-network realised by
// the "pipeline" approach.
//
// One convolution, one pooling, one FC and one softmax engine execute every
// layer, backbone and decision sub-network alike, so the sub-network costs no
// extra arithmetic. As in the source design, inference runs normally up to
// the layer in front of the sub-network (conv1); the backbone is then stalled
// and that layer's output is stored while the sub-network runs on the same
// engines. If the sub-network's softmax decides to exit, the inference ends
// with its class; otherwise the stored output is loaded back and the backbone
// continues to the final exit.
//
// Two ping-pong feature-map buffers (A, B) hold a layer's input and output;
// every compute step reads buf[src] and writes buf[!src], then swaps. The
// stored intermediate lives in a separate memory (save) reached through the
// fmap_mover. The step sequence (a fixed table, see step_at) is:
//   0 conv1 A->B   1 store B->save   2 bpool B->A   3 bconv A->B
//   4 bfc B->A     5 decision softmax on A (exit -> done)
//   6 load save->B 7 pool1 B->A      8 conv2 A->B   9 pool2 B->A
//   10 conv3 A->B  11 fc1 B->A       12 fc2 A->B    13 final softmax on B
// The step table, buffer arrangement and the host load ports are this
// design's own; the order of events follows the source design.
//
// Host interface: while idle the host writes the 28x28 image into buffer A
// (img_*) and, once, the weights and biases (cw_/cb_/fw_/fb_*, layouts in
// lenet_pkg). start begins an inference; done pulses when class_id and
// early_exit are valid. cycles counts the inference, stall_cycles the cycles
// from the store to the end of the load (the backbone is stalled), and
// xfer_words the words moved to and from the save memory.
module pipeline_accel import lenet_pkg::*; (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [7:0]       exit_thr,
  input  logic             img_we,
  input  logic [FM_AW-1:0] img_addr,
  input  fx_t              img_data,
  input  logic             cw_we,
  input  logic [CW_AW-1:0] cw_addr,
  input  logic [CW_W-1:0]  cw_data,
  input  logic             cb_we,
  input  logic [CB_AW-1:0] cb_addr,
  input  fx_t              cb_data,
  input  logic             fw_we,
  input  logic [FW_AW-1:0] fw_addr,
  input  logic [FW_W-1:0]  fw_data,
  input  logic             fb_we,
  input  logic [FB_AW-1:0] fb_addr,
  input  fx_t              fb_data,
  output logic             busy,
  output logic             done,
  output logic [3:0]       class_id,
  output logic             early_exit,
  output logic [31:0]      cycles,
  output logic [31:0]      stall_cycles,
  output logic [15:0]      xfer_words
);
  typedef enum logic [2:0] {OP_CONV, OP_POOL, OP_FC, OP_SMAX, OP_STORE, OP_LOAD} op_e;

  typedef struct packed {
    op_e       op;
    logic      decision;   // softmax of the decision sub-network
    conv_cfg_t conv;
    pool_cfg_t pool;
    fc_cfg_t   fc;
  } step_t;

  localparam int NSTEPS = 14;

  function automatic step_t step_at(logic [3:0] n);
    step_t s;
    s = '0;
    unique case (n)
      4'd0:  begin s.op = OP_CONV;  s.conv = mk_conv(1, C1_OUT, 28, 28, C1_K, CW_C1, CB_C1); end
      4'd1:  s.op = OP_STORE;
      4'd2:  begin s.op = OP_POOL;  s.pool = mk_pool(C1_OUT, 24, 24); end
      4'd3:  begin s.op = OP_CONV;  s.conv = mk_conv(C1_OUT, BC_OUT, 12, 12, BC_K, CW_BC, CB_BC); end
      4'd4:  begin s.op = OP_FC;    s.fc   = mk_fc(BF_IN, NCLS, 1'b0, FW_BF, FB_BF); end
      4'd5:  begin s.op = OP_SMAX;  s.decision = 1'b1; end
      4'd6:  s.op = OP_LOAD;
      4'd7:  begin s.op = OP_POOL;  s.pool = mk_pool(C1_OUT, 24, 24); end
      4'd8:  begin s.op = OP_CONV;  s.conv = mk_conv(C1_OUT, C2_OUT, 12, 12, C2_K, CW_C2, CB_C2); end
      4'd9:  begin s.op = OP_POOL;  s.pool = mk_pool(C2_OUT, 8, 8); end
      4'd10: begin s.op = OP_CONV;  s.conv = mk_conv(C2_OUT, C3_OUT, 4, 4, C3_K, CW_C3, CB_C3); end
      4'd11: begin s.op = OP_FC;    s.fc   = mk_fc(F1_IN, F1_OUT, 1'b1, FW_F1, FB_F1); end
      4'd12: begin s.op = OP_FC;    s.fc   = mk_fc(F1_OUT, NCLS, 1'b0, FW_F2, FB_F2); end
      default: s.op = OP_SMAX;
    endcase
    return s;
  endfunction

  typedef enum logic [1:0] {Q_IDLE, Q_LAUNCH, Q_WAIT} seq_e;

  seq_e       sq;
  logic [3:0] step;
  logic       src;       // 0: read A / write B, 1: read B / write A
  logic       stalled;
  step_t      cur;

  assign cur  = step_at(step);
  assign busy = (sq != Q_IDLE);

  // ---------------- engines ----------------
  logic go;
  assign go = (sq == Q_LAUNCH);

  logic             cv_busy, cv_done, cv_we;
  logic [FM_AW-1:0] cv_raddr, cv_waddr;
  fx_t              cv_wdata;
  logic             pl_busy, pl_done, pl_we;
  logic [FM_AW-1:0] pl_raddr, pl_waddr;
  fx_t              pl_wdata;
  logic             fc_busy, fc_done, fc_we;
  logic [FM_AW-1:0] fc_raddr, fc_waddr;
  fx_t              fc_wdata;
  logic             sm_busy, sm_done, sm_exit;
  logic [FM_AW-1:0] sm_raddr;
  logic [3:0]       sm_class;
  logic [19:0]      sm_conf;
  logic             mv_busy, mv_done, mv_we;
  logic [FM_AW-1:0] mv_raddr, mv_waddr;
  fx_t              mv_wdata;

  logic [CW_AW-1:0] cw_raddr;
  logic [CW_W-1:0]  cw_rdata;
  logic [CB_AW-1:0] cb_raddr;
  fx_t              cb_rdata;
  logic [FW_AW-1:0] fw_raddr;
  logic [FW_W-1:0]  fw_rdata;
  logic [FB_AW-1:0] fb_raddr;
  fx_t              fb_rdata;

  fx_t              fm_rdata, a_rdata, b_rdata, save_rdata;

  conv_engine #(.OW_MAX(24)) u_conv (
    .clk, .rst_n, .start(go && cur.op == OP_CONV), .abort(1'b0), .cfg(cur.conv),
    .busy(cv_busy), .done(cv_done),
    .fm_raddr(cv_raddr), .fm_rdata(fm_rdata),
    .fm_we(cv_we), .fm_waddr(cv_waddr), .fm_wdata(cv_wdata),
    .w_raddr(cw_raddr), .w_rdata(cw_rdata), .b_raddr(cb_raddr), .b_rdata(cb_rdata));

  maxpool_engine u_pool (
    .clk, .rst_n, .start(go && cur.op == OP_POOL), .abort(1'b0), .cfg(cur.pool),
    .busy(pl_busy), .done(pl_done),
    .fm_raddr(pl_raddr), .fm_rdata(fm_rdata),
    .fm_we(pl_we), .fm_waddr(pl_waddr), .fm_wdata(pl_wdata));

  fc_engine #(.NOUT_MAX(F1_OUT)) u_fc (
    .clk, .rst_n, .start(go && cur.op == OP_FC), .abort(1'b0), .cfg(cur.fc),
    .busy(fc_busy), .done(fc_done),
    .fm_raddr(fc_raddr), .fm_rdata(fm_rdata),
    .fm_we(fc_we), .fm_waddr(fc_waddr), .fm_wdata(fc_wdata),
    .w_raddr(fw_raddr), .w_rdata(fw_rdata), .b_raddr(fb_raddr), .b_rdata(fb_rdata));

  softmax_exit u_smax (
    .clk, .rst_n, .start(go && cur.op == OP_SMAX), .abort(1'b0), .thr(exit_thr),
    .busy(sm_busy), .done(sm_done), .fm_raddr(sm_raddr), .fm_rdata(fm_rdata),
    .class_id(sm_class), .exit_ok(sm_exit), .conf_sum(sm_conf));

  fmap_mover u_mover (
    .clk, .rst_n, .start(go && (cur.op == OP_STORE || cur.op == OP_LOAD)),
    .n_words(FM_AW'(SAVE_WORDS)), .busy(mv_busy), .done(mv_done),
    .src_raddr(mv_raddr), .src_rdata((cur.op == OP_LOAD) ? save_rdata : fm_rdata),
    .dst_we(mv_we), .dst_waddr(mv_waddr), .dst_wdata(mv_wdata));

  // ---------------- buffer port multiplexing ----------------
  logic [FM_AW-1:0] rd_addr, wr_addr;
  logic             wr_we, save_we;
  fx_t              wr_data;
  logic             eng_done;

  always_comb begin
    rd_addr  = '0;
    wr_we    = 1'b0;
    wr_addr  = '0;
    wr_data  = '0;
    save_we  = 1'b0;
    eng_done = 1'b0;
    unique case (cur.op)
      OP_CONV:  begin rd_addr = cv_raddr; wr_we = cv_we; wr_addr = cv_waddr; wr_data = cv_wdata; eng_done = cv_done; end
      OP_POOL:  begin rd_addr = pl_raddr; wr_we = pl_we; wr_addr = pl_waddr; wr_data = pl_wdata; eng_done = pl_done; end
      OP_FC:    begin rd_addr = fc_raddr; wr_we = fc_we; wr_addr = fc_waddr; wr_data = fc_wdata; eng_done = fc_done; end
      OP_SMAX:  begin rd_addr = sm_raddr; eng_done = sm_done; end
      OP_STORE: begin rd_addr = mv_raddr; save_we = mv_we; eng_done = mv_done; end
      OP_LOAD:  begin wr_we = mv_we; wr_addr = mv_waddr; wr_data = mv_wdata; eng_done = mv_done; end
      default:  ;
    endcase
  end

  assign fm_rdata = src ? b_rdata : a_rdata;

  logic             a_we;
  logic [FM_AW-1:0] a_waddr;
  fx_t              a_wdata;
  assign a_we    = (!busy && img_we) || (busy && wr_we && src);
  assign a_waddr = busy ? wr_addr : img_addr;
  assign a_wdata = busy ? wr_data : img_data;

  sdp_ram #(.WIDTH(DW), .DEPTH(FM_WORDS), .AW(FM_AW)) u_buf_a (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(rd_addr), .rdata(a_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(FM_WORDS), .AW(FM_AW)) u_buf_b (
    .clk, .we(busy && wr_we && !src), .waddr(wr_addr), .wdata(wr_data), .raddr(rd_addr), .rdata(b_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(SAVE_WORDS), .AW(FM_AW)) u_save (
    .clk, .we(save_we), .waddr(mv_waddr), .wdata(mv_wdata), .raddr(mv_raddr), .rdata(save_rdata));

  sdp_ram #(.WIDTH(CW_W), .DEPTH(CW_WORDS), .AW(CW_AW)) u_cw (
    .clk, .we(cw_we), .waddr(cw_addr), .wdata(cw_data), .raddr(cw_raddr), .rdata(cw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(CB_WORDS), .AW(CB_AW)) u_cb (
    .clk, .we(cb_we), .waddr(cb_addr), .wdata(cb_data), .raddr(cb_raddr), .rdata(cb_rdata));
  sdp_ram #(.WIDTH(FW_W), .DEPTH(FW_WORDS), .AW(FW_AW)) u_fw (
    .clk, .we(fw_we), .waddr(fw_addr), .wdata(fw_data), .raddr(fw_raddr), .rdata(fw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(FB_WORDS), .AW(FB_AW)) u_fb (
    .clk, .we(fb_we), .waddr(fb_addr), .wdata(fb_data), .raddr(fb_raddr), .rdata(fb_rdata));

  // ---------------- step sequencer ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq <= Q_IDLE; step <= '0; src <= 1'b0; stalled <= 1'b0;
      done <= 1'b0; class_id <= '0; early_exit <= 1'b0;
      cycles <= '0; stall_cycles <= '0; xfer_words <= '0;
    end else begin
      done <= 1'b0;
      if (busy) cycles <= cycles + 32'd1;
      if (stalled) stall_cycles <= stall_cycles + 32'd1;
      if (mv_we) xfer_words <= xfer_words + 16'd1;
      unique case (sq)
        Q_IDLE: if (start) begin
          step <= '0; src <= 1'b0;
          cycles <= '0; stall_cycles <= '0; xfer_words <= '0;
          sq <= Q_LAUNCH;
        end
        Q_LAUNCH: begin
          if (cur.op == OP_STORE) stalled <= 1'b1;
          sq <= Q_WAIT;
        end
        Q_WAIT: if (eng_done) begin
          if (cur.op inside {OP_CONV, OP_POOL, OP_FC, OP_LOAD}) src <= ~src;
          if (cur.op == OP_LOAD) stalled <= 1'b0;
          if (cur.op == OP_SMAX && (sm_exit || !cur.decision)) begin
            class_id   <= sm_class;
            early_exit <= cur.decision;
            stalled    <= 1'b0;
            done       <= 1'b1;
            sq         <= Q_IDLE;
          end else begin
            step <= step + 4'd1;
            sq   <= Q_LAUNCH;
          end
        end
        default: sq <= Q_IDLE;
      endcase
    end
  end

  // the step counter never runs past the final softmax
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n) step < 4'(NSTEPS));
endmodule
