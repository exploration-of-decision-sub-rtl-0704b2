// parallel_accel: early-exit LeNet-5 with the decision sub-network realised by
// the "parallel" approach.
//
// The decision sub-network has engines of its own (convolution, pooling, FC,
// softmax) next to the backbone's. As in the source design, the output of the
// layer in front of the sub-network (conv1) is fed both to the next backbone
// layer and to the sub-network, and both proceed at once, so nothing is
// stored and reloaded. If the sub-network decides to exit, the backbone is
// stopped where it is (its engines are aborted) and the inference ends with
// the branch's class; otherwise the backbone, which has kept running, reaches
// the final exit. The extra engines cost area and power.
//
// conv1 writes its result into the backbone buffer B and, by the same write,
// into the branch buffer C. Buffers and step order:
//   backbone: 0 conv1 A->B(+C) 1 pool1 B->A 2 conv2 A->B 3 pool2 B->A
//             4 conv3 A->B     5 fc1 B->A   6 fc2 A->B   7 final softmax on B
//   branch  : 0 bpool C->D     1 bconv D->C 2 bfc C->D   3 decision softmax on D
// The branch starts when conv1 is done. The broadcast write, the buffer
// arrangement and the address split of the host weight ports are this
// design's own.
//
// Host interface: as pipeline_accel. Weight, bias and FC addresses at or
// above the branch base (CW_BC, CB_BC, FW_BF, FB_BF in lenet_pkg) go to the
// branch's own memories. cycles counts the inference, overlap_cycles the
// cycles in which backbone and branch run together, and bb_aborted is set
// when an early exit stopped a backbone that was still running.
module parallel_accel import lenet_pkg::*; (
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
  output logic [31:0]      overlap_cycles,
  output logic             bb_aborted
);
  typedef enum logic [1:0] {OP_CONV, OP_POOL, OP_FC, OP_SMAX} op_e;

  typedef struct packed {
    op_e       op;
    conv_cfg_t conv;
    pool_cfg_t pool;
    fc_cfg_t   fc;
  } step_t;

  function automatic step_t bb_step_at(logic [2:0] n);
    step_t s;
    s = '0;
    unique case (n)
      3'd0: begin s.op = OP_CONV; s.conv = mk_conv(1, C1_OUT, 28, 28, C1_K, CW_C1, CB_C1); end
      3'd1: begin s.op = OP_POOL; s.pool = mk_pool(C1_OUT, 24, 24); end
      3'd2: begin s.op = OP_CONV; s.conv = mk_conv(C1_OUT, C2_OUT, 12, 12, C2_K, CW_C2, CB_C2); end
      3'd3: begin s.op = OP_POOL; s.pool = mk_pool(C2_OUT, 8, 8); end
      3'd4: begin s.op = OP_CONV; s.conv = mk_conv(C2_OUT, C3_OUT, 4, 4, C3_K, CW_C3, CB_C3); end
      3'd5: begin s.op = OP_FC;   s.fc   = mk_fc(F1_IN, F1_OUT, 1'b1, FW_F1, FB_F1); end
      3'd6: begin s.op = OP_FC;   s.fc   = mk_fc(F1_OUT, NCLS, 1'b0, FW_F2, FB_F2); end
      default: s.op = OP_SMAX;
    endcase
    return s;
  endfunction

  function automatic step_t br_step_at(logic [1:0] n);
    step_t s;
    s = '0;
    unique case (n)
      2'd0: begin s.op = OP_POOL; s.pool = mk_pool(C1_OUT, 24, 24); end
      2'd1: begin s.op = OP_CONV; s.conv = mk_conv(C1_OUT, BC_OUT, 12, 12, BC_K, 0, 0); end
      2'd2: begin s.op = OP_FC;   s.fc   = mk_fc(BF_IN, NCLS, 1'b0, 0, 0); end
      default: s.op = OP_SMAX;
    endcase
    return s;
  endfunction

  typedef enum logic [1:0] {Q_IDLE, Q_LAUNCH, Q_WAIT} seq_e;

  seq_e       bb_sq, br_sq;
  logic [2:0] bb_step;
  logic [1:0] br_step;
  logic       bb_src, br_src;
  step_t      bb_cur, br_cur;
  logic       run;                 // an inference is in progress
  logic       bb_fin, br_noexit;
  logic [3:0] bb_class;
  logic       abort_bb;

  assign bb_cur = bb_step_at(bb_step);
  assign br_cur = br_step_at(br_step);
  assign busy   = run;

  // ================= backbone engines and buffers =================
  logic bb_go;
  assign bb_go = (bb_sq == Q_LAUNCH);

  logic             bcv_done, bcv_we, bpl_done, bpl_we, bfc_done, bfc_we, bsm_done, bsm_exit;
  logic             bcv_busy, bpl_busy, bfc_busy, bsm_busy;
  logic [FM_AW-1:0] bcv_raddr, bcv_waddr, bpl_raddr, bpl_waddr, bfc_raddr, bfc_waddr, bsm_raddr;
  fx_t              bcv_wdata, bpl_wdata, bfc_wdata;
  logic [3:0]       bsm_class;
  logic [19:0]      bsm_conf;
  logic [CW_AW-1:0] bcw_raddr;
  logic [CW_W-1:0]  bcw_rdata;
  logic [CB_AW-1:0] bcb_raddr;
  fx_t              bcb_rdata;
  logic [FW_AW-1:0] bfw_raddr;
  logic [FW_W-1:0]  bfw_rdata;
  logic [FB_AW-1:0] bfb_raddr;
  fx_t              bfb_rdata;
  fx_t              bb_rdata, a_rdata, b_rdata;

  conv_engine #(.OW_MAX(24)) u_bb_conv (
    .clk, .rst_n, .start(bb_go && bb_cur.op == OP_CONV), .abort(abort_bb), .cfg(bb_cur.conv),
    .busy(bcv_busy), .done(bcv_done), .fm_raddr(bcv_raddr), .fm_rdata(bb_rdata),
    .fm_we(bcv_we), .fm_waddr(bcv_waddr), .fm_wdata(bcv_wdata),
    .w_raddr(bcw_raddr), .w_rdata(bcw_rdata), .b_raddr(bcb_raddr), .b_rdata(bcb_rdata));

  maxpool_engine u_bb_pool (
    .clk, .rst_n, .start(bb_go && bb_cur.op == OP_POOL), .abort(abort_bb), .cfg(bb_cur.pool),
    .busy(bpl_busy), .done(bpl_done), .fm_raddr(bpl_raddr), .fm_rdata(bb_rdata),
    .fm_we(bpl_we), .fm_waddr(bpl_waddr), .fm_wdata(bpl_wdata));

  fc_engine #(.NOUT_MAX(F1_OUT)) u_bb_fc (
    .clk, .rst_n, .start(bb_go && bb_cur.op == OP_FC), .abort(abort_bb), .cfg(bb_cur.fc),
    .busy(bfc_busy), .done(bfc_done), .fm_raddr(bfc_raddr), .fm_rdata(bb_rdata),
    .fm_we(bfc_we), .fm_waddr(bfc_waddr), .fm_wdata(bfc_wdata),
    .w_raddr(bfw_raddr), .w_rdata(bfw_rdata), .b_raddr(bfb_raddr), .b_rdata(bfb_rdata));

  softmax_exit u_bb_smax (
    .clk, .rst_n, .start(bb_go && bb_cur.op == OP_SMAX), .abort(abort_bb), .thr(exit_thr),
    .busy(bsm_busy), .done(bsm_done), .fm_raddr(bsm_raddr), .fm_rdata(bb_rdata),
    .class_id(bsm_class), .exit_ok(bsm_exit), .conf_sum(bsm_conf));

  logic [FM_AW-1:0] bb_raddr, bb_waddr;
  logic             bb_we, bb_done;
  fx_t              bb_wdata;

  always_comb begin
    bb_raddr = '0; bb_we = 1'b0; bb_waddr = '0; bb_wdata = '0; bb_done = 1'b0;
    unique case (bb_cur.op)
      OP_CONV: begin bb_raddr = bcv_raddr; bb_we = bcv_we; bb_waddr = bcv_waddr; bb_wdata = bcv_wdata; bb_done = bcv_done; end
      OP_POOL: begin bb_raddr = bpl_raddr; bb_we = bpl_we; bb_waddr = bpl_waddr; bb_wdata = bpl_wdata; bb_done = bpl_done; end
      OP_FC:   begin bb_raddr = bfc_raddr; bb_we = bfc_we; bb_waddr = bfc_waddr; bb_wdata = bfc_wdata; bb_done = bfc_done; end
      default: begin bb_raddr = bsm_raddr; bb_done = bsm_done; end
    endcase
  end
  assign bb_rdata = bb_src ? b_rdata : a_rdata;

  logic             a_we;
  logic [FM_AW-1:0] a_waddr;
  fx_t              a_wdata;
  logic             c1_bcast;   // conv1 result also goes to the branch buffer
  assign a_we     = (!run && img_we) || (run && bb_we && bb_src);
  assign a_waddr  = run ? bb_waddr : img_addr;
  assign a_wdata  = run ? bb_wdata : img_data;
  assign c1_bcast = run && bb_we && (bb_step == 3'd0);

  sdp_ram #(.WIDTH(DW), .DEPTH(IMG_H*IMG_W), .AW(FM_AW)) u_buf_a (
    .clk, .we(a_we), .waddr(a_waddr), .wdata(a_wdata), .raddr(bb_raddr), .rdata(a_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(SAVE_WORDS), .AW(FM_AW)) u_buf_b (
    .clk, .we(run && bb_we && !bb_src), .waddr(bb_waddr), .wdata(bb_wdata), .raddr(bb_raddr), .rdata(b_rdata));

  // backbone weights: the addresses below the branch bases
  sdp_ram #(.WIDTH(CW_W), .DEPTH(CW_BC), .AW(CW_AW)) u_bb_cw (
    .clk, .we(cw_we && cw_addr < CW_AW'(CW_BC)), .waddr(cw_addr), .wdata(cw_data),
    .raddr(bcw_raddr), .rdata(bcw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(CB_BC), .AW(CB_AW)) u_bb_cb (
    .clk, .we(cb_we && cb_addr < CB_AW'(CB_BC)), .waddr(cb_addr), .wdata(cb_data),
    .raddr(bcb_raddr), .rdata(bcb_rdata));
  sdp_ram #(.WIDTH(FW_W), .DEPTH(FW_BF), .AW(FW_AW)) u_bb_fw (
    .clk, .we(fw_we && fw_addr < FW_AW'(FW_BF)), .waddr(fw_addr), .wdata(fw_data),
    .raddr(bfw_raddr), .rdata(bfw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(FB_BF), .AW(FB_AW)) u_bb_fb (
    .clk, .we(fb_we && fb_addr < FB_AW'(FB_BF)), .waddr(fb_addr), .wdata(fb_data),
    .raddr(bfb_raddr), .rdata(bfb_rdata));

  // ================= decision sub-network engines and buffers =================
  logic br_go;
  assign br_go = (br_sq == Q_LAUNCH);

  logic             rcv_done, rcv_we, rpl_done, rpl_we, rfc_done, rfc_we, rsm_done, rsm_exit;
  logic             rcv_busy, rpl_busy, rfc_busy, rsm_busy;
  logic [FM_AW-1:0] rcv_raddr, rcv_waddr, rpl_raddr, rpl_waddr, rfc_raddr, rfc_waddr, rsm_raddr;
  fx_t              rcv_wdata, rpl_wdata, rfc_wdata;
  logic [3:0]       rsm_class;
  logic [19:0]      rsm_conf;
  logic [CW_AW-1:0] rcw_raddr;
  logic [CW_W-1:0]  rcw_rdata;
  logic [CB_AW-1:0] rcb_raddr;
  fx_t              rcb_rdata;
  logic [FW_AW-1:0] rfw_raddr;
  logic [FW_W-1:0]  rfw_rdata;
  logic [FB_AW-1:0] rfb_raddr;
  fx_t              rfb_rdata;
  fx_t              br_rdata, c_rdata, d_rdata;

  conv_engine #(.OW_MAX(10)) u_br_conv (
    .clk, .rst_n, .start(br_go && br_cur.op == OP_CONV), .abort(1'b0), .cfg(br_cur.conv),
    .busy(rcv_busy), .done(rcv_done), .fm_raddr(rcv_raddr), .fm_rdata(br_rdata),
    .fm_we(rcv_we), .fm_waddr(rcv_waddr), .fm_wdata(rcv_wdata),
    .w_raddr(rcw_raddr), .w_rdata(rcw_rdata), .b_raddr(rcb_raddr), .b_rdata(rcb_rdata));

  maxpool_engine u_br_pool (
    .clk, .rst_n, .start(br_go && br_cur.op == OP_POOL), .abort(1'b0), .cfg(br_cur.pool),
    .busy(rpl_busy), .done(rpl_done), .fm_raddr(rpl_raddr), .fm_rdata(br_rdata),
    .fm_we(rpl_we), .fm_waddr(rpl_waddr), .fm_wdata(rpl_wdata));

  fc_engine #(.NOUT_MAX(NCLS)) u_br_fc (
    .clk, .rst_n, .start(br_go && br_cur.op == OP_FC), .abort(1'b0), .cfg(br_cur.fc),
    .busy(rfc_busy), .done(rfc_done), .fm_raddr(rfc_raddr), .fm_rdata(br_rdata),
    .fm_we(rfc_we), .fm_waddr(rfc_waddr), .fm_wdata(rfc_wdata),
    .w_raddr(rfw_raddr), .w_rdata(rfw_rdata), .b_raddr(rfb_raddr), .b_rdata(rfb_rdata));

  softmax_exit u_br_smax (
    .clk, .rst_n, .start(br_go && br_cur.op == OP_SMAX), .abort(1'b0), .thr(exit_thr),
    .busy(rsm_busy), .done(rsm_done), .fm_raddr(rsm_raddr), .fm_rdata(br_rdata),
    .class_id(rsm_class), .exit_ok(rsm_exit), .conf_sum(rsm_conf));

  logic [FM_AW-1:0] br_raddr, br_waddr;
  logic             br_we, br_done;
  fx_t              br_wdata;

  always_comb begin
    br_raddr = '0; br_we = 1'b0; br_waddr = '0; br_wdata = '0; br_done = 1'b0;
    unique case (br_cur.op)
      OP_CONV: begin br_raddr = rcv_raddr; br_we = rcv_we; br_waddr = rcv_waddr; br_wdata = rcv_wdata; br_done = rcv_done; end
      OP_POOL: begin br_raddr = rpl_raddr; br_we = rpl_we; br_waddr = rpl_waddr; br_wdata = rpl_wdata; br_done = rpl_done; end
      OP_FC:   begin br_raddr = rfc_raddr; br_we = rfc_we; br_waddr = rfc_waddr; br_wdata = rfc_wdata; br_done = rfc_done; end
      default: begin br_raddr = rsm_raddr; br_done = rsm_done; end
    endcase
  end
  // br_src 0: read C / write D, 1: read D / write C
  assign br_rdata = br_src ? d_rdata : c_rdata;

  logic             c_we;
  logic [FM_AW-1:0] c_waddr;
  fx_t              c_wdata;
  assign c_we    = c1_bcast || (br_sq != Q_IDLE && br_we && br_src);
  assign c_waddr = c1_bcast ? bb_waddr : br_waddr;
  assign c_wdata = c1_bcast ? bb_wdata : br_wdata;

  sdp_ram #(.WIDTH(DW), .DEPTH(SAVE_WORDS), .AW(FM_AW)) u_buf_c (
    .clk, .we(c_we), .waddr(c_waddr), .wdata(c_wdata), .raddr(br_raddr), .rdata(c_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(12*12*C1_OUT), .AW(FM_AW)) u_buf_d (
    .clk, .we(br_sq != Q_IDLE && br_we && !br_src), .waddr(br_waddr), .wdata(br_wdata),
    .raddr(br_raddr), .rdata(d_rdata));

  // branch weights: host addresses from the branch bases up
  sdp_ram #(.WIDTH(CW_W), .DEPTH(CW_WORDS-CW_BC), .AW(CW_AW)) u_br_cw (
    .clk, .we(cw_we && cw_addr >= CW_AW'(CW_BC)), .waddr(cw_addr - CW_AW'(CW_BC)), .wdata(cw_data),
    .raddr(rcw_raddr), .rdata(rcw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(CB_WORDS-CB_BC), .AW(CB_AW)) u_br_cb (
    .clk, .we(cb_we && cb_addr >= CB_AW'(CB_BC)), .waddr(cb_addr - CB_AW'(CB_BC)), .wdata(cb_data),
    .raddr(rcb_raddr), .rdata(rcb_rdata));
  sdp_ram #(.WIDTH(FW_W), .DEPTH(FW_WORDS-FW_BF), .AW(FW_AW)) u_br_fw (
    .clk, .we(fw_we && fw_addr >= FW_AW'(FW_BF)), .waddr(fw_addr - FW_AW'(FW_BF)), .wdata(fw_data),
    .raddr(rfw_raddr), .rdata(rfw_rdata));
  sdp_ram #(.WIDTH(DW), .DEPTH(FB_WORDS-FB_BF), .AW(FB_AW)) u_br_fb (
    .clk, .we(fb_we && fb_addr >= FB_AW'(FB_BF)), .waddr(fb_addr - FB_AW'(FB_BF)), .wdata(fb_data),
    .raddr(rfb_raddr), .rdata(rfb_rdata));

  // ================= sequencers =================
  logic br_exit_now, finish_noexit;
  assign br_exit_now   = (br_sq == Q_WAIT) && br_done && br_cur.op == OP_SMAX && rsm_exit;
  assign abort_bb      = br_exit_now;
  assign finish_noexit = br_noexit && bb_fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; bb_sq <= Q_IDLE; br_sq <= Q_IDLE;
      bb_step <= '0; br_step <= '0; bb_src <= 1'b0; br_src <= 1'b0;
      bb_fin <= 1'b0; br_noexit <= 1'b0; bb_class <= '0;
      done <= 1'b0; class_id <= '0; early_exit <= 1'b0;
      cycles <= '0; overlap_cycles <= '0; bb_aborted <= 1'b0;
    end else begin
      done <= 1'b0;
      if (run) cycles <= cycles + 32'd1;
      if (bb_sq != Q_IDLE && br_sq != Q_IDLE) overlap_cycles <= overlap_cycles + 32'd1;

      if (!run && start) begin
        run <= 1'b1;
        bb_sq <= Q_LAUNCH; bb_step <= '0; bb_src <= 1'b0;
        br_step <= '0; br_src <= 1'b0;
        bb_fin <= 1'b0; br_noexit <= 1'b0;
        cycles <= '0; overlap_cycles <= '0; bb_aborted <= 1'b0;
      end

      // backbone
      unique case (bb_sq)
        Q_LAUNCH: bb_sq <= Q_WAIT;
        Q_WAIT: if (bb_done) begin
          if (bb_cur.op != OP_SMAX) begin
            bb_src  <= ~bb_src;
            bb_step <= bb_step + 3'd1;
            bb_sq   <= Q_LAUNCH;
            if (bb_step == 3'd0) br_sq <= Q_LAUNCH;   // conv1 done: start the branch
          end else begin
            bb_fin   <= 1'b1;
            bb_class <= bsm_class;
            bb_sq    <= Q_IDLE;
          end
        end
        default: ;
      endcase

      // decision sub-network
      unique case (br_sq)
        Q_LAUNCH: br_sq <= Q_WAIT;
        Q_WAIT: if (br_done) begin
          if (br_cur.op != OP_SMAX) begin
            br_src  <= ~br_src;
            br_step <= br_step + 2'd1;
            br_sq   <= Q_LAUNCH;
          end else begin
            br_sq <= Q_IDLE;
            if (!rsm_exit) br_noexit <= 1'b1;
          end
        end
        default: ;
      endcase

      if (br_exit_now) begin
        bb_aborted <= (bb_sq != Q_IDLE);
        bb_sq      <= Q_IDLE;
        class_id   <= rsm_class;
        early_exit <= 1'b1;
        done       <= 1'b1;
        run        <= 1'b0;
      end else if (finish_noexit) begin
        class_id   <= bb_class;
        early_exit <= 1'b0;
        done       <= 1'b1;
        run        <= 1'b0;
        br_noexit  <= 1'b0;
        bb_fin     <= 1'b0;
      end
    end
  end

  // the sub-network only runs inside an inference, and only after conv1
  a_branch_in_run: assert property (@(posedge clk) disable iff (!rst_n)
                                    (br_sq != Q_IDLE) |-> (run && bb_step != 3'd0));
endmodule
