// dyn_lenet_top: FPGA accelerator for an early-exit (BranchyNet) LeNet-5 that
// classifies 28x28 MNIST digits, with a decision sub-network after the first
// convolution that can end the inference early.
//
// APPROACH selects how the decision sub-network is realised, the two
// architectures the source design explores:
//   APPR_PIPELINE (default) - the backbone's own engines run the sub-network
//                  while the backbone is stalled; the conv1 output is stored
//                  and reloaded (pipeline_accel).
//   APPR_PARALLEL - dedicated engines run the sub-network alongside the
//                  backbone; an exit aborts the backbone (parallel_accel).
// The default is the pipeline approach, the one the source design reports
// as its most energy-efficient; the choice of default is this design's.
//
// Interface (see pipeline_accel): the host loads weights, biases and the
// image through write ports while the accelerator is idle, pulses start with
// an exit threshold exit_thr (exit when the branch's top softmax probability
// >= exit_thr/256), and waits for done with class_id and early_exit.
// stat_a is stall_cycles (pipeline) or overlap_cycles (parallel); stat_b is
// the number of words stored and reloaded (pipeline) or 1 when an early exit
// aborted a running backbone (parallel).
//
// Timing at the default layer sizes, from start to done: pipeline 50088
// cycles with an early exit and 91306 without; parallel 47205 and 58618.
module dyn_lenet_top import lenet_pkg::*; #(
  parameter approach_e APPROACH = APPR_PIPELINE
) (
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
  output logic [31:0]      stat_a,
  output logic [15:0]      stat_b
);
  if (APPROACH == APPR_PIPELINE) begin : g_pipeline
    pipeline_accel u_acc (
      .clk, .rst_n, .start, .exit_thr,
      .img_we, .img_addr, .img_data,
      .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
      .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
      .busy, .done, .class_id, .early_exit, .cycles,
      .stall_cycles(stat_a), .xfer_words(stat_b));
  end else begin : g_parallel
    logic aborted;
    parallel_accel u_acc (
      .clk, .rst_n, .start, .exit_thr,
      .img_we, .img_addr, .img_data,
      .cw_we, .cw_addr, .cw_data, .cb_we, .cb_addr, .cb_data,
      .fw_we, .fw_addr, .fw_data, .fb_we, .fb_addr, .fb_data,
      .busy, .done, .class_id, .early_exit, .cycles,
      .overlap_cycles(stat_a), .bb_aborted(aborted));
    assign stat_b = {15'd0, aborted};
  end
endmodule
