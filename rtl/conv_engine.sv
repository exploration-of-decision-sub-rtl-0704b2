// conv_engine: runtime-configurable convolution layer (stride 1, no padding)
// with bias and ReLU, used for every convolution of the backbone and of the
// decision sub-network.
//
// As in the source design, input pixels pass through a sliding window the
// size of the kernel, an array of processing elements multiplies the window
// by the kernel, an adder tree sums the products, the bias is added and ReLU
// is applied before the result is written to the buffer that feeds the next
// layer. The scheduling around that datapath is this design's:
//
//   for each output channel oc, output row oy:
//     for each input channel ic:
//       fetch the KxK kernel (oc,ic) as one word, then stream the input rows
//       oy..oy+k-1 column by column (k reads per column, one read per cycle).
//       Each finished column is shifted into the window; once k columns are
//       in, the PE array + adder tree produce the partial sum of one output
//       pixel, which is added into a row accumulator (cleared by ic = 0).
//     write the row: requant(acc + bias) with ReLU, one pixel per cycle.
//
// The window and PE array are sized for KMAX; a smaller k uses the top rows
// and right-most columns (see pe_array). cfg is sampled on start. One layer
// takes out_ch*oh*(in_ch*(in_w*k + 5) + ow) + 1 cycles, counting the start
// cycle and the done cycle. done pulses for one cycle after the last write; abort returns the engine to idle at once.
//
// Ports: fm_* read the source feature map (1-cycle read latency) and write
// the result, w_* and b_* read the kernel and bias memories (1-cycle latency).
module conv_engine import lenet_pkg::*; #(
  parameter int OW_MAX = 24    // widest output row (24 for the first layer)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             abort,
  input  conv_cfg_t        cfg,
  output logic             busy,
  output logic             done,
  output logic [FM_AW-1:0] fm_raddr,
  input  fx_t              fm_rdata,
  output logic             fm_we,
  output logic [FM_AW-1:0] fm_waddr,
  output fx_t              fm_wdata,
  output logic [CW_AW-1:0] w_raddr,
  input  logic [CW_W-1:0]  w_rdata,
  output logic [CB_AW-1:0] b_raddr,
  input  fx_t              b_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_WFETCH, S_WLATCH, S_STREAM, S_DRAIN, S_WRITE} state_e;

  state_e    st;
  conv_cfg_t c;
  logic [7:0] oc, oy, ic, col, ox, oh, ow;
  logic [2:0] r;

  fx_t win   [KMAX*KMAX];
  fx_t wreg  [KMAX*KMAX];
  fx_t stage [KMAX];
  fx_t bias;
  logic signed [ACC_W-1:0] rowacc [OW_MAX];

  // read pipeline: stage 1 = buffer data returned, stage 2 = window complete
  logic       v1, last1;
  logic [2:0] r1;
  logic [7:0] col1;
  logic       v2;
  logic [7:0] ox2;

  logic signed [15:0]      prod [KMAX*KMAX];
  logic signed [ACC_W-1:0] psum;

  assign oh = c.in_h - 8'(c.k) + 8'd1;
  assign ow = c.in_w - 8'(c.k) + 8'd1;

  assign busy     = (st != S_IDLE);
  assign fm_raddr = FM_AW'(int'(ic) * int'(c.in_h) * int'(c.in_w)
                         + (int'(oy) + int'(r)) * int'(c.in_w) + int'(col));
  assign w_raddr  = c.w_base + CW_AW'(int'(oc) * int'(c.in_ch) + int'(ic));
  assign b_raddr  = c.b_base + CB_AW'(oc);

  assign fm_we    = (st == S_WRITE);
  assign fm_waddr = FM_AW'(int'(oc) * int'(oh) * int'(ow) + int'(oy) * int'(ow) + int'(ox));
  assign fm_wdata = requant(rowacc[ox], bias, c.relu);

  pe_array #(.K(KMAX)) u_pe (.win(win), .w(wreg), .k(c.k), .prod(prod));
  adder_tree #(.N(KMAX*KMAX), .IW(16), .OW(ACC_W)) u_tree (.in(prod), .sum(psum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S_IDLE;
      c    <= '0;
      oc   <= '0; oy <= '0; ic <= '0; col <= '0; ox <= '0; r <= '0;
      v1   <= 1'b0; v2 <= 1'b0; last1 <= 1'b0; r1 <= '0; col1 <= '0; ox2 <= '0;
      done <= 1'b0;
      bias <= '0;
      for (int i = 0; i < KMAX*KMAX; i++) begin
        win[i]  <= '0;
        wreg[i] <= '0;
      end
      for (int i = 0; i < KMAX; i++) stage[i] <= '0;
      for (int i = 0; i < OW_MAX; i++) rowacc[i] <= '0;
    end else begin
      done <= 1'b0;

      // stage 1: a window row value came back from the buffer
      v1    <= (st == S_STREAM);
      r1    <= r;
      col1  <= col;
      last1 <= (r == c.k - 3'd1);
      v2    <= 1'b0;
      if (v1) begin
        if (!last1) begin
          stage[r1] <= fm_rdata;
        end else begin
          for (int rr = 0; rr < KMAX; rr++) begin
            for (int cc = 0; cc < KMAX-1; cc++) win[rr*KMAX+cc] <= win[rr*KMAX+cc+1];
            win[rr*KMAX+KMAX-1] <= (rr == int'(r1)) ? fm_rdata : stage[rr];
          end
          v2  <= (col1 >= 8'(c.k) - 8'd1);
          ox2 <= col1 - (8'(c.k) - 8'd1);
        end
      end

      // stage 2: window complete, accumulate the PE/adder-tree result
      if (v2) rowacc[ox2] <= ((ic == 8'd0) ? '0 : rowacc[ox2]) + psum;

      unique case (st)
        S_IDLE: if (start) begin
          c  <= cfg;
          oc <= '0; oy <= '0; ic <= '0;
          st <= S_WFETCH;
        end
        S_WFETCH: st <= S_WLATCH;
        S_WLATCH: begin
          for (int i = 0; i < KMAX*KMAX; i++) wreg[i] <= w_rdata[i*DW +: DW];
          bias <= b_rdata;
          r    <= '0;
          col  <= '0;
          st   <= S_STREAM;
        end
        S_STREAM: begin
          if (r == c.k - 3'd1) begin
            r <= '0;
            if (col == c.in_w - 8'd1) st <= S_DRAIN;
            else                      col <= col + 8'd1;
          end else begin
            r <= r + 3'd1;
          end
        end
        S_DRAIN: if (!v1 && !v2) begin
          if (ic == c.in_ch - 8'd1) begin
            ox <= '0;
            st <= S_WRITE;
          end else begin
            ic <= ic + 8'd1;
            st <= S_WFETCH;
          end
        end
        S_WRITE: begin
          if (ox == ow - 8'd1) begin
            ox <= '0;
            ic <= '0;
            if (oy == oh - 8'd1) begin
              oy <= '0;
              if (oc == c.out_ch - 8'd1) begin
                st   <= S_IDLE;
                done <= 1'b1;
              end else begin
                oc <= oc + 8'd1;
                st <= S_WFETCH;
              end
            end else begin
              oy <= oy + 8'd1;
              st <= S_WFETCH;
            end
          end else begin
            ox <= ox + 8'd1;
          end
        end
        default: st <= S_IDLE;
      endcase

      if (abort) begin
        st <= S_IDLE;
        v1 <= 1'b0;
        v2 <= 1'b0;
      end
    end
  end
endmodule
