// maxpool_engine: 2x2, stride-2 max pooling over a channel-major feature map.
//
// The source design implements pooling with a sliding window that computes
// the maximum of the values it covers; here the window is 2x2 and moves by
// two, the LeNet pooling. The four window values of an output pixel are read
// in four consecutive cycles (1-cycle read latency) and reduced by a running
// maximum; the read of the next window overlaps the write of the previous
// one, so a layer takes ch*(in_h/2)*(in_w/2)*4 + 2 cycles. Odd rows and
// columns at the far edge are dropped (floor). Pooling is applied after ReLU,
// so no activation follows. cfg is sampled on start, done pulses for one
// cycle after the last write, abort returns to idle.
module maxpool_engine import lenet_pkg::*; (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             abort,
  input  pool_cfg_t        cfg,
  output logic             busy,
  output logic             done,
  output logic [FM_AW-1:0] fm_raddr,
  input  fx_t              fm_rdata,
  output logic             fm_we,
  output logic [FM_AW-1:0] fm_waddr,
  output fx_t              fm_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;

  state_e     st;
  pool_cfg_t  c;
  logic [7:0] ch, oy, ox, oh, ow;
  logic [1:0] p;                    // window position {row, col}

  logic             v1;
  logic [1:0]       p1;
  logic [FM_AW-1:0] wa1;
  fx_t              m;
  fx_t              mx;

  assign oh = c.in_h >> 1;
  assign ow = c.in_w >> 1;
  assign busy = (st != S_IDLE);

  assign fm_raddr = FM_AW'(int'(ch) * int'(c.in_h) * int'(c.in_w)
                         + (2*int'(oy) + int'(p[1])) * int'(c.in_w)
                         + 2*int'(ox) + int'(p[0]));

  assign mx       = (p1 == 2'd0 || fm_rdata > m) ? fm_rdata : m;
  assign fm_we    = v1 && (p1 == 2'd3);
  assign fm_waddr = wa1;
  assign fm_wdata = mx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0;
      ch <= '0; oy <= '0; ox <= '0; p <= '0;
      v1 <= 1'b0; p1 <= '0; wa1 <= '0; m <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= (st == S_RUN);
      p1   <= p;
      wa1  <= FM_AW'(int'(ch) * int'(oh) * int'(ow) + int'(oy) * int'(ow) + int'(ox));
      if (v1) m <= mx;

      unique case (st)
        S_IDLE: if (start) begin
          c  <= cfg;
          ch <= '0; oy <= '0; ox <= '0; p <= '0;
          st <= S_RUN;
        end
        S_RUN: begin
          p <= p + 2'd1;
          if (p == 2'd3) begin
            if (ox == ow - 8'd1) begin
              ox <= '0;
              if (oy == oh - 8'd1) begin
                oy <= '0;
                if (ch == c.ch - 8'd1) st <= S_FLUSH;
                else                   ch <= ch + 8'd1;
              end else begin
                oy <= oy + 8'd1;
              end
            end else begin
              ox <= ox + 8'd1;
            end
          end
        end
        S_FLUSH: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase

      if (abort) begin
        st <= S_IDLE;
        v1 <= 1'b0;
      end
    end
  end
endmodule
