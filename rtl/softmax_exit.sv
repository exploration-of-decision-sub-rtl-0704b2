// softmax_exit: softmax classifier of an exit point and the early-exit
// decision.
//
// The source design applies a softmax to the NCLS logits at every exit point
// to classify the image, and the decision sub-network's softmax decides
// whether the early exit is taken. The decision rule is not given there;
// this design exits when the largest softmax probability reaches a
// programmable threshold thr/256 (thr = 0 always exits, 255 almost never).
//
// Two passes over the logits in the buffer (one read per cycle, 1-cycle
// latency): pass 1 finds the largest logit zmax and its index (the lowest
// index on ties), which is the class; pass 2 sums
//     S = sum_i 2^(-(zmax - z_i) * log2(e))          (Q1.15, max term 1.0)
// with d = zmax - z_i in Q3.5 and x = d*log2(e) formed as d*369/8192,
// rounded to sixteenths: a 16-entry table gives 2^(-f/16) for the fraction
// and a right shift the integer part (terms below 2^-15 vanish). Each term
// is within about 2.2% of the exact exponential. pmax = 1/S, so
//     exit_ok = thr * S <= 2^23     <=>   pmax >= thr/256.
// No divider or exponential unit is needed. Latency 2*NCLS + 4 cycles; done
// pulses for one cycle, class_id / exit_ok / conf_sum hold until the next
// start. Only the low 4 bits of fm_raddr change: the logits sit at
// addresses 0..NCLS-1 of the buffer.
module softmax_exit import lenet_pkg::*; (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             abort,
  input  logic [7:0]       thr,
  output logic             busy,
  output logic             done,
  output logic [FM_AW-1:0] fm_raddr,
  input  fx_t              fm_rdata,
  output logic [3:0]       class_id,
  output logic             exit_ok,
  output logic [19:0]      conf_sum
);
  typedef enum logic [2:0] {S_IDLE, S_P1, S_P1W, S_P2, S_P2W, S_DEC} state_e;

  state_e     st;
  logic [3:0] i, i1;
  logic       v1, pass2;
  fx_t        zmax;
  logic [3:0] arg;
  logic [19:0] s;

  function automatic logic [15:0] exp2neg(logic [8:0] d);
    logic [17:0] t;
    logic [3:0]  n;
    logic [3:0]  f;
    logic [15:0] base;
    t = 18'(d) * 18'd369 + 18'd256;      // x in Q.13, rounded to 1/16
    n = 4'(t >> 13);
    f = t[12:9];
    unique case (f)
      4'd0:  base = 16'd32768;
      4'd1:  base = 16'd31379;
      4'd2:  base = 16'd30048;
      4'd3:  base = 16'd28774;
      4'd4:  base = 16'd27554;
      4'd5:  base = 16'd26386;
      4'd6:  base = 16'd25268;
      4'd7:  base = 16'd24196;
      4'd8:  base = 16'd23170;
      4'd9:  base = 16'd22188;
      4'd10: base = 16'd21247;
      4'd11: base = 16'd20347;
      4'd12: base = 16'd19484;
      4'd13: base = 16'd18658;
      4'd14: base = 16'd17867;
      default: base = 16'd17109;
    endcase
    return base >> n;
  endfunction

  logic [8:0] diff;
  assign diff     = 9'(10'(zmax) - 10'(fm_rdata));
  assign busy     = (st != S_IDLE);
  assign fm_raddr = FM_AW'(i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; i <= '0; i1 <= '0; v1 <= 1'b0; pass2 <= 1'b0;
      zmax <= '0; arg <= '0; s <= '0;
      class_id <= '0; exit_ok <= 1'b0; conf_sum <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= (st == S_P1) || (st == S_P2);
      i1   <= i;
      if (v1 && !pass2) begin
        if (i1 == 4'd0 || fm_rdata > zmax) begin
          zmax <= fm_rdata;
          arg  <= i1;
        end
      end
      if (v1 && pass2) s <= ((i1 == 4'd0) ? 20'd0 : s) + 20'(exp2neg(diff));

      unique case (st)
        S_IDLE: if (start) begin
          i     <= '0;
          pass2 <= 1'b0;
          st    <= S_P1;
        end
        S_P1: begin
          if (i == 4'(NCLS - 1)) st <= S_P1W;
          else                   i  <= i + 4'd1;
        end
        S_P1W: begin
          i     <= '0;
          pass2 <= 1'b1;
          st    <= S_P2;
        end
        S_P2: begin
          if (i == 4'(NCLS - 1)) st <= S_P2W;
          else                   i  <= i + 4'd1;
        end
        S_P2W: st <= S_DEC;
        S_DEC: begin
          class_id <= arg;
          conf_sum <= s;
          exit_ok  <= (28'(thr) * 28'(s)) <= 28'd8388608;
          done     <= 1'b1;
          st       <= S_IDLE;
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
