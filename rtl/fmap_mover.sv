// fmap_mover: copies a block of feature-map words from one memory to another.
//
// In the pipeline approach the output of the layer in front of the decision
// sub-network is stored while the shared engines run the sub-network and is
// loaded back if no early exit is taken. The source design describes that
// store and load (2.88 kB for the network here) but not the mechanism; this
// block is the simplest one: one word per cycle, read at address i of the
// source (1-cycle latency) and written at the same address of the
// destination, n_words + 2 cycles in all. done pulses for one cycle after the
// last write. dst_wdata is src_rdata, passed through without a register.
module fmap_mover import lenet_pkg::*; (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [FM_AW-1:0] n_words,
  output logic             busy,
  output logic             done,
  output logic [FM_AW-1:0] src_raddr,
  input  fx_t              src_rdata,
  output logic             dst_we,
  output logic [FM_AW-1:0] dst_waddr,
  output fx_t              dst_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FLUSH} state_e;

  state_e           st;
  logic [FM_AW-1:0] n, i, i1;
  logic             v1;

  assign busy      = (st != S_IDLE);
  assign src_raddr = i;
  assign dst_we    = v1;
  assign dst_waddr = i1;
  assign dst_wdata = src_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; n <= '0; i <= '0; i1 <= '0; v1 <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      v1   <= (st == S_RUN);
      i1   <= i;
      unique case (st)
        S_IDLE: if (start && n_words != '0) begin
          n  <= n_words;
          i  <= '0;
          st <= S_RUN;
        end
        S_RUN: begin
          if (i == n - 1'b1) st <= S_FLUSH;
          else               i  <= i + 1'b1;
        end
        S_FLUSH: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
