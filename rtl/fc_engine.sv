// fc_engine: runtime-configurable fully connected layer, out = W*in + b,
// with optional ReLU, used for every FC layer of the backbone and of the
// decision sub-network.
//
// Following the source design, the long flattened input vector and the weight
// rows are split into equal parts of LANES elements that are computed
// separately: for each part (chunk) the engine loads LANES inputs into a
// register (one buffer read per cycle), then streams the neurons, reading one
// LANES-wide weight word per neuron per cycle. LANES multipliers and an adder
// tree form the partial dot product, which is added into that neuron's
// accumulator (cleared by chunk 0). After the last chunk each accumulator
// gets its bias and is requantised to Q3.5 (ReLU if cfg.relu) and written out
// at address j. Lanes past n_in read as zero. The number of parts and this
// loop order are this design's choice.
//
// Timing: ceil(n_in/LANES)*(LANES + n_out + 2) + n_out + 2 cycles, counting
// the start cycle and the done cycle. Address bits above 7 of fm_waddr are
// always 0, as a layer has at most 255 outputs. cfg is
// sampled on start; done pulses for one cycle with the last write; abort
// returns to idle. All memories have a 1-cycle read latency.
module fc_engine import lenet_pkg::*; #(
  parameter int NOUT_MAX = 84,
  parameter int LANES    = FC_LANES
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                abort,
  input  fc_cfg_t             cfg,
  output logic                busy,
  output logic                done,
  output logic [FM_AW-1:0]    fm_raddr,
  input  fx_t                 fm_rdata,
  output logic                fm_we,
  output logic [FM_AW-1:0]    fm_waddr,
  output fx_t                 fm_wdata,
  output logic [FW_AW-1:0]    w_raddr,
  input  logic [LANES*DW-1:0] w_rdata,
  output logic [FB_AW-1:0]    b_raddr,
  input  fx_t                 b_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LWAIT, S_MAC, S_MWAIT, S_OUT, S_OWAIT} state_e;

  localparam int LW = $clog2(LANES);

  state_e           st;
  fc_cfg_t          c;
  logic [FM_AW-1:0] nch, chunk;
  logic [7:0]       j;
  logic [LW-1:0]    l;

  fx_t                     xreg [LANES];
  logic signed [ACC_W-1:0] acc  [NOUT_MAX];

  // load pipeline
  logic          lv1, lz1;
  logic [LW-1:0] l1;
  // mac pipeline
  logic          mv1;
  logic [7:0]    mj1;
  // output pipeline
  logic          ov1;
  logic [7:0]    oj1;

  logic [FM_AW-1:0]        idx;
  logic signed [15:0]      prod [LANES];
  logic signed [ACC_W-1:0] dot;

  assign busy     = (st != S_IDLE);
  assign nch      = (c.n_in + FM_AW'(LANES - 1)) >> LW;
  assign idx      = FM_AW'(int'(chunk) * LANES + int'(l));
  assign fm_raddr = idx;
  assign w_raddr  = c.w_base + FW_AW'(int'(j) * int'(nch) + int'(chunk));
  assign b_raddr  = c.b_base + FB_AW'(j);

  for (genvar g = 0; g < LANES; g++) begin : g_mul
    logic signed [15:0] a, b;
    assign a       = xreg[g];
    assign b       = fx_t'(w_rdata[g*DW +: DW]);
    assign prod[g] = a * b;
  end
  adder_tree #(.N(LANES), .IW(16), .OW(ACC_W)) u_tree (.in(prod), .sum(dot));

  assign fm_we    = ov1;
  assign fm_waddr = FM_AW'(oj1);
  assign fm_wdata = requant(acc[oj1], b_rdata, c.relu);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; c <= '0; chunk <= '0; j <= '0; l <= '0;
      lv1 <= 1'b0; lz1 <= 1'b0; l1 <= '0;
      mv1 <= 1'b0; mj1 <= '0; ov1 <= 1'b0; oj1 <= '0;
      done <= 1'b0;
      for (int i = 0; i < LANES; i++) xreg[i] <= '0;
      for (int i = 0; i < NOUT_MAX; i++) acc[i] <= '0;
    end else begin
      done <= 1'b0;

      lv1 <= (st == S_LOAD);
      lz1 <= (idx >= c.n_in);
      l1  <= l;
      if (lv1) xreg[l1] <= lz1 ? '0 : fm_rdata;

      mv1 <= (st == S_MAC);
      mj1 <= j;
      if (mv1) acc[mj1] <= ((chunk == '0) ? '0 : acc[mj1]) + dot;

      ov1 <= (st == S_OUT);
      oj1 <= j;

      unique case (st)
        S_IDLE: if (start) begin
          c     <= cfg;
          chunk <= '0;
          l     <= '0;
          st    <= S_LOAD;
        end
        S_LOAD: begin
          l <= l + 1'b1;
          if (l == LW'(LANES - 1)) st <= S_LWAIT;
        end
        S_LWAIT: begin
          j  <= '0;
          st <= S_MAC;
        end
        S_MAC: begin
          if (j == c.n_out - 8'd1) st <= S_MWAIT;
          else                     j  <= j + 8'd1;
        end
        S_MWAIT: begin
          j <= '0;
          if (chunk == nch - 1'b1) begin
            st <= S_OUT;
          end else begin
            chunk <= chunk + 1'b1;
            l     <= '0;
            st    <= S_LOAD;
          end
        end
        S_OUT: begin
          if (j == c.n_out - 8'd1) st <= S_OWAIT;
          else                     j  <= j + 8'd1;
        end
        S_OWAIT: begin
          st   <= S_IDLE;
          done <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase

      if (abort) begin
        st  <= S_IDLE;
        lv1 <= 1'b0;
        mv1 <= 1'b0;
        ov1 <= 1'b0;
      end
    end
  end
endmodule
