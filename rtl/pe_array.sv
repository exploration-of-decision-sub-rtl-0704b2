// pe_array: the KMAX x KMAX array of processing elements of the convolution
// engine.
//
// PE (r,c) multiplies window value win[r*KMAX+c] by weight w[r*KMAX+c]; both
// are Q3.5, the product is a full-precision Q6.10 16-bit value. The array is
// sized for the largest kernel; for a smaller runtime kernel size k only the
// k x k PEs in rows 0..k-1 and the k right-most columns are enabled, the
// others output zero. That column alignment matches the sliding window, whose
// newest column is the right-most. Purely combinational. The source design
// says only that the PEs multiply the input window by the kernel; the
// masking scheme is this design's.
module pe_array import lenet_pkg::*; #(
  parameter int K = KMAX
) (
  input  fx_t                win [K*K],
  input  fx_t                w   [K*K],
  input  logic [2:0]         k,
  output logic signed [15:0] prod [K*K]
);
  for (genvar r = 0; r < K; r++) begin : g_row
    for (genvar c = 0; c < K; c++) begin : g_col
      logic               en;
      logic signed [15:0] a, b;
      assign a  = win[r*K+c];   // sign-extending
      assign b  = w[r*K+c];
      assign en = (r < int'(k)) && (c >= K - int'(k));
      assign prod[r*K+c] = en ? a * b : '0;
    end
  end
endmodule
