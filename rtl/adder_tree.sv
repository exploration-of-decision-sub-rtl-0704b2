// adder_tree: combinational balanced binary adder tree.
//
// Sums N signed inputs of IW bits into one signed OW-bit result. The inputs
// are padded with zeros to the next power of two and reduced pairwise, level
// by level (heap numbering: node i adds nodes 2i+1 and 2i+2), so the depth is
// log2(N) adders. In the source design the tree follows the PE array and
// gathers its products; that it is purely combinational is this design's
// choice (the enclosing engines register its output).
module adder_tree #(
  parameter int N  = 25,
  parameter int IW = 16,
  parameter int OW = 24
) (
  input  logic signed [IW-1:0] in  [N],
  output logic signed [OW-1:0] sum
);
  localparam int N2 = (N > 1) ? (1 << $clog2(N)) : 1;

  logic signed [OW-1:0] node [2*N2-1];

  for (genvar i = 0; i < N2; i++) begin : g_leaf
    if (i < N) begin : g_in
      assign node[N2-1+i] = OW'(in[i]);
    end else begin : g_pad
      assign node[N2-1+i] = '0;
    end
  end

  for (genvar i = 0; i < N2-1; i++) begin : g_add
    assign node[i] = node[2*i+1] + node[2*i+2];
  end

  assign sum = node[0];
endmodule
