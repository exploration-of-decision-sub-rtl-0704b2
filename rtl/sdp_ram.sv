// sdp_ram: simple dual-port memory used for every feature-map buffer, the
// stored intermediate and the weight and bias memories.
//
// One write port and one read port on the same clock. The read is
// synchronous: the word at raddr appears on rdata one cycle later, as in an
// FPGA block RAM. A write and a read of the same address in one cycle return
// the old word. Contents are not reset; every location an engine reads is
// written first. The source design only says that layer results are stored
// in buffers feeding the next layer; the port arrangement is this design's.
module sdp_ram #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 1024,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && 32'(waddr) < DEPTH) mem[waddr] <= wdata;
    rdata <= (32'(raddr) < DEPTH) ? mem[raddr] : '0;
  end
endmodule
