// operand_buffer: input activation buffer / weight buffer of the PE.
//
// A DEPTH-entry register file of WIDTH-bit operand words (one operand per word), with one
// synchronous write port and one combinational read port. The PE holds two of
// them, one for activations and one for weights, and reads entry i of both
// to form the i-th product of a dot product. Contents are not reset; every
// entry that is read must have been written.
//
// The two buffers feeding the separator follow the PE diagram; the depth,
// the port arrangement and the combinational read are this design's choices.
module operand_buffer #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
