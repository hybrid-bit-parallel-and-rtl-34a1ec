// psum_buffer: output / partial-sum buffer of the PE.
//
// DEPTH entries, each a partial sum in the PE's extended format: a sign bit,
// a signed XW-bit exponent and an ACC_W-bit magnitude,
// value = (-1)^sign * man * 2^exp. The accumulator writes through the
// synchronous write port; the combinational read port feeds the partial sum
// back to the exponent normalizer and accumulator, and a second
// combinational read port lets the host read results. Reset clears every
// entry to zero.
//
// The buffer and its feedback path follow the PE diagram; the entry format,
// depth, ports and reset are this design's choices.
module psum_buffer
  import hybrid_pkg::*;
#(
  parameter int REGISTER_WIDTH = 16,
  parameter int ACC_W          = 24,
  parameter int DEPTH          = 16,
  localparam int XW            = exp_w(REGISTER_WIDTH),
  localparam int AW            = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic                 wsign,
  input  logic signed [XW-1:0] wexp,
  input  logic [ACC_W-1:0]     wman,
  input  logic [AW-1:0]        raddr,
  output logic                 rsign,
  output logic signed [XW-1:0] rexp,
  output logic [ACC_W-1:0]     rman,
  input  logic [AW-1:0]        host_raddr,
  output logic                 host_rsign,
  output logic signed [XW-1:0] host_rexp,
  output logic [ACC_W-1:0]     host_rman
);
  typedef struct packed {
    logic                 sign;
    logic signed [XW-1:0] exp;
    logic [ACC_W-1:0]     man;
  } entry_t;

  entry_t mem [DEPTH];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= '{sign: wsign, exp: wexp, man: wman};
    end
  end

  assign {rsign, rexp, rman}                = mem[raddr];
  assign {host_rsign, host_rexp, host_rman} = mem[host_raddr];
endmodule
