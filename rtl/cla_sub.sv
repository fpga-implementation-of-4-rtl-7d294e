// cla_sub: subtractor module (SM) of the Hadamard transform, c = a - b.
//
// Subtraction is done on the same carry look-ahead adder as the adder
// module, as a + ~b + 1; the result is registered on the rising clock
// edge, one pipeline stage like the adder module. Operands are W-bit
// two's-complement words and the difference wraps to W bits.
//
// Interface (port names as in the published schematic): a_in, b_in,
// carry_in, clk in; sum, carry_out out. For this module carry_in is a
// borrow in and carry_out a borrow out: sum = a_in - b_in - carry_in, and
// carry_out is 1 when that difference, taken as unsigned, is below zero.
// Timing: one clock from operands to result.
//
// From the source design: the function c = a - b, the carry look-ahead
// style and the port names. Own choices: the borrow meaning of the carry
// pins, the output register and the absence of a reset.
module cla_sub #(
  parameter int unsigned W = dht_pkg::DATA_W
) (
  input  logic         clk,
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b_in,
  input  logic         carry_in,
  output logic [W-1:0] sum,
  output logic         carry_out
);

  logic [W-1:0] s;
  logic         co;

  // a - b - borrow_in = a + ~b + (1 - borrow_in)
  cla_core #(.W(W)) u_cla (
    .a   (a_in),
    .b   (~b_in),
    .cin (~carry_in),
    .s   (s),
    .cout(co)
  );

  always_ff @(posedge clk) begin
    sum       <= s;
    carry_out <= ~co;
  end

endmodule
