// c_l_addr: adder module (AM) of the Hadamard transform, c = a + b.
//
// A carry look-ahead adder (cla_core) followed by an output register: the
// sum and the carry out are captured on the rising clock edge, so every
// layer of adder modules in the transform is one pipeline stage. Operands
// are W-bit two's-complement words; the sum keeps W bits and wraps, the
// carry out is the unsigned carry of the addition.
//
// Interface (port names as in the published schematic): a_in, b_in,
// carry_in, clk in; sum, carry_out out. Timing: sum and carry_out show
// a_in + b_in + carry_in one clock after the operands are applied.
//
// From the source design: the function c = a + b, the carry look-ahead
// style, the port list and the 16-bit width. Own choices: registering
// inside the module (the schematic gives each module a clock, the text
// does not say what it clocks) and the absence of a reset, since no reset
// pin is shown and the pipeline flushes itself within its latency.
module c_l_addr #(
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

  cla_core #(.W(W)) u_cla (
    .a   (a_in),
    .b   (b_in),
    .cin (carry_in),
    .s   (s),
    .cout(co)
  );

  always_ff @(posedge clk) begin
    sum       <= s;
    carry_out <= co;
  end

endmodule
