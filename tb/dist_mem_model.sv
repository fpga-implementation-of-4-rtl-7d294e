// dist_mem_model: behavioural model of a single-port distributed RAM with
// asynchronous read, the memory the Hadamard-transform prototype runs over.
//
// Not synthesizable design content: it stands in for the FPGA vendor's
// LUT-based RAM generator, configured as 64 words of 16 bits. Ports follow
// that generator's single-port configuration: address a, write data d,
// write enable we, clock clk, read data spo. A write happens on the rising
// edge while we is high; spo shows the addressed word combinationally.
// Testbenches load and inspect the contents through the mem array.
module dist_mem_model #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = 6,
  parameter int unsigned W     = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] a,
  input  logic [W-1:0]  d,
  input  logic          we,
  output logic [W-1:0]  spo
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[a] <= d;
  end

  assign spo = mem[a];

endmodule
