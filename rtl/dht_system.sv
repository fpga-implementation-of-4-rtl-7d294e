// dht_system: Hadamard-transform prototype, a transform core run over a
// sample memory.
//
// Samples (for instance the pixels of an image) sit in a single-port
// memory of DEPTH words outside this module. On start, dht_mem_ctrl reads
// them POINTS at a time into the transform core, waits for the core's
// pipeline and writes the POINTS transformed words back to the addresses
// they came from, until the whole memory has been transformed; then done
// pulses. With the default POINTS = 8 the core is dht_8 (which contains
// two dht_4); POINTS = 4 selects dht_4 alone.
//
// Interface: clk, rst_n (asynchronous, active low), start, busy, done, and
// the memory port mem_a, mem_d, mem_we (to the memory), mem_spo (its
// asynchronous read data). Timing: a full pass takes
// 1 + (DEPTH/POINTS) * (2*POINTS + LATENCY) cycles from the start pulse to
// done, LATENCY being 3 for 8 points and 2 for 4 points; with the defaults
// 1 + 8 * 19 = 153 cycles.
//
// From the source design: the memory-to-transform-to-memory flow, the
// 64 x 16 single-port memory with address a, data d, write enable we and
// read data spo, and the 8-point core. Own choices: the sequencing (see
// dht_mem_ctrl) and keeping the memory outside, so that any single-port
// RAM with asynchronous read can be attached.
module dht_system #(
  parameter int unsigned POINTS = 8,
  parameter int unsigned W      = dht_pkg::DATA_W,
  parameter int unsigned DEPTH  = dht_pkg::MEM_DEPTH,
  parameter int unsigned AW     = dht_pkg::MEM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] mem_a,
  output logic [W-1:0]  mem_d,
  output logic          mem_we,
  input  logic [W-1:0]  mem_spo
);

  localparam int unsigned LATENCY = (POINTS == 8) ? dht_pkg::DHT8_LATENCY
                                                  : dht_pkg::DHT4_LATENCY;

  logic [W-1:0] x [POINTS];
  logic [W-1:0] y [POINTS];

  dht_mem_ctrl #(
    .POINTS (POINTS),
    .W      (W),
    .DEPTH  (DEPTH),
    .AW     (AW),
    .LATENCY(LATENCY)
  ) u_ctrl (
    .clk,
    .rst_n,
    .start,
    .busy,
    .done,
    .mem_a,
    .mem_d,
    .mem_we,
    .mem_spo,
    .dht_x(x),
    .dht_y(y)
  );

  if (POINTS == 8) begin : g_dht8
    dht_8 #(.W(W)) u_dht (
      .clk,
      .x80(x[0]), .x81(x[1]), .x82(x[2]), .x83(x[3]),
      .x84(x[4]), .x85(x[5]), .x86(x[6]), .x87(x[7]),
      .y80(y[0]), .y81(y[1]), .y82(y[2]), .y83(y[3]),
      .y84(y[4]), .y85(y[5]), .y86(y[6]), .y87(y[7])
    );
  end else begin : g_dht4
    dht_4 #(.W(W)) u_dht (
      .clk,
      .x0(x[0]), .x1(x[1]), .x2(x[2]), .x3(x[3]),
      .y0(y[0]), .y1(y[1]), .y2(y[2]), .y3(y[3])
    );
  end

  initial assert (POINTS == 4 || POINTS == 8)
    else $error("POINTS must be 4 or 8");

endmodule
