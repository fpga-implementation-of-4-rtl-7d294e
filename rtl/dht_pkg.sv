// dht_pkg: constants shared by the Hadamard-transform datapath and its
// memory sequencer.
//
// Every sample and every intermediate value is a 16-bit two's-complement
// word, as in the published 4-point and 8-point cores; sums that exceed
// 16 bits wrap modulo 2^16. The latencies follow from one register stage
// per layer of adder/subtractor modules: two layers for 4 points, three for
// 8 points. The memory size is that of the single-port distributed RAM the
// prototype is built around (64 words of 16 bits).
package dht_pkg;

  // Sample and result width of the transform cores.
  localparam int unsigned DATA_W = 16;

  // Clock cycles from a new input vector to its transformed output vector.
  localparam int unsigned DHT4_LATENCY = 2;
  localparam int unsigned DHT8_LATENCY = 3;

  // Sample memory of the prototype: depth and address width.
  localparam int unsigned MEM_DEPTH = 64;
  localparam int unsigned MEM_AW    = 6;

  // States of the memory sequencer.
  typedef enum logic [1:0] {
    SEQ_IDLE  = 2'd0,   // waiting for start
    SEQ_READ  = 2'd1,   // loading one group of samples from memory
    SEQ_WAIT  = 2'd2,   // letting the group pass through the pipeline
    SEQ_WRITE = 2'd3    // storing the transformed group back in place
  } seq_state_e;

endpackage
