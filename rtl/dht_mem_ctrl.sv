// dht_mem_ctrl: sequencer that runs a Hadamard-transform core over a
// sample memory, group by group, and stores the results back in place.
//
// The memory holds DEPTH samples (for an image: pixel values in raster
// order). After start the sequencer takes the words POINTS at a time:
//
//   READ   POINTS cycles: address base+i, the memory's asynchronous read
//          data is captured into input register x[i]
//   WAIT   LATENCY cycles: the registered core computes y = H x
//   WRITE  POINTS cycles: y[i] is written to address base+i
//
// and then moves base on by POINTS until the whole memory is done, when it
// pulses done for one cycle and returns to idle. One group costs
// 2*POINTS + LATENCY cycles; the whole memory (DEPTH/POINTS groups) plus
// one cycle to leave idle. Transforming in place suits a single-port
// memory, since reading and writing never overlap.
//
// Interface: start (pulse, ignored while busy), busy, done; a single-port
// memory port mem_a / mem_d / mem_we / mem_spo (write on the rising edge
// when mem_we is high, mem_spo shows the word at mem_a without a clock);
// dht_x to and dht_y from the transform core. rst_n is an asynchronous,
// active-low reset. The address-range assertion is disabled during reset,
// which is why lint sees rst_n used both asynchronously and synchronously.
//
// From the source design: the flow of samples from a memory through the
// transform and back into memory, and the memory's ports and size. Own
// choices: the group-by-group schedule, in-place write-back, the
// start/busy/done handshake and the reset.
module dht_mem_ctrl #(
  parameter int unsigned POINTS  = 8,
  parameter int unsigned W       = dht_pkg::DATA_W,
  parameter int unsigned DEPTH   = dht_pkg::MEM_DEPTH,
  parameter int unsigned AW      = dht_pkg::MEM_AW,
  parameter int unsigned LATENCY = dht_pkg::DHT8_LATENCY
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic         busy,
  output logic         done,
  // single-port memory
  output logic [AW-1:0] mem_a,
  output logic [W-1:0]  mem_d,
  output logic          mem_we,
  input  logic [W-1:0]  mem_spo,
  // transform core
  output logic [W-1:0]  dht_x [POINTS],
  input  logic [W-1:0]  dht_y [POINTS]
);

  import dht_pkg::*;

  localparam int unsigned IW = (POINTS > 1) ? $clog2(POINTS) : 1;
  localparam int unsigned LW = (LATENCY > 1) ? $clog2(LATENCY) : 1;
  localparam int unsigned NGROUPS = DEPTH / POINTS;

  seq_state_e   state;
  logic [AW-1:0] base;       // first address of the current group
  logic [IW-1:0] idx;        // word within the group
  logic [LW-1:0] wcnt;       // pipeline wait counter
  logic          last_idx;
  logic          last_group;

  assign last_idx   = (idx == IW'(POINTS - 1));
  assign last_group = ({1'b0, base} == (AW + 1)'(DEPTH - POINTS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SEQ_IDLE;
      base  <= '0;
      idx   <= '0;
      wcnt  <= '0;
      done  <= 1'b0;
      for (int i = 0; i < int'(POINTS); i++) dht_x[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        SEQ_IDLE: begin
          if (start) begin
            state <= SEQ_READ;
            base  <= '0;
            idx   <= '0;
          end
        end
        SEQ_READ: begin
          dht_x[idx] <= mem_spo;
          if (last_idx) begin
            idx   <= '0;
            wcnt  <= LW'(LATENCY - 1);
            state <= SEQ_WAIT;
          end else begin
            idx <= idx + 1'b1;
          end
        end
        SEQ_WAIT: begin
          if (wcnt == '0) state <= SEQ_WRITE;
          else            wcnt  <= wcnt - 1'b1;
        end
        SEQ_WRITE: begin
          if (last_idx) begin
            idx <= '0;
            if (last_group) begin
              state <= SEQ_IDLE;
              done  <= 1'b1;
            end else begin
              base  <= base + AW'(POINTS);
              state <= SEQ_READ;
            end
          end else begin
            idx <= idx + 1'b1;
          end
        end
        default: state <= SEQ_IDLE;
      endcase
    end
  end

  assign busy   = (state != SEQ_IDLE);
  assign mem_a  = base + AW'(idx);
  assign mem_we = (state == SEQ_WRITE);
  assign mem_d  = dht_y[idx];

  // The memory must hold a whole number of groups, and addresses must fit.
  initial begin
    assert (DEPTH % POINTS == 0 && NGROUPS > 0)
      else $error("DEPTH must be a non-zero multiple of POINTS");
    assert (DEPTH <= (1 << AW))
      else $error("AW too small for DEPTH");
  end

  // A write never leaves the memory.
  a_addr_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    mem_we |-> ({1'b0, mem_a} < (AW + 1)'(DEPTH)));

endmodule
