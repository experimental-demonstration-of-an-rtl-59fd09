// request_sync: brings the port requests of the network interfaces into the
// scheduler clock domain.
//
// Network interfaces and scheduler run from independent oscillators, so every
// request lane (a valid bit and a destination field) passes through two
// flip-flops. A request that arrives just after a clock edge is therefore seen
// at the output two scheduler cycles later in the worst case. The second
// flip-flop is the registered request that the allocation circuit reads.
//
// A request is held by the interface for several of its own clock cycles, so
// it may be sampled for one or two scheduler cycles. new_req is a one-cycle
// pulse on the first cycle a request is seen (a third flop keeps the previous
// value), so that each request is allocated exactly once; this edge detection
// is a choice of this design. The destination is assumed stable for the whole
// time the valid bit is high, which the network interface guarantees.
`timescale 1ns / 1ps

module request_sync #(
  parameter int unsigned N = 32,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        async_valid,
  input  logic [N-1:0][W-1:0] async_dest,
  output logic [N-1:0]        sync_valid,   // level after synchronization (probe point)
  output logic [N-1:0]        new_req,      // first cycle of each request
  output logic [N-1:0][W-1:0] sync_dest
);

  logic [N-1:0]        v_meta, v_sync, v_prev;
  logic [N-1:0][W-1:0] d_meta, d_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_meta <= '0;
      v_sync <= '0;
      v_prev <= '0;
      d_meta <= '0;
      d_sync <= '0;
    end else begin
      v_meta <= async_valid;
      v_sync <= v_meta;
      v_prev <= v_sync;
      d_meta <= async_dest;
      d_sync <= d_meta;
    end
  end

  assign sync_valid = v_sync;
  assign new_req    = v_sync & ~v_prev;
  assign sync_dest  = d_sync;

endmodule
