// switch_buffer: electronic recirculation buffer at one switch input.
//
// A packet whose new request was not granted still travels to the switch
// (it was sent speculatively); it is converted to electrical form and stored
// here instead of being dropped. The buffer then requests the output of its
// head-of-line packet from the scheduler and, once granted, re-sends it
// through the same switch input. One buffer serves one network interface.
//
//   * Write: rx_pkt is the last packet received from the network interface
//     (held by the receiver). The scheduler opens a write window (wr_en) in
//     which the packet arrives; it is stored at the end of the window
//     (wr_last).
//   * Read: rd (one cycle, first cycle of the configuration pulse) shows the
//     head packet on tx_pkt and pops it; the popped packet stays on tx_pkt
//     for the rest of the pulse. The head request is withdrawn in the read
//     cycle so that the scheduler does not see it twice.
//   * occupied: the buffer holds packets or a write window is open. The
//     scheduler uses it to keep new packets of this input behind buffered
//     ones.
//   * full: FIFO-full backpressure to the network interface, a single bit
//     raised when only FULL_FREE slots are left (counting a packet whose
//     write window is open), so that a packet still in transit finds room.
//   * overflow / miss: a packet could not be stored, or a write window closed
//     without a valid packet; both are error indications.
// DEPTH 1024 is the depth used for the rack-scale emulation; the demonstrated
// setup had no buffers connected.
`timescale 1ns / 1ps

module switch_buffer
  import ops_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned FULL_FREE = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pkt_t         rx_pkt,
  input  logic         wr_en,
  input  logic         wr_last,
  input  logic         rd,
  output pkt_t         tx_pkt,
  output logic         req_valid,
  output logic [W-1:0] req_dest,
  output logic         occupied,
  output logic         full,
  output logic         overflow,
  output logic         miss
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  pkt_t          hol, held;
  logic          empty, fifo_full;
  logic [CW-1:0] count;
  logic          push;

  assign push = wr_last && rx_pkt.valid && (!fifo_full || rd);

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (push),
    .din   (rx_pkt),
    .pop   (rd),
    .dout  (hol),
    .empty (empty),
    .full  (fifo_full),
    .count (count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      full     <= 1'b0;
      overflow <= 1'b0;
      miss     <= 1'b0;
    end else begin
      if (rd) held <= hol;
      full     <= (32'(count) + 32'(wr_en) + FULL_FREE) >= DEPTH;
      overflow <= wr_last && rx_pkt.valid && fifo_full && !rd;
      miss     <= wr_last && !rx_pkt.valid;
    end
  end

  assign tx_pkt    = rd ? hol : held;
  assign req_valid = !empty && !rd;
  assign req_dest  = hol.dest[W-1:0];
  assign occupied  = !empty || wr_en;

endmodule
