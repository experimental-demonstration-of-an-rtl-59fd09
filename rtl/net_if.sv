// net_if: server-side "send and forget" network interface.
//
// New packets are queued in a FIFO. When the queue is not empty the request
// controller reads the destination of the head-of-line packet and, one clock
// later, drives a port request (valid + destination) to the scheduler. The
// request is held for REQ_HOLD cycles so that the slower, asynchronous
// scheduler clock samples it. At the same time the packet moves into the
// packet controller, which holds it for the guard time (GUARD cycles after the
// request) and then transmits it for PKT_CYCLES cycles without waiting for a
// grant: the guard time makes it reach the switch just when the switch has
// been configured. The packet is not kept for re-transmission; if its request
// loses, the switch buffers it.
//
// Requests of one interface are at least MIN_GAP cycles apart (start to
// start), which leaves the request line low long enough between two requests
// for the scheduler to see them separately and keeps the switch pulses of
// consecutive packets apart. pause_async is the switch buffer's FIFO-full
// bit; it is synchronized here, and while it is high no new request is
// issued (a packet already requested is still sent).
//
// Defaults: REQ_HOLD = 4 and GUARD = 10 cycles of 3.2 ns as in the
// demonstration, PKT_CYCLES = 2 (64 bits on a 32-bit serializer bus at
// 10 Gb/s). MIN_GAP = 10 equals the smallest request spacing the asynchronous
// setup supports. The queue depth DEPTH is this design's choice.
`timescale 1ns / 1ps

module net_if
  import ops_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned W          = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned DEPTH      = 64,
  parameter int unsigned REQ_HOLD   = 4,
  parameter int unsigned GUARD      = 10,
  parameter int unsigned MIN_GAP    = 10,
  parameter int unsigned PKT_CYCLES = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pkt_t         in_pkt,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic         pause_async,
  output logic         req_valid,
  output logic [W-1:0] req_dest,
  output pkt_t         tx_pkt,
  output logic         paused
);

  localparam int unsigned TW = $clog2(GUARD + MIN_GAP + REQ_HOLD + PKT_CYCLES + 1);

  pkt_t          hol, hold_pkt, tx_reg;
  logic          q_empty, q_full;
  logic          issue, release_now;
  logic          hold_v;
  logic [TW-1:0] req_cnt, guard_cnt, gap_cnt, tx_cnt;
  logic          pause_meta, pause_sync;

  assign in_ready = !q_full;

  sync_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_queue (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (in_valid && in_pkt.valid && !q_full),
    .din   (in_pkt),
    .pop   (issue),
    .dout  (hol),
    .empty (q_empty),
    .full  (q_full),
    .count ()
  );

  assign release_now = hold_v && (guard_cnt == TW'(1));
  assign issue       = !q_empty && !pause_sync && (gap_cnt == '0) && (!hold_v || release_now);
  assign paused      = pause_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pause_meta <= 1'b0;
      pause_sync <= 1'b0;
      req_cnt    <= '0;
      req_dest   <= '0;
      guard_cnt  <= '0;
      gap_cnt    <= '0;
      tx_cnt     <= '0;
      hold_v     <= 1'b0;
      hold_pkt   <= '0;
      tx_reg     <= '0;
    end else begin
      pause_meta <= pause_async;
      pause_sync <= pause_meta;

      if (req_cnt != '0) req_cnt <= req_cnt - TW'(1);
      if (gap_cnt != '0) gap_cnt <= gap_cnt - TW'(1);
      if (tx_cnt  != '0) tx_cnt  <= tx_cnt - TW'(1);
      if (guard_cnt != '0) guard_cnt <= guard_cnt - TW'(1);

      if (release_now) begin
        tx_reg <= hold_pkt;
        tx_cnt <= TW'(PKT_CYCLES);
        hold_v <= 1'b0;
      end
      if (issue) begin
        req_cnt   <= TW'(REQ_HOLD);
        req_dest  <= hol.dest[W-1:0];
        gap_cnt   <= TW'(MIN_GAP - 1);
        guard_cnt <= TW'(GUARD);
        hold_pkt  <= hol;
        hold_v    <= 1'b1;
      end
    end
  end

  assign req_valid = (req_cnt != '0);
  assign tx_pkt    = (tx_cnt != '0) ? tx_reg : '0;

  initial begin
    assert (REQ_HOLD < MIN_GAP) else $error("request line needs a low gap");
    assert (GUARD >= 1 && PKT_CYCLES <= MIN_GAP) else $error("bad timing parameters");
  end

endmodule
