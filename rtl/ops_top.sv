// ops_top: control plane and electronic parts of an N x N optical top-of-rack
// packet switch with speculative transmission and switch-side buffering.
//
// Two clock domains, asynchronous to each other:
//   clk_tx  : N packet sources and N network interfaces (server side),
//             3.2 ns in the demonstration;
//   clk_sch : the central scheduler and the N switch buffers (switch side),
//             9.6 ns with the single-stage allocator.
// Each network interface sends a port request out of band and, after a guard
// time, the packet itself without waiting for a grant. The scheduler
// synchronizes the request, allocates the output and configures the SOA
// crossbar so that the packet passes when it arrives. A packet that loses
// arbitration is written into the buffer of its input and later re-sent from
// there; the buffer has precedence over new packets of the same input. A
// buffer that is nearly full raises a one-bit backpressure signal that pauses
// its network interface.
//
// The cables and fibres between servers and switch, the serializers and
// optical transceivers and the switch receivers are not part of this RTL.
// Their ends are ports, so the surrounding environment adds the delays:
//   ni_req_*  -> (request cable)          -> sch_req_*
//   ni_tx_pkt -> (fibre, optical)         -> sw_in_pkt  (light at switch input)
//                                            sw_rx_pkt  (same packet after the
//                                            switch receiver, held until the next)
//   sw_full   -> (control cable)          -> ni_pause
//   sw_out_pkt: light at the switch outputs.
// The crossbar is a behavioural model of the optical part.
`timescale 1ns / 1ps

module ops_top
  import ops_pkg::*;
#(
  parameter int unsigned N          = 32,
  parameter int unsigned W          = (N > 1) ? $clog2(N) : 1,
  parameter bit          TWO_STAGE  = 1'b0,
  parameter int unsigned PULSE      = 2,
  parameter int unsigned REQ_HOLD   = 4,
  parameter int unsigned GUARD      = 10,
  parameter int unsigned MIN_GAP    = 10,
  parameter int unsigned PKT_CYCLES = 2,
  parameter int unsigned NI_DEPTH   = 64,
  parameter int unsigned BUF_DEPTH  = 1024,
  parameter int unsigned FULL_FREE  = 1
) (
  input  logic                 clk_tx,
  input  logic                 rst_tx_n,
  input  logic                 clk_sch,
  input  logic                 rst_sch_n,
  // packet source settings, per network interface
  input  logic [N-1:0]         gen_enable,
  input  logic [N-1:0][15:0]   gen_period,
  input  logic [N-1:0][16:0]   gen_load,
  input  logic [N-1:0][W-1:0]  gen_dest_a,
  input  logic [N-1:0][W-1:0]  gen_dest_b,
  // packets accepted by the network interfaces (observation)
  output logic [N-1:0]         inj_valid,
  output pkt_t [N-1:0]         inj_pkt,
  // server side
  output logic [N-1:0]         ni_req_valid,
  output logic [N-1:0][W-1:0]  ni_req_dest,
  output pkt_t [N-1:0]         ni_tx_pkt,
  input  logic [N-1:0]         ni_pause,
  output logic [N-1:0]         ni_paused,
  // switch side
  input  logic [N-1:0]         sch_req_valid,
  input  logic [N-1:0][W-1:0]  sch_req_dest,
  input  pkt_t [N-1:0]         sw_in_pkt,
  input  pkt_t [N-1:0]         sw_rx_pkt,
  output logic [N-1:0]         sw_full,
  output pkt_t [N-1:0]         sw_out_pkt,
  // scheduler observation
  output logic [N-1:0][N-1:0]  soa,
  output logic [N-1:0]         sync_req,
  output logic [N-1:0]         srv_gnt,
  output logic [N-1:0]         buf_gnt,
  output logic [N-1:0]         buf_wr_last,
  output logic [N-1:0]         buf_occupied,
  output logic [N-1:0]         buf_overflow,
  output logic [N-1:0]         buf_miss
);

  // ---------------- server side ----------------
  pkt_t [N-1:0] gen_pkt;
  logic [N-1:0] gen_valid, ni_ready;

  for (genvar i = 0; i < N; i++) begin : g_srv
    pkt_gen #(.N(N), .W(W)) u_gen (
      .clk       (clk_tx),
      .rst_n     (rst_tx_n),
      .src_id    (ADDR_W'(i)),
      .enable    (gen_enable[i]),
      .period    (gen_period[i]),
      .load      (gen_load[i]),
      .dest_a    (gen_dest_a[i]),
      .dest_b    (gen_dest_b[i]),
      .out_pkt   (gen_pkt[i]),
      .out_valid (gen_valid[i]),
      .out_ready (ni_ready[i])
    );

    net_if #(
      .N (N), .W (W), .DEPTH (NI_DEPTH), .REQ_HOLD (REQ_HOLD), .GUARD (GUARD),
      .MIN_GAP (MIN_GAP), .PKT_CYCLES (PKT_CYCLES)
    ) u_ni (
      .clk         (clk_tx),
      .rst_n       (rst_tx_n),
      .in_pkt      (gen_pkt[i]),
      .in_valid    (gen_valid[i]),
      .in_ready    (ni_ready[i]),
      .pause_async (ni_pause[i]),
      .req_valid   (ni_req_valid[i]),
      .req_dest    (ni_req_dest[i]),
      .tx_pkt      (ni_tx_pkt[i]),
      .paused      (ni_paused[i])
    );

    assign inj_valid[i] = gen_valid[i] && ni_ready[i];
    assign inj_pkt[i]   = gen_pkt[i];
  end

  // ---------------- switch side ----------------
  logic [N-1:0]        b_req, b_occ, b_rd, b_wr_en, b_wr_last;
  logic [N-1:0][W-1:0] b_dest;
  logic [N-1:0]        src_srv_en, src_buf_en;
  pkt_t [N-1:0]        b_tx;

  scheduler #(.N(N), .W(W), .TWO_STAGE(TWO_STAGE), .PULSE(PULSE)) u_sched (
    .clk         (clk_sch),
    .rst_n       (rst_sch_n),
    .req_valid   (sch_req_valid),
    .req_dest    (sch_req_dest),
    .buf_req     (b_req),
    .buf_dest    (b_dest),
    .buf_occ     (b_occ),
    .soa         (soa),
    .src_srv_en  (src_srv_en),
    .src_buf_en  (src_buf_en),
    .buf_rd      (b_rd),
    .buf_wr_en   (b_wr_en),
    .buf_wr_last (b_wr_last),
    .sync_req    (sync_req),
    .srv_gnt     (srv_gnt),
    .buf_gnt     (buf_gnt)
  );

  for (genvar i = 0; i < N; i++) begin : g_buf
    switch_buffer #(.N(N), .W(W), .DEPTH(BUF_DEPTH), .FULL_FREE(FULL_FREE)) u_buf (
      .clk       (clk_sch),
      .rst_n     (rst_sch_n),
      .rx_pkt    (sw_rx_pkt[i]),
      .wr_en     (b_wr_en[i]),
      .wr_last   (b_wr_last[i]),
      .rd        (b_rd[i]),
      .tx_pkt    (b_tx[i]),
      .req_valid (b_req[i]),
      .req_dest  (b_dest[i]),
      .occupied  (b_occ[i]),
      .full      (sw_full[i]),
      .overflow  (buf_overflow[i]),
      .miss      (buf_miss[i])
    );
  end

  assign buf_wr_last  = b_wr_last;
  assign buf_occupied = b_occ;

  soa_crossbar #(.N(N)) u_xbar (
    .srv_pkt    (sw_in_pkt),
    .buf_pkt    (b_tx),
    .src_srv_en (src_srv_en),
    .src_buf_en (src_buf_en),
    .soa        (soa),
    .out_pkt    (sw_out_pkt)
  );

endmodule
