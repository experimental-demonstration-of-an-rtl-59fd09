// tb_ops_top: end-to-end test of the whole switch system at 4 ports.
// Two complete systems run side by side, each with its own environment and
// checker (ops_harness):
//   s0: single-stage allocator, scheduler clock 9.6 ns, configuration pulse
//       2 cycles, guard time 10 interface cycles (the demonstrated timing);
//   s1: two-stage allocator, scheduler clock 5.5 ns, pulse 3 cycles
//       (16.5 ns), guard time 5 interface cycles (16 ns), shortened to match
//       the 4 x 5.5 ns scheduling delay.
// Switch buffers are 8 entries deep so that the hot-spot phase fills them and
// the FIFO-full backpressure acts. Each system goes through the periodic,
// staggered, random and hot-spot phases described in ops_harness; every
// packet is checked end to end and every mechanism must occur.
`timescale 1ns / 1ps

module tb_ops_top;
  import ops_pkg::*;
  localparam int N = 4;
  localparam int W = 2;
  int checks [2], failures [2];
  bit done [2];

  begin : s0
    logic clk_tx, rst_tx_n, clk_sch, rst_sch_n;
    logic [N-1:0] gen_enable, inj_valid, ni_req_valid, ni_pause, ni_paused, sch_req_valid;
    logic [N-1:0][15:0] gen_period;
    logic [N-1:0][16:0] gen_load;
    logic [N-1:0][W-1:0] gen_dest_a, gen_dest_b, ni_req_dest, sch_req_dest;
    pkt_t [N-1:0] inj_pkt, ni_tx_pkt, sw_in_pkt, sw_rx_pkt, sw_out_pkt;
    logic [N-1:0] sw_full, sync_req, srv_gnt, buf_gnt, buf_wr_last, buf_overflow, buf_miss, prec_event;
    logic [N-1:0][N-1:0] soa;
    logic [N-1:0] buf_occupied, sync_d;
    always @(posedge clk_sch) sync_d <= sync_req;

    ops_top #(.N(N), .BUF_DEPTH(8), .NI_DEPTH(16)) dut (
      .clk_tx(clk_tx),
      .rst_tx_n(rst_tx_n),
      .clk_sch(clk_sch),
      .rst_sch_n(rst_sch_n),
      .gen_enable(gen_enable),
      .gen_period(gen_period),
      .gen_load(gen_load),
      .gen_dest_a(gen_dest_a),
      .gen_dest_b(gen_dest_b),
      .inj_valid(inj_valid),
      .inj_pkt(inj_pkt),
      .ni_req_valid(ni_req_valid),
      .ni_req_dest(ni_req_dest),
      .ni_tx_pkt(ni_tx_pkt),
      .ni_pause(ni_pause),
      .ni_paused(ni_paused),
      .sch_req_valid(sch_req_valid),
      .sch_req_dest(sch_req_dest),
      .sw_in_pkt(sw_in_pkt),
      .sw_rx_pkt(sw_rx_pkt),
      .sw_full(sw_full),
      .sw_out_pkt(sw_out_pkt),
      .soa(soa),
      .buf_occupied(buf_occupied),
      .sync_req(sync_req),
      .srv_gnt(srv_gnt),
      .buf_gnt(buf_gnt),
      .buf_wr_last(buf_wr_last),
      .buf_overflow(buf_overflow),
      .buf_miss(buf_miss)
    );
    assign prec_event = sync_req & ~sync_d & buf_occupied;
    ops_harness #(.N(N), .GUARD(10), .TSCH(9.6), .NAME("single-stage")) env (
      .clk_tx(clk_tx),
      .rst_tx_n(rst_tx_n),
      .clk_sch(clk_sch),
      .rst_sch_n(rst_sch_n),
      .gen_enable(gen_enable),
      .gen_period(gen_period),
      .gen_load(gen_load),
      .gen_dest_a(gen_dest_a),
      .gen_dest_b(gen_dest_b),
      .inj_valid(inj_valid),
      .inj_pkt(inj_pkt),
      .ni_req_valid(ni_req_valid),
      .ni_req_dest(ni_req_dest),
      .ni_tx_pkt(ni_tx_pkt),
      .ni_pause(ni_pause),
      .ni_paused(ni_paused),
      .sch_req_valid(sch_req_valid),
      .sch_req_dest(sch_req_dest),
      .sw_in_pkt(sw_in_pkt),
      .sw_rx_pkt(sw_rx_pkt),
      .sw_full(sw_full),
      .sw_out_pkt(sw_out_pkt),
      .soa(soa),
      .sync_req(sync_req),
      .srv_gnt(srv_gnt),
      .buf_gnt(buf_gnt),
      .buf_wr_last(buf_wr_last),
      .buf_overflow(buf_overflow),
      .buf_miss(buf_miss),
      .prec_event(prec_event), .checks(checks[0]), .failures(failures[0]), .done(done[0])
    );
  end
  begin : s1
    logic clk_tx, rst_tx_n, clk_sch, rst_sch_n;
    logic [N-1:0] gen_enable, inj_valid, ni_req_valid, ni_pause, ni_paused, sch_req_valid;
    logic [N-1:0][15:0] gen_period;
    logic [N-1:0][16:0] gen_load;
    logic [N-1:0][W-1:0] gen_dest_a, gen_dest_b, ni_req_dest, sch_req_dest;
    pkt_t [N-1:0] inj_pkt, ni_tx_pkt, sw_in_pkt, sw_rx_pkt, sw_out_pkt;
    logic [N-1:0] sw_full, sync_req, srv_gnt, buf_gnt, buf_wr_last, buf_overflow, buf_miss, prec_event;
    logic [N-1:0][N-1:0] soa;
    logic [N-1:0] buf_occupied, sync_d;
    always @(posedge clk_sch) sync_d <= sync_req;

    ops_top #(.N(N), .TWO_STAGE(1'b1), .PULSE(3), .GUARD(5), .BUF_DEPTH(8), .NI_DEPTH(16)) dut (
      .clk_tx(clk_tx),
      .rst_tx_n(rst_tx_n),
      .clk_sch(clk_sch),
      .rst_sch_n(rst_sch_n),
      .gen_enable(gen_enable),
      .gen_period(gen_period),
      .gen_load(gen_load),
      .gen_dest_a(gen_dest_a),
      .gen_dest_b(gen_dest_b),
      .inj_valid(inj_valid),
      .inj_pkt(inj_pkt),
      .ni_req_valid(ni_req_valid),
      .ni_req_dest(ni_req_dest),
      .ni_tx_pkt(ni_tx_pkt),
      .ni_pause(ni_pause),
      .ni_paused(ni_paused),
      .sch_req_valid(sch_req_valid),
      .sch_req_dest(sch_req_dest),
      .sw_in_pkt(sw_in_pkt),
      .sw_rx_pkt(sw_rx_pkt),
      .sw_full(sw_full),
      .sw_out_pkt(sw_out_pkt),
      .soa(soa),
      .buf_occupied(buf_occupied),
      .sync_req(sync_req),
      .srv_gnt(srv_gnt),
      .buf_gnt(buf_gnt),
      .buf_wr_last(buf_wr_last),
      .buf_overflow(buf_overflow),
      .buf_miss(buf_miss)
    );
    assign prec_event = sync_req & ~sync_d & buf_occupied;
    ops_harness #(.N(N), .GUARD(5), .TSCH(5.5), .NAME("two-stage")) env (
      .clk_tx(clk_tx),
      .rst_tx_n(rst_tx_n),
      .clk_sch(clk_sch),
      .rst_sch_n(rst_sch_n),
      .gen_enable(gen_enable),
      .gen_period(gen_period),
      .gen_load(gen_load),
      .gen_dest_a(gen_dest_a),
      .gen_dest_b(gen_dest_b),
      .inj_valid(inj_valid),
      .inj_pkt(inj_pkt),
      .ni_req_valid(ni_req_valid),
      .ni_req_dest(ni_req_dest),
      .ni_tx_pkt(ni_tx_pkt),
      .ni_pause(ni_pause),
      .ni_paused(ni_paused),
      .sch_req_valid(sch_req_valid),
      .sch_req_dest(sch_req_dest),
      .sw_in_pkt(sw_in_pkt),
      .sw_rx_pkt(sw_rx_pkt),
      .sw_full(sw_full),
      .sw_out_pkt(sw_out_pkt),
      .soa(soa),
      .sync_req(sync_req),
      .srv_gnt(srv_gnt),
      .buf_gnt(buf_gnt),
      .buf_wr_last(buf_wr_last),
      .buf_overflow(buf_overflow),
      .buf_miss(buf_miss),
      .prec_event(prec_event), .checks(checks[1]), .failures(failures[1]), .done(done[1])
    );
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1] + 1);
    $finish;
  end

  initial begin
    wait (done[0] && done[1]);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks[0] + checks[1], failures[0] + failures[1]);
    $finish;
  end
endmodule
