// tb_ops_full: end-to-end run of the switch system at its default size:
// 32 x 32 switch, single-stage allocator, 9.6 ns scheduler clock, 3.2 ns
// interface clock, 1024-entry switch buffers, demonstrated guard time and
// pulse width. The environment (ops_harness) runs the periodic scenario on
// interface 0, the staggered two-to-one scenario, then 10 us of uniform
// random traffic from all 32 sources at about 2.3 % of interface cycles
// (about a quarter of the rate one interface can request at), and drains.
// Every packet is checked end to end; the buffers are far too deep to fill
// here, so backpressure is exercised only by tb_ops_top.
`timescale 1ns / 1ps

module tb_ops_full;
  import ops_pkg::*;
  localparam int N = 32;
  localparam int W = 5;
  int checks, failures;
  bit done;

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

    ops_top dut (
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
    ops_harness #(.N(N), .GUARD(10), .TSCH(9.6), .RUN_NS(10000.0), .LOAD(1500), .HOTSPOT(1'b0), .NAME("32x32")) env (
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
      .prec_event(prec_event), .checks(checks), .failures(failures), .done(done)
    );
  end

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
