// tb_ops_load: average end-to-end latency against offered load, for both
// allocators, on the full 32 x 32 system with 1024-entry switch buffers.
// Six systems run side by side, each with its own clocks and environment
// (ops_harness): the single-stage scheduler at 9.6 ns (2-cycle pulse, guard
// 10 Ttx) and the two-stage scheduler at 5.5 ns (3-cycle pulse, guard 5 Ttx),
// each at 2 %, 5 % and 9 % of interface cycles, uniform random destinations,
// 10 us of traffic. One interface can request at most once per 10 interface
// cycles, so 9 % is close to the most it can carry. The environment checks
// every packet end to end; this bench adds the load-curve checks: for each
// allocator the mean latency grows with load, and at every load the
// two-stage system has the lower mean latency. Means are printed per run.
`timescale 1ns / 1ps

module tb_ops_load;
  import ops_pkg::*;
  localparam int N = 32;
  localparam int W = 5;
  localparam int K = 6;
  localparam int unsigned LOADS [K] = '{1311, 3277, 5898, 1311, 3277, 5898};
  localparam string NAMES [K] = '{"single 2%", "single 5%", "single 9%", "two-stage 2%", "two-stage 5%", "two-stage 9%"};
  int checks_k [K];
  int failures_k [K];
  bit done_k [K];
  real mean_k [K];

  for (genvar k = 0; k < K; k++) begin : g
    localparam bit TS = (k >= 3);
    int checks, failures;
    bit done;
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

    ops_top #(.TWO_STAGE(TS), .PULSE(TS ? 3 : 2), .GUARD(TS ? 5 : 10)) dut (
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
    ops_harness #(.N(N), .GUARD(TS ? 5 : 10), .TSCH(TS ? 5.5 : 9.6), .RUN_NS(10000.0), .LOAD(LOADS[k]),
                  .HOTSPOT(1'b0), .NAME(NAMES[k])) env (
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
    assign checks_k[k] = checks;
    assign failures_k[k] = failures;
    assign done_k[k] = done;
    always_comb mean_k[k] = (env.n_rx > 0) ? env.lat_sum / env.n_rx : 0.0;
  end

  int checks, failures;

  initial begin
    #20000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #1000;
      all = 1;
      for (int k = 0; k < K; k++) all &= done_k[k];
    end while (!all);
    #10;
    checks = 0;
    failures = 0;
    for (int k = 0; k < K; k++) begin
      checks += checks_k[k];
      failures += failures_k[k];
      $display("%s: mean end-to-end latency %0.1f ns", NAMES[k], mean_k[k]);
    end
    for (int a = 0; a < 2; a++)
      for (int l = 0; l < 2; l++) begin
        checks++;
        if (!(mean_k[3*a+l+1] > mean_k[3*a+l])) begin
          failures++;
          $display("mean latency does not grow from %s to %s", NAMES[3*a+l], NAMES[3*a+l+1]);
        end
      end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (!(mean_k[3+l] < mean_k[l])) begin
        failures++;
        $display("two-stage not faster than single-stage at %s", NAMES[l]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
