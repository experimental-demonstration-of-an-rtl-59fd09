// ops_harness: environment and checker for one ops_top instance.
//
// Generates the two asynchronous clocks and the resets, models the links the
// RTL leaves out, drives the packet sources through a sequence of traffic
// phases and checks every packet end to end.
//   Links (transport delays): request cable C_REQ ns, fibre to the switch
//   F_IN ns, fibre from the switch F_OUT ns, FIFO-full line C_REQ ns. The
//   switch receiver holds the last packet it saw (sw_rx_pkt). The links are
//   delay_line instances. F_IN is longer
//   than C_REQ by the extra fibre inside the switch; with these values a
//   packet sent after the guard time reaches the switch inside the part of
//   the configuration pulse that is on for every request arrival phase.
//   Phases: (A) interface 0 sends every 15 cycles (48 ns) alternately to
//   outputs 0 and 1; (B) interfaces 0 and 1 both send to output 0, staggered;
//   (R) all sources random at LOAD/65536 packets per cycle, uniform
//   destinations; (H, if HOTSPOT) all sources to output 0 at full rate, which
//   fills the switch buffers and must raise the FIFO-full backpressure; then
//   the sources stop and the network drains.
//   Checks: each packet leaves at its destination output once, unchanged and
//   in order per source; no buffer overflows or misses a packet; no packet
//   is faster than the minimum latency Ttx + GUARD*Ttx + F_IN + F_OUT +
//   t_serial (from being accepted by its interface to its tail at the
//   receiver), and the fastest packets reach exactly that figure. Mechanisms
//   counted (each must occur): direct switching, contention with buffering,
//   re-sending from a buffer, buffer precedence over a new packet, a request
//   sampled for two scheduler cycles, and (HOTSPOT) backpressure.
`timescale 1ns / 1ps

module ops_harness
  import ops_pkg::*;
#(
  parameter int unsigned N       = 4,
  parameter int unsigned W       = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned GUARD   = 10,
  parameter realtime     TTX     = 3.2,
  parameter realtime     TSCH    = 9.6,
  parameter realtime     C_REQ   = 10.0,
  parameter realtime     F_IN    = 18.0,
  parameter realtime     F_OUT   = 10.0,
  parameter realtime     T_SER   = 6.4,
  parameter realtime     RUN_NS  = 20000.0,
  parameter int unsigned LOAD    = 5000,
  parameter bit          HOTSPOT = 1'b1,
  parameter string       NAME    = "sys"
) (
  output logic                 clk_tx,
  output logic                 rst_tx_n,
  output logic                 clk_sch,
  output logic                 rst_sch_n,
  output logic [N-1:0]         gen_enable,
  output logic [N-1:0][15:0]   gen_period,
  output logic [N-1:0][16:0]   gen_load,
  output logic [N-1:0][W-1:0]  gen_dest_a,
  output logic [N-1:0][W-1:0]  gen_dest_b,
  input  logic [N-1:0]         inj_valid,
  input  pkt_t [N-1:0]         inj_pkt,
  input  logic [N-1:0]         ni_req_valid,
  input  logic [N-1:0][W-1:0]  ni_req_dest,
  input  pkt_t [N-1:0]         ni_tx_pkt,
  output logic [N-1:0]         ni_pause,
  input  logic [N-1:0]         ni_paused,
  output logic [N-1:0]         sch_req_valid,
  output logic [N-1:0][W-1:0]  sch_req_dest,
  output pkt_t [N-1:0]         sw_in_pkt,
  output pkt_t [N-1:0]         sw_rx_pkt,
  input  logic [N-1:0]         sw_full,
  input  pkt_t [N-1:0]         sw_out_pkt,
  input  logic [N-1:0][N-1:0]  soa,
  input  logic [N-1:0]         sync_req,
  input  logic [N-1:0]         srv_gnt,
  input  logic [N-1:0]         buf_gnt,
  input  logic [N-1:0]         buf_wr_last,
  input  logic [N-1:0]         buf_overflow,
  input  logic [N-1:0]         buf_miss,
  input  logic [N-1:0]         prec_event,
  output int                   checks,
  output int                   failures,
  output bit                   done
);

  localparam realtime MIN_LAT = TTX + GUARD * TTX + F_IN + F_OUT + T_SER;

  // ---------------- clocks and resets ----------------
  initial begin clk_tx = 0; forever #(TTX / 2) clk_tx = ~clk_tx; end
  initial begin clk_sch = 0; #(1.37); forever #(TSCH / 2 + 0.0035) clk_sch = ~clk_sch; end

  // ---------------- links ----------------
  pkt_t [N-1:0] rx_out;
  for (genvar i = 0; i < N; i++) begin : g_link
    delay_line #(.WIDTH(1 + W), .DELAY(C_REQ)) u_req (
      .din ({ni_req_valid[i], ni_req_dest[i]}), .dout ({sch_req_valid[i], sch_req_dest[i]}));
    delay_line #(.WIDTH(PKT_W), .DELAY(F_IN)) u_fin (.din (ni_tx_pkt[i]), .dout (sw_in_pkt[i]));
    delay_line #(.WIDTH(PKT_W), .DELAY(F_IN), .KEEP_VALID(1'b1)) u_rx (
      .din (ni_tx_pkt[i]), .dout (sw_rx_pkt[i]));
    delay_line #(.WIDTH(1), .DELAY(C_REQ)) u_full (.din (sw_full[i]), .dout (ni_pause[i]));
    delay_line #(.WIDTH(PKT_W), .DELAY(F_OUT)) u_fout (.din (sw_out_pkt[i]), .dout (rx_out[i]));
  end

  // ---------------- bookkeeping ----------------
  typedef struct { pkt_t p; realtime t; } sent_t;
  sent_t exp_q [N][$];
  int n_inj = 0, n_rx = 0;
  int n_direct = 0, n_buffered = 0, n_resent = 0, n_prec = 0, n_twice = 0, n_full = 0, n_pause = 0;
  int n_slow = 0;
  realtime lat_sum = 0, lat_max = 0, lat_min = 1.0e9;
  int sync_len [N];

  initial begin checks = 0; failures = 0; done = 0; end

  always @(posedge clk_tx) if (rst_tx_n) begin
    for (int i = 0; i < N; i++) if (inj_valid[i]) begin
      sent_t s;
      s.p = inj_pkt[i];
      s.t = $realtime;
      exp_q[i].push_back(s);
      n_inj++;
    end
    for (int i = 0; i < N; i++) if (ni_paused[i]) n_pause++;
  end

  always @(posedge clk_sch) if (rst_sch_n) begin
    for (int i = 0; i < N; i++) begin
      if (srv_gnt[i]) n_direct++;
      if (buf_gnt[i]) n_resent++;
      if (buf_wr_last[i]) n_buffered++;
      if (prec_event[i]) n_prec++;
      if (sw_full[i]) n_full++;
      if (buf_overflow[i] || buf_miss[i]) begin
        failures++; $display("%s: buffer %0d overflow=%b miss=%b", NAME, i, buf_overflow[i], buf_miss[i]);
      end
      if (sync_req[i]) sync_len[i]++;
      else begin
        if (sync_len[i] == 2) n_twice++;
        sync_len[i] = 0;
      end
    end
  end

  pkt_t last_seen [N];
  bit   rx_armed = 0;  // outputs are checked once reset has cleared the links
  for (genvar o = 0; o < N; o++) begin : g_rx
    initial forever begin
      pkt_t p;
      int s;
      @(rx_out[o]);
      p = rx_out[o];
      if (rx_armed && p.valid && p != last_seen[o]) begin
        last_seen[o] = p;
        s = int'(p.src);
        n_rx++;
        checks++;
        if (p.dest != ADDR_W'(o)) begin failures++; $display("%s: packet for %0d left at %0d", NAME, p.dest, o); end
        checks++;
        if (s >= N || exp_q[s].size() == 0 || exp_q[s][0].p != p) begin
          failures++;
          if (failures < 20) $display("%s: unexpected packet src %0d at output %0d (t=%0t)", NAME, s, o, $realtime);
        end else begin
          realtime lat;
          lat = $realtime + T_SER - exp_q[s][0].t;
          void'(exp_q[s].pop_front());
          lat_sum += lat;
          if (lat > lat_max) lat_max = lat;
          if (lat < lat_min) lat_min = lat;
          checks++;
          if (lat < MIN_LAT - 0.01) begin failures++; $display("%s: latency %0.2f below minimum", NAME, lat); end
          if (lat > MIN_LAT + 0.01) n_slow++;
        end
      end
    end
  end

  // ---------------- traffic ----------------
  task automatic set_all(input bit en, input int per, input int ld);
    for (int i = 0; i < N; i++) begin
      gen_enable[i] = en; gen_period[i] = 16'(per); gen_load[i] = 17'(ld);
      gen_dest_a[i] = '0; gen_dest_b[i] = '0;
    end
  endtask

  initial begin
    rst_tx_n = 0; rst_sch_n = 0;
    for (int o = 0; o < N; o++) last_seen[o] = '0;
    for (int i = 0; i < N; i++) sync_len[i] = 0;
    set_all(0, 0, 0);
    #50;
    rst_tx_n = 1; rst_sch_n = 1;
    fork #(F_OUT + 2 * TSCH) rx_armed = 1; join_none
    // (A) one interface, destinations alternating between outputs 0 and 1
    @(negedge clk_tx);
    gen_enable[0] = 1; gen_period[0] = 16'd15; gen_dest_a[0] = W'(0); gen_dest_b[0] = W'(1);
    #2000;
    // (B) two interfaces to one output, staggered
    @(negedge clk_tx);
    gen_enable[0] = 0;
    repeat (30) @(negedge clk_tx);
    gen_enable[0] = 1; gen_period[0] = 16'd40; gen_dest_a[0] = W'(0); gen_dest_b[0] = W'(0);
    repeat (7) @(negedge clk_tx);
    gen_enable[1] = 1; gen_period[1] = 16'd40; gen_dest_a[1] = W'(0); gen_dest_b[1] = W'(0);
    #3000;
    // (R) uniform random traffic
    @(negedge clk_tx);
    set_all(1, 0, LOAD);
    #(RUN_NS);
    // (H) hot spot on output 0
    if (HOTSPOT) begin
      @(negedge clk_tx);
      set_all(1, 1, 0);  // periodic mode, one packet per cycle, all to output 0
      #6000;
    end
    // drain
    @(negedge clk_tx);
    set_all(0, 0, 0);
    #(40000);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (exp_q[i].size() != 0) begin failures++; $display("%s: %0d packets of source %0d never arrived", NAME, exp_q[i].size(), i); end
    end
    checks++;
    if (n_rx != n_inj || n_inj == 0) begin failures++; $display("%s: injected %0d received %0d", NAME, n_inj, n_rx); end
    // every mechanism must have happened
    checks++; if (n_direct == 0)   begin failures++; $display("%s: no direct switching", NAME); end
    checks++; if (n_buffered == 0) begin failures++; $display("%s: no contention buffering", NAME); end
    checks++; if (n_resent != n_buffered) begin failures++; $display("%s: buffered %0d re-sent %0d", NAME, n_buffered, n_resent); end
    checks++; if (n_prec == 0)     begin failures++; $display("%s: buffer precedence never used", NAME); end
    checks++; if (n_twice == 0)    begin failures++; $display("%s: no request sampled twice", NAME); end
    checks++; if (n_direct + n_buffered != n_inj) begin failures++; $display("%s: decisions %0d vs packets %0d", NAME, n_direct + n_buffered, n_inj); end
    checks++; if (lat_min > MIN_LAT + 0.01) begin failures++; $display("%s: no packet reached the minimum latency", NAME); end
    if (HOTSPOT) begin
      checks++; if (n_full == 0 || n_pause == 0) begin failures++; $display("%s: backpressure never raised", NAME); end
    end
    $display("%s: packets %0d, direct %0d, buffered %0d, re-sent %0d, precedence %0d, sampled-twice %0d, full %0d, paused %0d",
             NAME, n_inj, n_direct, n_buffered, n_resent, n_prec, n_twice, n_full, n_pause);
    $display("%s: latency bound %0.1f ns, observed min %0.1f ns, mean %0.1f ns, max %0.1f ns, above bound %0d",
             NAME, MIN_LAT, lat_min, (n_rx > 0) ? lat_sum / n_rx : 0.0, lat_max, n_slow);
    done = 1;
  end

endmodule
