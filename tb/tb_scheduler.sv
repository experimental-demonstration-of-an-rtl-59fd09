// tb_scheduler: self-checking test of the scheduler, both allocators.
// Two schedulers (single-stage and two-stage allocator, 4 ports, pulse 2)
// receive the same asynchronous requests from a 3.2 ns clock domain; their
// own clock is 9.607 ns, so the arrival phase sweeps. Each request is held 4
// sender cycles; requests of one input are 10 to 50 sender cycles apart and
// their destinations are random, so outputs are contended. A small model of
// the switch buffers (a queue per input) answers the write windows and
// buffer reads. Checks:
//   * every request is served exactly once, directly or from the buffer, in
//     per-input order, through the gate of its destination;
//   * a directly served request turns its gate on no later than 4 scheduler
//     periods after it arrived (two for synchronization, two for allocation
//     and configuration) and no earlier than 3;
//   * each gate pulse lasts exactly 2 cycles; no output has two gates on and
//     no input drives two outputs;
// and counts that direct grants, buffered packets and buffer re-sends occur.
`timescale 1ns / 1ps

module tb_scheduler;
  localparam int N = 4;
  localparam int W = 2;
  localparam realtime TS = 9.607;
  logic clk_tx = 0, clk = 0, rst_n = 0;
  logic [N-1:0] rv;
  logic [N-1:0][W-1:0] rd_;
  int checks = 0, failures = 0;

  always #1.6 clk_tx = ~clk_tx;
  always #(TS / 2) clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------- request senders -------------
  int sent [N];
  realtime t_arr [N][$];
  int exp_dest [N][$];
  for (genvar i = 0; i < N; i++) begin : g_tx
    initial begin
      rv[i] = 0; rd_[i] = '0; sent[i] = 0;
      wait (rst_n);
      repeat (200) begin
        repeat (6 + $urandom % 40) @(posedge clk_tx);
        rd_[i] = W'($urandom % 3);          // outputs 0..2: plenty of contention
        rv[i] = 1;
        sent[i]++;
        repeat (4) @(posedge clk_tx);
        rv[i] = 0;
      end
    end
    always @(posedge rv[i]) begin
      t_arr[i].push_back($realtime);
      exp_dest[i].push_back(int'(rd_[i]));
    end
  end

  // ------------- two schedulers with buffer models -------------
  for (genvar k = 0; k < 2; k++) begin : g_s
    logic [N-1:0][N-1:0] soa;
    logic [N-1:0] sse, sbe, brd, bwen, bwl, sreq, sg, bg;
    logic [N-1:0] breq, bocc;
    logic [N-1:0][W-1:0] bdest;
    int q [N][$];          // buffered destinations
    int qi [N][$];         // their request numbers
    int served [N];
    int n_direct = 0, n_buffered = 0, n_resent = 0, done = 0;
    int pulse_len [N];
    int pulse_dst [N];
    realtime t_win_open [N];
    int nreq_seen [N];
    int wr_idx [N][$];     // request numbers waiting for a write window

    scheduler #(.N(N), .TWO_STAGE(k), .PULSE(2)) dut (.clk(clk), .rst_n(rst_n),
      .req_valid(rv), .req_dest(rd_), .buf_req(breq), .buf_dest(bdest), .buf_occ(bocc),
      .soa(soa), .src_srv_en(sse), .src_buf_en(sbe), .buf_rd(brd), .buf_wr_en(bwen),
      .buf_wr_last(bwl), .sync_req(sreq), .srv_gnt(sg), .buf_gnt(bg));

    always_comb begin
      for (int i = 0; i < N; i++) begin
        breq[i]  = (q[i].size() > 0) && !brd[i];
        bdest[i] = (q[i].size() > 0) ? W'(q[i][0]) : '0;
        bocc[i]  = (q[i].size() > 0) || bwen[i];
      end
    end

    // request bookkeeping per input: index of the next request to be served
    initial for (int i = 0; i < N; i++) begin served[i] = 0; pulse_len[i] = 0; end

    always @(posedge clk) if (rst_n) begin
      // one gate per output, one output per input
      for (int o = 0; o < N; o++) begin
        int c;
        c = 0;
        for (int i = 0; i < N; i++) c += soa[i][o];
        if (c > 1) begin failures++; $display("k=%0d output %0d has %0d gates", k, o, c); end
      end
      for (int i = 0; i < N; i++) begin
        int c, d;
        c = 0; d = -1;
        for (int o = 0; o < N; o++) if (soa[i][o]) begin c++; d = o; end
        if (c > 1) begin failures++; $display("k=%0d input %0d drives %0d outputs", k, i, c); end
        // pulse width and service order
        if (c == 1 && pulse_len[i] == 0) begin
          // a new pulse starts
          checks++;
          if (sse[i]) begin
            // direct grant: oldest unserved request of this input must be it
            realtime lat;
            lat = $realtime - TS - t_arr[i][served[i]];  // gates came on one edge ago
            if (exp_dest[i][served[i]] != d) begin failures++; $display("k=%0d in %0d direct dest %0d exp %0d", k, i, d, exp_dest[i][served[i]]); end
            checks++;
            if (lat > 4 * TS + 0.01 || lat < 3 * TS - 0.01) begin
              failures++; $display("k=%0d direct latency %0.2f ns", k, lat);
            end
            served[i]++;
            n_direct++;
          end else if (sbe[i]) begin
            n_resent++;
          end else begin
            failures++; $display("k=%0d gate without source", k);
          end
          pulse_dst[i] = d;
        end
        if (c == 1 && pulse_len[i] > 0 && d != pulse_dst[i]) begin
          // back-to-back pulses of one input are not allowed with pulse 2
          failures++; $display("k=%0d input %0d switched without a gap", k, i);
        end
        if (c == 1) pulse_len[i]++;
        else if (pulse_len[i] != 0) begin
          checks++;
          if (pulse_len[i] != 2) begin failures++; $display("k=%0d pulse %0d cycles", k, pulse_len[i]); end
          pulse_len[i] = 0;
        end
        // buffer model
        if (bwl[i]) begin
          // the packet of the oldest unserved request is stored
          q[i].push_back(exp_dest[i][served[i]]);
          served[i]++;
          n_buffered++;
        end
        if (brd[i]) begin
          checks++;
          if (q[i].size() == 0) begin failures++; $display("k=%0d read of empty buffer", k); end
          else begin
            int dd;
            dd = q[i].pop_front();
            // the re-sent packet's gate is this cycle's
            if (!soa[i][dd]) begin failures++; $display("k=%0d resend to wrong output", k); end
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #110000;
    for (int k = 0; k < 2; k++) begin
      int tot_served, tot_sent;
      tot_served = 0; tot_sent = 0;
      for (int i = 0; i < N; i++) begin
        tot_sent += sent[i];
      end
      if (k == 0) begin
        for (int i = 0; i < N; i++) tot_served += g_s[0].served[i];
        checks++;
        if (tot_served != tot_sent || g_s[0].n_resent != g_s[0].n_buffered) begin
          failures++; $display("single: sent %0d served %0d buffered %0d resent %0d", tot_sent, tot_served, g_s[0].n_buffered, g_s[0].n_resent);
        end
        checks++;
        if (g_s[0].n_direct == 0 || g_s[0].n_buffered == 0) begin failures++; $display("single: no contention seen"); end
        $display("single-stage: direct %0d buffered %0d resent %0d", g_s[0].n_direct, g_s[0].n_buffered, g_s[0].n_resent);
      end else begin
        for (int i = 0; i < N; i++) tot_served += g_s[1].served[i];
        checks++;
        if (tot_served != tot_sent || g_s[1].n_resent != g_s[1].n_buffered) begin
          failures++; $display("two-stage: sent %0d served %0d buffered %0d resent %0d", tot_sent, tot_served, g_s[1].n_buffered, g_s[1].n_resent);
        end
        checks++;
        if (g_s[1].n_direct == 0 || g_s[1].n_buffered == 0) begin failures++; $display("two-stage: no contention seen"); end
        $display("two-stage: direct %0d buffered %0d resent %0d", g_s[1].n_direct, g_s[1].n_buffered, g_s[1].n_resent);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
