// tb_request_sync: self-checking test of the request synchronizer.
// Requests are driven from a 3.2 ns clock into a synchronizer clocked at
// 9.607 ns (slightly off a 3:1 ratio, so the phase sweeps). Each request is
// held for 4 sender cycles, with random destinations and spacing of at least
// 10 sender cycles. Checks: every request produces exactly one new_req pulse
// with its destination, no later than 2 receiver cycles (plus a sampling
// margin) after it was driven; the synchronized level is seen for one or two
// cycles, and both cases must occur.
`timescale 1ns / 1ps

module tb_request_sync;
  localparam int N = 2;
  localparam int W = 2;
  logic clk_tx = 0, clk = 0, rst_n = 0;
  logic [N-1:0] av;
  logic [N-1:0][W-1:0] ad;
  logic [N-1:0] sv, nr;
  logic [N-1:0][W-1:0] sd;
  int checks = 0, failures = 0;
  int sent [N], got [N];
  realtime t_sent [N];
  logic [W-1:0] d_sent [N];
  int width_cnt [N];
  int once = 0, twice = 0;

  request_sync #(.N(N), .W(W)) dut (.clk(clk), .rst_n(rst_n), .async_valid(av),
    .async_dest(ad), .sync_valid(sv), .new_req(nr), .sync_dest(sd));

  always #1.6 clk_tx = ~clk_tx;
  always #4.8035 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // senders
  for (genvar i = 0; i < N; i++) begin : g_tx
    initial begin
      av[i] = 0; ad[i] = '0; sent[i] = 0;
      wait (rst_n);
      repeat (300) begin
        repeat (6 + $urandom % 12) @(posedge clk_tx);
        ad[i] = W'($urandom);
        av[i] = 1;
        t_sent[i] = $realtime;
        d_sent[i] = ad[i];
        sent[i]++;
        repeat (4) @(posedge clk_tx);
        av[i] = 0;
      end
    end
  end

  // receiver-side checks
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (nr[i]) begin
        got[i]++;
        checks++;
        if (sd[i] !== d_sent[i]) begin failures++; $display("dest mismatch lane %0d", i); end
        checks++;
        // synchronized at most 2 receiver periods after the driving edge; this
        // check samples one receiver edge after that
        if ($realtime - t_sent[i] > 3 * 9.607 + 0.5) begin
          failures++; $display("late by %0t", $realtime - t_sent[i]);
        end
      end
      if (sv[i]) width_cnt[i]++;
      else if (width_cnt[i] != 0) begin
        if (width_cnt[i] == 1) once++; else if (width_cnt[i] == 2) twice++;
        else begin failures++; $display("level %0d cycles", width_cnt[i]); end
        width_cnt[i] = 0;
      end
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin got[i] = 0; width_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #140000;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (got[i] != sent[i] || sent[i] != 300) begin failures++; $display("lane %0d sent %0d got %0d", i, sent[i], got[i]); end
    end
    checks++;
    if (once == 0 || twice == 0) begin failures++; $display("once=%0d twice=%0d", once, twice); end
    $display("registered once %0d, twice %0d", once, twice);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
