// tb_net_if: self-checking test of the network interface.
// Bursts of packets with random destinations are offered (the queue fills and
// in_ready must drop). A monitor checks, in interface clock cycles: each
// request is high for exactly 4 cycles and carries the destination of the
// next queued packet; the packet follows exactly 10 cycles (guard time) after
// its request rose and is sent for exactly 2 cycles; packets leave in order
// and unchanged; request starts are at least 10 cycles apart and exactly 10
// when the queue is backed up. Raising pause must stop new requests within
// 3 cycles (two-flop synchronizer) while an already requested packet is still
// sent.
`timescale 1ns / 1ps

module tb_net_if;
  import ops_pkg::*;
  localparam int N = 4;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  pkt_t in_pkt, tx;
  logic in_valid, in_ready, pause, req_valid, paused;
  logic [W-1:0] req_dest;
  int checks = 0, failures = 0;
  int cyc = 0;
  pkt_t exp_q [$];
  pkt_t req_q [$];
  int req_start [$];
  int last_req = -100, req_len = 0, tx_len = 0, n_req = 0, n_tx = 0, full_seen = 0;
  int spacing10 = 0;
  logic prev_req = 0, prev_tx = 0;
  int pause_on_cyc = -1, req_while_paused = 0;

  net_if #(.N(N), .DEPTH(8)) dut (.clk(clk), .rst_n(rst_n), .in_pkt(in_pkt), .in_valid(in_valid),
    .in_ready(in_ready), .pause_async(pause), .req_valid(req_valid), .req_dest(req_dest),
    .tx_pkt(tx), .paused(paused));

  always #1.6 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid && in_ready) exp_q.push_back(in_pkt);
    if (!in_ready) full_seen++;
    // request monitor
    if (req_valid && !prev_req) begin
      n_req++;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("request with empty queue"); end
      else begin
        pkt_t p;
        p = exp_q.pop_front();
        if (req_dest !== p.dest[W-1:0]) begin failures++; $display("req dest %0d exp %0d", req_dest, p.dest); end
        req_q.push_back(p);
        req_start.push_back(cyc);
      end
      checks++;
      if (cyc - last_req < 10) begin failures++; $display("requests %0d apart", cyc - last_req); end
      if (cyc - last_req == 10) spacing10++;
      if (pause_on_cyc >= 0 && cyc - pause_on_cyc > 3) req_while_paused++;
      last_req = cyc;
    end
    if (req_valid) req_len++;
    else if (prev_req) begin
      checks++;
      if (req_len != 4) begin failures++; $display("request %0d cycles", req_len); end
      req_len = 0;
    end
    // packet monitor
    if (tx.valid && !prev_tx) begin
      n_tx++;
      checks++;
      if (req_q.size() == 0) begin failures++; $display("packet without request"); end
      else begin
        pkt_t p;
        int s;
        p = req_q.pop_front();
        s = req_start.pop_front();
        if (tx !== p) begin failures++; $display("packet content/order wrong"); end
        checks++;
        if (cyc - s != 10) begin failures++; $display("guard %0d cycles", cyc - s); end
      end
    end
    if (tx.valid) tx_len++;
    else if (prev_tx) begin
      checks++;
      if (tx_len != 2) begin failures++; $display("packet %0d cycles", tx_len); end
      tx_len = 0;
    end
    prev_req = req_valid;
    prev_tx  = tx.valid;
  end

  task automatic offer(input int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_pkt = {1'b1, ADDR_W'(2), ADDR_W'($urandom % N), {$urandom, $urandom}};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_pkt = '0; pause = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    offer(20);                 // burst larger than the queue
    repeat (300) @(posedge clk);
    offer(3);
    repeat (5) @(posedge clk);
    // pause while packets wait
    offer(4);
    @(negedge clk); pause = 1; pause_on_cyc = cyc;
    repeat (100) @(posedge clk);
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("pause did not hold packets"); end
    @(negedge clk); pause = 0; pause_on_cyc = -1;
    repeat (200) @(posedge clk);
    checks++;
    if (n_req != 27 || n_tx != 27 || exp_q.size() != 0) begin
      failures++; $display("n_req=%0d n_tx=%0d left=%0d", n_req, n_tx, exp_q.size());
    end
    checks++;
    if (full_seen == 0 || spacing10 < 5) begin failures++; $display("full=%0d spacing10=%0d", full_seen, spacing10); end
    checks++;
    if (req_while_paused != 0) begin failures++; $display("requests while paused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
