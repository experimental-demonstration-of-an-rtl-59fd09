// tb_pkt_gen: self-checking test of the packet source.
// Instance A runs in periodic mode (period 5, destinations alternating 2/6)
// and is checked cycle by cycle: interval, destination, source and the
// payload sequence of an independently stepped 64-bit LFSR. Instance B runs
// in random mode at 25 % load with a randomly stalling consumer: the measured
// rate must be near 25 %, all destinations must occur, and a packet must stay
// unchanged while it is not accepted.
`timescale 1ns / 1ps

module tb_pkt_gen;
  import ops_pkg::*;
  localparam int N = 8;
  localparam int W = 3;
  logic clk = 0, rst_n = 0;
  pkt_t pa, pb;
  logic va, vb, rdy_b;
  int checks = 0, failures = 0;

  pkt_gen #(.N(N)) dut_a (.clk(clk), .rst_n(rst_n), .src_id(ADDR_W'(5)), .enable(1'b1),
    .period(16'd5), .load(17'd0), .dest_a(W'(2)), .dest_b(W'(6)),
    .out_pkt(pa), .out_valid(va), .out_ready(1'b1));
  pkt_gen #(.N(N)) dut_b (.clk(clk), .rst_n(rst_n), .src_id(ADDR_W'(3)), .enable(1'b1),
    .period(16'd0), .load(17'd16384), .dest_a(W'(0)), .dest_b(W'(0)),
    .out_pkt(pb), .out_valid(vb), .out_ready(rdy_b));

  always #5 clk = ~clk;

  function automatic logic [63:0] lfsr64(input logic [63:0] s);
    logic fb;
    fb = s[63] ^ s[62] ^ s[60] ^ s[59];
    return (s << 1) | 64'(fb);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] exp_pay;
  int last_t, n_a, n_b, cyc, stalls;
  logic [N-1:0] dest_seen;
  pkt_t held;
  logic held_v;

  initial begin
    rdy_b = 1;
    exp_pay = 64'hA5C3_96E1_0000_0005 ^ 64'h1;
    last_t = -1; n_a = 0; n_b = 0; cyc = 0; dest_seen = '0; held_v = 0; stalls = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (4000) begin
      @(negedge clk);
      cyc++;
      // instance A: one packet every 5 cycles
      if (va) begin
        checks++;
        if (last_t >= 0 && cyc - last_t != 5) begin failures++; $display("A interval %0d", cyc - last_t); end
        checks++;
        if (pa.dest != ADDR_W'((n_a % 2) ? 6 : 2) || pa.src != ADDR_W'(5) || !pa.valid) begin
          failures++; $display("A header wrong dest=%0d src=%0d", pa.dest, pa.src);
        end
        checks++;
        if (pa.payload !== exp_pay) begin failures++; $display("A payload %h exp %h", pa.payload, exp_pay); end
        exp_pay = lfsr64(exp_pay);
        last_t = cyc;
        n_a++;
      end
      // instance B: stall check and statistics
      if (held_v) begin
        checks++;
        if (!vb || pb !== held) begin failures++; $display("B packet changed while stalled"); end
      end
      rdy_b = ($urandom % 8) != 0;
      if (vb && rdy_b) begin
        n_b++;
        dest_seen[pb.dest[W-1:0]] = 1'b1;
        if (pb.dest >= N) begin failures++; $display("B dest out of range"); end
      end
      held_v = vb && !rdy_b;
      held   = pb;
      if (!rdy_b) stalls++;
    end
    checks++;
    if (n_a < 790 || n_a > 800) begin failures++; $display("A count %0d", n_a); end
    checks++;
    // 25 % of 4000 cycles = 1000, minus cycles lost to stalls
    if (n_b < 800 || n_b > 1150) begin failures++; $display("B count %0d", n_b); end
    checks++;
    if (dest_seen != '1) begin failures++; $display("B destinations %b", dest_seen); end
    checks++;
    if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
