// tb_alloc_single: self-checking test of the single-stage allocator.
// Random new requests, buffer requests (with the buffer-occupied flags) and
// busy flags drive the allocator (4 ports). An independent cycle model
// predicts the registered outputs two cycles after the requests: requests are
// registered, each input offers its buffer's request if the buffer is
// occupied and otherwise its new request, inputs and outputs granted in the
// previous cycle or flagged busy are skipped, each output grants round-robin
// starting after its last winner, and a new request that is not granted
// becomes a buffer write. Coverage counters make sure contention, buffer
// precedence, grant feedback and busy masking all occur.
`timescale 1ns / 1ps

module tb_alloc_single;
  localparam int N = 4;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] sreq, breq, bocc, ibusy, obusy;
  logic [N-1:0][W-1:0] sdest, bdest;
  logic [N-1:0] sg, bg, swr;
  logic [N-1:0][W-1:0] gd;
  int checks = 0, failures = 0;

  alloc_single #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .srv_req(sreq), .srv_dest(sdest),
    .buf_req(breq), .buf_dest(bdest), .buf_occ(bocc), .in_busy(ibusy), .out_busy(obusy),
    .srv_gnt(sg), .buf_gnt(bg), .srv_wr(swr), .gnt_dest(gd));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  bit r_sreq [N], r_breq [N], r_bocc [N];
  int r_sdest [N], r_bdest [N];
  int ptr [N];
  bit prev_g [N][N];            // [out][in]
  bit e_sg [N], e_bg [N], e_wr [N];
  int e_gd [N];
  int cov_contend = 0, cov_prec = 0, cov_fb = 0, cov_busy = 0;

  always @(posedge clk) if (rst_n) begin
    bit in_t [N], out_t [N], cand [N], g [N][N], granted [N];
    int cd [N];
    for (int i = 0; i < N; i++) begin in_t[i] = ibusy[i]; out_t[i] = obusy[i]; end
    for (int o = 0; o < N; o++) for (int i = 0; i < N; i++)
      if (prev_g[o][i]) begin in_t[i] = 1; out_t[o] = 1; end
    for (int i = 0; i < N; i++) begin
      cand[i] = r_bocc[i] ? r_breq[i] : r_sreq[i];
      cd[i]   = r_bocc[i] ? r_bdest[i] : r_sdest[i];
      if (r_bocc[i] && r_sreq[i]) cov_prec++;
      if (cand[i] && in_t[i] && !ibusy[i]) cov_fb++;
      if (cand[i] && ibusy[i]) cov_busy++;
      granted[i] = 0;
    end
    for (int o = 0; o < N; o++) begin
      int nreq;
      nreq = 0;
      for (int i = 0; i < N; i++) begin
        g[o][i] = 0;
        if (cand[i] && cd[i] == o && !in_t[i] && !out_t[o]) nreq++;
      end
      if (nreq > 1) cov_contend++;
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr[o] + k) % N;
        if (cand[i] && cd[i] == o && !in_t[i] && !out_t[o]) begin
          g[o][i] = 1; granted[i] = 1; ptr[o] = (i + 1) % N;
          break;
        end
      end
    end
    for (int i = 0; i < N; i++) begin
      e_sg[i] = granted[i] && !r_bocc[i];
      e_bg[i] = granted[i] && r_bocc[i];
      e_wr[i] = r_sreq[i] && !e_sg[i];
      e_gd[i] = cd[i];
    end
    prev_g = g;
    for (int i = 0; i < N; i++) begin
      r_sreq[i] = sreq[i]; r_breq[i] = breq[i]; r_bocc[i] = bocc[i];
      r_sdest[i] = int'(sdest[i]); r_bdest[i] = int'(bdest[i]);
    end
  end

  initial begin
    sreq = '0; breq = '0; bocc = '0; ibusy = '0; obusy = '0; sdest = '0; bdest = '0;
    for (int i = 0; i < N; i++) begin
      ptr[i] = 0; r_sreq[i] = 0; r_breq[i] = 0; r_bocc[i] = 0; e_sg[i] = 0; e_bg[i] = 0; e_wr[i] = 0;
      for (int o = 0; o < N; o++) prev_g[o][i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        checks++;
        if (sg[i] !== e_sg[i] || bg[i] !== e_bg[i] || swr[i] !== e_wr[i] ||
            ((e_sg[i] || e_bg[i]) && gd[i] !== W'(e_gd[i]))) begin
          failures++;
          if (failures < 10) $display("t=%0d in %0d sg=%b/%b bg=%b/%b wr=%b/%b gd=%0d/%0d", t, i,
            sg[i], e_sg[i], bg[i], e_bg[i], swr[i], e_wr[i], gd[i], e_gd[i]);
        end
      end
      for (int i = 0; i < N; i++) begin
        sreq[i]  = ($urandom % 3 == 0);
        sdest[i] = W'($urandom);
        breq[i]  = ($urandom % 3 == 0);
        bdest[i] = W'($urandom);
        bocc[i]  = breq[i] || ($urandom % 5 == 0);
        ibusy[i] = ($urandom % 10 == 0);
        obusy[i] = ($urandom % 10 == 0);
      end
    end
    checks++;
    if (cov_contend == 0 || cov_prec == 0 || cov_fb == 0 || cov_busy == 0) begin
      failures++; $display("coverage %0d %0d %0d %0d", cov_contend, cov_prec, cov_fb, cov_busy);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
