// tb_alloc_two_stage: self-checking test of the two-stage allocator.
// Random new requests, buffer requests (with the buffer-occupied flags) and
// busy flags drive the allocator (4 ports). An independent cycle model
// predicts the registered outputs two cycles after the requests: in the
// first cycle new requests and buffer requests are arbitrated separately,
// round-robin per output; in the second cycle a buffer grant wins its
// output, a new grant is dropped when its input's buffer is occupied, and
// grants on inputs or outputs granted in the previous cycle or flagged busy
// are filtered out. A new request without a grant becomes a buffer write.
// Coverage counters make sure that output conflicts between the two arbiter
// banks, buffer precedence, grant feedback and busy masking all occur.
`timescale 1ns / 1ps

module tb_alloc_two_stage;
  localparam int N = 4;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] sreq, breq, bocc, ibusy, obusy;
  logic [N-1:0][W-1:0] sdest, bdest;
  logic [N-1:0] sg, bg, swr;
  logic [N-1:0][W-1:0] gd;
  int checks = 0, failures = 0;

  alloc_two_stage #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .srv_req(sreq), .srv_dest(sdest),
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
  bit p_gs [N][N], p_gb [N][N];  // registered stage-1 grants [out][in]
  bit p_sreq [N], p_bocc [N];
  int ptr_s [N], ptr_b [N];
  bit prev_g [N][N];
  bit e_sg [N], e_bg [N], e_wr [N];
  int e_gd [N];
  int cov_contend = 0, cov_prec = 0, cov_fb = 0, cov_busy = 0;

  always @(posedge clk) if (rst_n) begin
    bit in_t [N], out_t [N], mb [N][N], ms [N][N], g [N][N];
    bit n_gs [N][N], n_gb [N][N];
    // stage 2 on the registered stage-1 grants
    for (int i = 0; i < N; i++) begin in_t[i] = ibusy[i]; out_t[i] = obusy[i]; end
    for (int o = 0; o < N; o++) for (int i = 0; i < N; i++)
      if (prev_g[o][i]) begin in_t[i] = 1; out_t[o] = 1; end
    for (int i = 0; i < N; i++) begin e_sg[i] = 0; e_bg[i] = 0; end
    for (int o = 0; o < N; o++) begin
      bit anyb, anys;
      anyb = 0; anys = 0;
      for (int i = 0; i < N; i++) begin
        mb[o][i] = p_gb[o][i] && !in_t[i] && !out_t[o];
        if (mb[o][i]) anyb = 1;
        if (p_gs[o][i]) anys = 1;
        if (p_gs[o][i] && p_bocc[i]) cov_prec++;
        if ((p_gs[o][i] || p_gb[o][i]) && in_t[i] && !ibusy[i]) cov_fb++;
        if ((p_gs[o][i] || p_gb[o][i]) && ibusy[i]) cov_busy++;
      end
      if (anyb && anys) cov_contend++;
      for (int i = 0; i < N; i++) begin
        ms[o][i] = p_gs[o][i] && !p_bocc[i] && !in_t[i] && !out_t[o] && !anyb;
        g[o][i] = mb[o][i] || ms[o][i];
        if (ms[o][i]) begin e_sg[i] = 1; e_gd[i] = o; end
        if (mb[o][i]) begin e_bg[i] = 1; e_gd[i] = o; end
      end
    end
    for (int i = 0; i < N; i++) e_wr[i] = p_sreq[i] && !e_sg[i];
    prev_g = g;
    // stage 1 on the current inputs
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin n_gs[o][i] = 0; n_gb[o][i] = 0; end
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr_s[o] + k) % N;
        if (sreq[i] && int'(sdest[i]) == o) begin n_gs[o][i] = 1; ptr_s[o] = (i + 1) % N; break; end
      end
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr_b[o] + k) % N;
        if (breq[i] && int'(bdest[i]) == o) begin n_gb[o][i] = 1; ptr_b[o] = (i + 1) % N; break; end
      end
    end
    p_gs = n_gs; p_gb = n_gb;
    for (int i = 0; i < N; i++) begin p_sreq[i] = sreq[i]; p_bocc[i] = bocc[i]; end
  end

  initial begin
    sreq = '0; breq = '0; bocc = '0; ibusy = '0; obusy = '0; sdest = '0; bdest = '0;
    for (int i = 0; i < N; i++) begin
      ptr_s[i] = 0; ptr_b[i] = 0; p_sreq[i] = 0; p_bocc[i] = 0; e_sg[i] = 0; e_bg[i] = 0; e_wr[i] = 0;
      for (int o = 0; o < N; o++) begin prev_g[o][i] = 0; p_gs[o][i] = 0; p_gb[o][i] = 0; end
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
