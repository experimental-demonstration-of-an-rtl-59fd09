// tb_rr_arbiter: self-checking test of the round-robin arbiter.
// Random request vectors are applied; an independent reference keeps a
// priority index and searches cyclically from it. Each cycle the grant is
// compared with the reference, and every advance moves the reference index
// to just past the granted input.
`timescale 1ns / 1ps

module tb_rr_arbiter;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic advance;
  int checks = 0, failures = 0;
  int ptr;
  int wraps = 0;

  rr_arbiter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .req(req), .advance(advance), .gnt(gnt));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_gnt(input logic [N-1:0] r, input int p);
    for (int k = 0; k < N; k++) begin
      int idx = (p + k) % N;
      if (r[idx]) return N'(1) << idx;
    end
    return '0;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0; ptr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      case (t % 4)
        0: req = N'($urandom);
        1: req = N'($urandom) & N'($urandom);
        2: req = '1;
        default: req = N'(1) << ($urandom % N);
      endcase
      advance = ($urandom % 4) != 0;
      #1;
      checks++;
      if (gnt !== ref_gnt(req, ptr)) begin
        failures++;
        if (failures < 10) $display("t=%0d req=%b ptr=%0d gnt=%b exp=%b", t, req, ptr, gnt, ref_gnt(req, ptr));
      end
      @(posedge clk);
      if (advance && req != '0) begin
        logic [N-1:0] g;
        g = ref_gnt(req, ptr);
        for (int k = 0; k < N; k++) if (g[k]) begin
          if (k == N-1) wraps++;
          ptr = (k + 1) % N;
        end
      end
    end
    // fairness: with all inputs requesting, N consecutive grants hit every input once
    @(negedge clk); req = '1; advance = 1;
    begin
      logic [N-1:0] seen;
      seen = '0;
      for (int k = 0; k < N; k++) begin
        #1; seen |= gnt;
        @(negedge clk);
      end
      checks++;
      if (seen !== '1) begin failures++; $display("not fair: %b", seen); end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("pointer never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
