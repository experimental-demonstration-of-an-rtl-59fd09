// tb_switch_config: self-checking test of the switch configuration controller.
// Two instances, pulse widths 2 and 3, get random legal grant and write
// vectors (a grant only on an input whose pulse has ended, distinct outputs).
// A reference keeps, per input, the cycle its last grant appeared and its
// destination, and predicts every cycle: crossbar gates on for exactly PULSE
// cycles starting with the grant cycle, the input source gates, the one-cycle
// buffer read, the write window and its last cycle, and the busy flags (set
// while the pulse would still overlap a grant made now).
`timescale 1ns / 1ps

module tb_switch_config;
  localparam int N = 4;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  logic [N-1:0] sg [2], bg [2], sw [2];
  logic [N-1:0][W-1:0] gd [2];
  logic [N-1:0][N-1:0] soa [2];
  logic [N-1:0] sse [2], sbe [2], brd [2], wen [2], wlast [2], ib [2], ob [2];

  for (genvar k = 0; k < 2; k++) begin : g_dut
    switch_config #(.N(N), .PULSE(k + 2)) dut (.clk(clk), .rst_n(rst_n),
      .srv_gnt(sg[k]), .buf_gnt(bg[k]), .srv_wr(sw[k]), .gnt_dest(gd[k]), .soa(soa[k]),
      .src_srv_en(sse[k]), .src_buf_en(sbe[k]), .buf_rd(brd[k]), .buf_wr_en(wen[k]),
      .buf_wr_last(wlast[k]), .in_busy(ib[k]), .out_busy(ob[k]));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int g_start [2][N], w_start [2][N];
  int g_dst [2][N];
  bit g_buf [2][N];
  int n_busy = 0, n_pulse_end = 0;

  initial begin
    for (int k = 0; k < 2; k++) begin
      sg[k] = '0; bg[k] = '0; sw[k] = '0; gd[k] = '0;
      for (int i = 0; i < N; i++) begin g_start[k][i] = -100; w_start[k][i] = -100; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 2; k++) begin
        int P;
        logic [N-1:0] used_out;
        P = k + 2;
        used_out = '0;
        // outputs still held beyond this cycle cannot be granted again
        for (int i = 0; i < N; i++)
          if (t - g_start[k][i] < P - 1) used_out[g_dst[k][i]] = 1'b1;
        sg[k] = '0; bg[k] = '0; sw[k] = '0;
        for (int i = 0; i < N; i++) begin
          int d;
          d = $urandom % N;
          if (t - g_start[k][i] >= P && !used_out[d] && ($urandom % 3 == 0)) begin
            used_out[d] = 1'b1;
            if ($urandom % 2) sg[k][i] = 1'b1; else bg[k][i] = 1'b1;
            gd[k][i] = W'(d);
            g_start[k][i] = t; g_dst[k][i] = d; g_buf[k][i] = bg[k][i];
          end
          if (t - w_start[k][i] >= P && !sg[k][i] && ($urandom % 4 == 0)) begin
            sw[k][i] = 1'b1;
            w_start[k][i] = t;
          end
        end
      end
      #1;
      for (int k = 0; k < 2; k++) begin
        int P;
        logic [N-1:0][N-1:0] e_soa;
        logic [N-1:0] e_sse, e_sbe, e_wen, e_wl, e_ib, e_ob;
        P = k + 2;
        e_soa = '0; e_sse = '0; e_sbe = '0; e_wen = '0; e_wl = '0; e_ib = '0; e_ob = '0;
        for (int i = 0; i < N; i++) begin
          int a;
          a = t - g_start[k][i];
          if (a < P) begin
            e_soa[i][g_dst[k][i]] = 1'b1;
            if (g_buf[k][i]) e_sbe[i] = 1'b1; else e_sse[i] = 1'b1;
          end
          // a grant made now drives gates from the next cycle on
          if (a >= 1 && a < P - 1) begin e_ib[i] = 1'b1; e_ob[g_dst[k][i]] = 1'b1; end
          if (t - w_start[k][i] < P) e_wen[i] = 1'b1;
          if (t - w_start[k][i] == P - 1) e_wl[i] = 1'b1;
        end
        checks++;
        if (soa[k] !== e_soa || sse[k] !== e_sse || sbe[k] !== e_sbe) begin
          failures++; if (failures < 10) $display("t=%0d P=%0d gates soa=%h exp %h", t, P, soa[k], e_soa);
        end
        checks++;
        if (brd[k] !== bg[k] || wen[k] !== e_wen || wlast[k] !== e_wl) begin
          failures++; if (failures < 10) $display("t=%0d P=%0d buffer ctl", t, P);
        end
        checks++;
        if (ib[k] !== e_ib || ob[k] !== e_ob) begin
          failures++; if (failures < 10) $display("t=%0d P=%0d busy ib=%b/%b ob=%b/%b", t, P, ib[k], e_ib, ob[k], e_ob);
        end
        if (e_ib != '0) n_busy++;
      end
    end
    checks++;
    if (n_busy == 0) begin failures++; $display("busy never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
