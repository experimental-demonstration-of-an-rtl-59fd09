// tb_soa_crossbar: self-checking test of the crossbar model.
// Random permutations (each output opened to at most one input) and random
// input-source selections are applied; the expected output words are worked
// out from the permutation directly.
`timescale 1ns / 1ps

module tb_soa_crossbar;
  import ops_pkg::*;
  localparam int N = 8;
  pkt_t [N-1:0] srv, bufp, outp;
  logic [N-1:0] s_en, b_en;
  logic [N-1:0][N-1:0] soa;
  int checks = 0, failures = 0;
  int perm [N];

  soa_crossbar #(.N(N)) dut (.srv_pkt(srv), .buf_pkt(bufp), .src_srv_en(s_en),
                             .src_buf_en(b_en), .soa(soa), .out_pkt(outp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N-1; i > 0; i--) begin
        int j, tmp;
        j = $urandom % (i + 1);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      soa = '0;
      for (int i = 0; i < N; i++) begin
        srv[i]  = {1'b1, ADDR_W'(i), ADDR_W'(perm[i]), {$urandom, $urandom}};
        bufp[i] = {1'b1, ADDR_W'(i), ADDR_W'(perm[i]), {$urandom, $urandom}};
        s_en[i] = 0; b_en[i] = 0;
        case ($urandom % 3)
          0: ;
          1: s_en[i] = 1;
          default: b_en[i] = 1;
        endcase
        if ($urandom % 4 != 0) soa[i][perm[i]] = 1'b1;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        pkt_t exp;
        exp = '0;
        if (soa[i][perm[i]]) exp = s_en[i] ? srv[i] : (b_en[i] ? bufp[i] : '0);
        checks++;
        if (outp[perm[i]] !== exp) begin
          failures++;
          if (failures < 5) $display("t=%0d out %0d mismatch", t, perm[i]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
