// switch_config: switch configuration controller of the scheduler.
//
// Takes the registered grant vectors of the allocation circuit and turns them
// into the signals that drive the switch for one configuration pulse of PULSE
// scheduler cycles:
//   * soa[i][o]      crossbar gate from input i to output o,
//   * src_srv_en[i]  input gate passing the packet arriving from network
//                    interface i (a new packet was granted),
//   * src_buf_en[i]  input gate passing the packet re-sent from switch buffer i,
//   * buf_rd[i]      one-cycle read of buffer i (first pulse cycle),
//   * buf_wr_en[i]   buffer i must capture the packet arriving from network
//                    interface i (its request was not granted),
//   * buf_wr_last[i] last cycle of that write window; the buffer stores the
//                    packet at its end.
// A new grant turns its gates on in the same cycle the grant register shows
// it (the gate drive is decoded combinationally from that register), and a
// per-input counter keeps them on for the remaining PULSE-1 cycles; the
// expired grants are so removed. PULSE = 2 is the demonstrated width: the
// packet length plus the gate switch-on time, widened by one cycle for the
// uncertainty of an asynchronous request arrival.
//
// in_busy / out_busy tell the allocator which inputs and outputs are still
// held by a pulse that would overlap a grant made now (a grant made in cycle
// t drives the gates from cycle t+1). The allocator itself blocks the ports
// granted in the cycle before, so these flags are only set for PULSE > 2.
`timescale 1ns / 1ps

module switch_config #(
  parameter int unsigned N     = 32,
  parameter int unsigned W     = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PULSE = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        srv_gnt,
  input  logic [N-1:0]        buf_gnt,
  input  logic [N-1:0]        srv_wr,
  input  logic [N-1:0][W-1:0] gnt_dest,
  output logic [N-1:0][N-1:0] soa,        // [in][out]
  output logic [N-1:0]        src_srv_en,
  output logic [N-1:0]        src_buf_en,
  output logic [N-1:0]        buf_rd,
  output logic [N-1:0]        buf_wr_en,
  output logic [N-1:0]        buf_wr_last,
  output logic [N-1:0]        in_busy,
  output logic [N-1:0]        out_busy
);

  localparam int unsigned CW = $clog2(PULSE + 1);

  logic [N-1:0][CW-1:0] hold_cnt;   // pulse cycles left after the grant cycle
  logic [N-1:0][W-1:0]  hold_dest;
  logic [N-1:0]         hold_buf;
  logic [N-1:0][CW-1:0] wr_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_cnt  <= '0;
      hold_dest <= '0;
      hold_buf  <= '0;
      wr_cnt    <= '0;
    end else begin
      for (int i = 0; i < N; i++) begin
        if (srv_gnt[i] || buf_gnt[i]) begin
          hold_cnt[i]  <= CW'(PULSE - 1);
          hold_dest[i] <= gnt_dest[i];
          hold_buf[i]  <= buf_gnt[i];
        end else if (hold_cnt[i] != '0) begin
          hold_cnt[i]  <= hold_cnt[i] - CW'(1);
        end
        if (srv_wr[i])               wr_cnt[i] <= CW'(PULSE - 1);
        else if (wr_cnt[i] != '0)    wr_cnt[i] <= wr_cnt[i] - CW'(1);
      end
    end
  end

  always_comb begin
    soa      = '0;
    out_busy = '0;
    for (int i = 0; i < N; i++) begin
      logic          act;
      logic          is_buf;
      logic [W-1:0]  d;
      act    = srv_gnt[i] || buf_gnt[i] || (hold_cnt[i] != '0);
      is_buf = (srv_gnt[i] || buf_gnt[i]) ? buf_gnt[i] : hold_buf[i];
      d      = (srv_gnt[i] || buf_gnt[i]) ? gnt_dest[i] : hold_dest[i];
      src_srv_en[i]  = act && !is_buf;
      src_buf_en[i]  = act && is_buf;
      for (int o = 0; o < N; o++) soa[i][o] = act && (d == W'(o));
      in_busy[i]     = (hold_cnt[i] >= CW'(2));
      if (hold_cnt[i] >= CW'(2)) out_busy[hold_dest[i]] = 1'b1;
      buf_rd[i]      = buf_gnt[i];
      buf_wr_en[i]   = srv_wr[i] || (wr_cnt[i] != '0);
      buf_wr_last[i] = (PULSE == 1) ? srv_wr[i] : (wr_cnt[i] == CW'(1));
    end
  end

  // a grant never lands on an input whose pulse is still running
  assert property (@(posedge clk) disable iff (!rst_n)
                   ((srv_gnt | buf_gnt) & in_busy) == '0);

endmodule
