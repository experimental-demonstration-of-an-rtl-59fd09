// alloc_two_stage: two-stage parallel output-port allocation circuit.
//
// The allocation is split so that each pipeline stage holds less logic than
// the single-stage circuit:
//   Stage 1 (arbitration): the new-packet requests and the switch-buffer
//     requests are each decoded and rotated into an N x N per-output matrix
//     (R and R'), and arbitrated in parallel by two banks of N round-robin
//     arbiters, without any merging, priority or feedback logic. The grant
//     matrices G and G' are registered. The critical path runs from the
//     request inputs through one arbiter to these registers.
//   Stage 2 (grant generation): G and G' are merged into one matrix; on each
//     output a buffer grant wins over a new-packet grant, and a new packet is
//     not granted while its input's buffer is occupied (packet order). Grants
//     on inputs or outputs that were granted in the previous cycle (feedback
//     from the grant register) or whose configuration pulse still runs
//     (in_busy / out_busy) are filtered out. The merged matrix is de-rotated
//     per input into the two grant vectors and the granted destination, and a
//     new request without a grant becomes a buffer write.
//
// The interface and the timing (outputs two cycles after the requests) are
// the same as alloc_single, so either circuit can sit in the scheduler.
// Arbiter pointers move on every stage-1 grant, also one that stage 2 later
// filters out; this is a choice of this design.
`timescale 1ns / 1ps

module alloc_two_stage #(
  parameter int unsigned N = 32,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        srv_req,
  input  logic [N-1:0][W-1:0] srv_dest,
  input  logic [N-1:0]        buf_req,
  input  logic [N-1:0][W-1:0] buf_dest,
  input  logic [N-1:0]        buf_occ,
  input  logic [N-1:0]        in_busy,
  input  logic [N-1:0]        out_busy,
  output logic [N-1:0]        srv_gnt,
  output logic [N-1:0]        buf_gnt,
  output logic [N-1:0]        srv_wr,
  output logic [N-1:0][W-1:0] gnt_dest
);

  // ---------------- stage 1: parallel arbitration ----------------
  logic [N-1:0][N-1:0] r_srv, r_buf;   // [out][in]
  logic [N-1:0][N-1:0] g_srv, g_buf;

  always_comb begin
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        r_srv[o][i] = srv_req[i] && (srv_dest[i] == W'(o));
        r_buf[o][i] = buf_req[i] && (buf_dest[i] == W'(o));
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb_srv (
      .clk (clk), .rst_n (rst_n), .req (r_srv[o]), .advance (1'b1), .gnt (g_srv[o])
    );
    rr_arbiter #(.N(N)) u_arb_buf (
      .clk (clk), .rst_n (rst_n), .req (r_buf[o]), .advance (1'b1), .gnt (g_buf[o])
    );
  end

  logic [N-1:0][N-1:0] gs_r, gb_r;
  logic [N-1:0]        sreq_p, bocc_p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gs_r   <= '0;
      gb_r   <= '0;
      sreq_p <= '0;
      bocc_p <= '0;
    end else begin
      gs_r   <= g_srv;
      gb_r   <= g_buf;
      sreq_p <= srv_req;
      bocc_p <= buf_occ;
    end
  end

  // ---------------- stage 2: merge, filter, de-rotate ----------------
  logic [N-1:0][N-1:0] g_reg;          // merged grants issued last cycle
  logic [N-1:0]        in_taken, out_taken;
  logic [N-1:0][N-1:0] mb, ms, merged;
  logic [N-1:0]        s_gnt, b_gnt;
  logic [N-1:0][W-1:0] dest_n;

  always_comb begin
    in_taken  = in_busy;
    out_taken = out_busy;
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        if (g_reg[o][i]) begin
          in_taken[i]  = 1'b1;
          out_taken[o] = 1'b1;
        end
      end
    end
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        mb[o][i] = gb_r[o][i] && !in_taken[i] && !out_taken[o];
      end
      for (int i = 0; i < N; i++) begin
        ms[o][i] = gs_r[o][i] && !bocc_p[i] && !in_taken[i] && !out_taken[o] && (mb[o] == '0);
      end
      merged[o] = mb[o] | ms[o];
    end
    s_gnt  = '0;
    b_gnt  = '0;
    dest_n = '0;
    for (int o = 0; o < N; o++) begin
      s_gnt |= ms[o];
      b_gnt |= mb[o];
      for (int i = 0; i < N; i++) begin
        if (merged[o][i]) dest_n[i] = W'(o);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_reg    <= '0;
      srv_gnt  <= '0;
      buf_gnt  <= '0;
      srv_wr   <= '0;
      gnt_dest <= '0;
    end else begin
      g_reg    <= merged;
      srv_gnt  <= s_gnt;
      buf_gnt  <= b_gnt;
      srv_wr   <= sreq_p & ~s_gnt;
      gnt_dest <= dest_n;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) (srv_gnt & buf_gnt) == '0);

endmodule
