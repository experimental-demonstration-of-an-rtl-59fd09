// alloc_single: single-stage output-port allocation circuit (the allocator of
// the demonstrated scheduler).
//
// Two pipeline stages. Stage 1 only registers the two request matrices: the
// new requests from the network interfaces (one per input port, a valid bit
// and a log2(N)-bit destination) and the head-of-line requests of the switch
// buffers. Stage 2 performs the whole allocation in one clock cycle:
//   * the request generator decodes and rotates both matrices so that the
//     requests are grouped per output port, and merges them into one N x N
//     matrix R, giving an input's buffer precedence over its network
//     interface (a new packet may not overtake packets already buffered for
//     the same input);
//   * requests of inputs and outputs that hold a grant issued in the previous
//     cycle (fed back from the grant register) or a configuration pulse that
//     is still running (in_busy / out_busy from the configuration controller)
//     are removed;
//   * N round-robin arbiters, one per output, turn R into the grant matrix G;
//   * G is de-rotated per input and split into a grant vector for new packets
//     and one for buffered packets. A new request that is not granted becomes
//     a buffer write (srv_wr). The vectors and the granted destination are
//     registered for the switch configuration controller.
// The feedback from the grant register through an arbiter back to the grant
// register is the critical path of this circuit.
//
// Timing: a request presented in cycle t appears in the outputs in cycle t+2.
// buf_occ tells, per input, whether its switch buffer holds or is about to
// hold a packet; it decides precedence even when the buffer's request has
// been withdrawn for a cycle while its head packet leaves.
`timescale 1ns / 1ps

module alloc_single #(
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

  // ---------------- stage 1: request registers ----------------
  logic [N-1:0]        sreq_r, breq_r, bocc_r;
  logic [N-1:0][W-1:0] sdest_r, bdest_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreq_r  <= '0;
      breq_r  <= '0;
      bocc_r  <= '0;
      sdest_r <= '0;
      bdest_r <= '0;
    end else begin
      sreq_r  <= srv_req;
      breq_r  <= buf_req;
      bocc_r  <= buf_occ;
      sdest_r <= srv_dest;
      bdest_r <= buf_dest;
    end
  end

  // ---------------- stage 2: allocation ----------------
  logic [N-1:0][N-1:0] g_reg;      // grant matrix issued last cycle, [out][in]
  logic [N-1:0]        in_taken, out_taken;
  logic [N-1:0]        use_buf, cand;
  logic [N-1:0][W-1:0] cand_dest;
  logic [N-1:0][N-1:0] r_mat;      // [out][in]
  logic [N-1:0][N-1:0] g_mat;      // [out][in]
  logic [N-1:0]        granted;

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
    // request generator: merge per input, buffer first
    for (int i = 0; i < N; i++) begin
      use_buf[i]   = bocc_r[i];
      cand[i]      = bocc_r[i] ? breq_r[i] : sreq_r[i];
      cand_dest[i] = bocc_r[i] ? bdest_r[i] : sdest_r[i];
    end
    // rotate to per-output rows, dropping resolved / blocked requests
    for (int o = 0; o < N; o++) begin
      for (int i = 0; i < N; i++) begin
        r_mat[o][i] = cand[i] && (cand_dest[i] == W'(o)) && !in_taken[i] && !out_taken[o];
      end
    end
  end

  for (genvar o = 0; o < N; o++) begin : g_arb
    rr_arbiter #(.N(N)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (r_mat[o]),
      .advance (1'b1),
      .gnt     (g_mat[o])
    );
  end

  // de-rotate: per input, was it granted any output
  always_comb begin
    granted = '0;
    for (int o = 0; o < N; o++) granted |= g_mat[o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_reg    <= '0;
      srv_gnt  <= '0;
      buf_gnt  <= '0;
      srv_wr   <= '0;
      gnt_dest <= '0;
    end else begin
      g_reg    <= g_mat;
      srv_gnt  <= granted & ~use_buf;
      buf_gnt  <= granted & use_buf;
      srv_wr   <= sreq_r & ~(granted & ~use_buf);
      gnt_dest <= cand_dest;
    end
  end

  // one grant per output and per input
  assert property (@(posedge clk) disable iff (!rst_n) (srv_gnt & buf_gnt) == '0);

endmodule
