// scheduler: central switch scheduler co-located with the optical switch.
//
// Chain: request synchronizer (2 cycles) -> output-port allocation circuit
// (2 pipeline stages) -> switch configuration controller (gates decoded from
// the grant register, held for PULSE cycles). A request that reaches the
// scheduler just after a clock edge turns the switch gates on four scheduler
// cycles later: two for synchronization, two for allocation and switch
// configuration. With a 9.6 ns clock that is the 38.4 ns scheduling delay of
// the demonstrated 32 x 32 scheduler.
//
// TWO_STAGE selects the allocation circuit: 0 = single-stage allocator (the
// demonstrated one, default), 1 = two-stage parallel allocator (shorter
// critical path, same cycle count). Switch-buffer requests come from the
// buffers in the scheduler's own clock domain and are not synchronized.
//
// Outputs: crossbar gates soa[in][out], per-input source gates, buffer read /
// write controls. sync_req and srv_gnt / buf_gnt are observation points for
// the synchronized requests and the issued grants.
`timescale 1ns / 1ps

module scheduler #(
  parameter int unsigned N         = 32,
  parameter int unsigned W         = (N > 1) ? $clog2(N) : 1,
  parameter bit          TWO_STAGE = 1'b0,
  parameter int unsigned PULSE     = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N-1:0]        req_valid,     // asynchronous, from the network interfaces
  input  logic [N-1:0][W-1:0] req_dest,
  input  logic [N-1:0]        buf_req,
  input  logic [N-1:0][W-1:0] buf_dest,
  input  logic [N-1:0]        buf_occ,
  output logic [N-1:0][N-1:0] soa,
  output logic [N-1:0]        src_srv_en,
  output logic [N-1:0]        src_buf_en,
  output logic [N-1:0]        buf_rd,
  output logic [N-1:0]        buf_wr_en,
  output logic [N-1:0]        buf_wr_last,
  output logic [N-1:0]        sync_req,
  output logic [N-1:0]        srv_gnt,
  output logic [N-1:0]        buf_gnt
);

  logic [N-1:0]        new_req;
  logic [N-1:0][W-1:0] sync_dest;
  logic [N-1:0]        srv_wr, in_busy, out_busy;
  logic [N-1:0][W-1:0] gnt_dest;

  request_sync #(.N(N), .W(W)) u_sync (
    .clk         (clk),
    .rst_n       (rst_n),
    .async_valid (req_valid),
    .async_dest  (req_dest),
    .sync_valid  (sync_req),
    .new_req     (new_req),
    .sync_dest   (sync_dest)
  );

  if (TWO_STAGE) begin : g_alloc
    alloc_two_stage #(.N(N), .W(W)) u_alloc (
      .clk (clk), .rst_n (rst_n),
      .srv_req (new_req), .srv_dest (sync_dest),
      .buf_req (buf_req), .buf_dest (buf_dest), .buf_occ (buf_occ),
      .in_busy (in_busy), .out_busy (out_busy),
      .srv_gnt (srv_gnt), .buf_gnt (buf_gnt), .srv_wr (srv_wr), .gnt_dest (gnt_dest)
    );
  end else begin : g_alloc
    alloc_single #(.N(N), .W(W)) u_alloc (
      .clk (clk), .rst_n (rst_n),
      .srv_req (new_req), .srv_dest (sync_dest),
      .buf_req (buf_req), .buf_dest (buf_dest), .buf_occ (buf_occ),
      .in_busy (in_busy), .out_busy (out_busy),
      .srv_gnt (srv_gnt), .buf_gnt (buf_gnt), .srv_wr (srv_wr), .gnt_dest (gnt_dest)
    );
  end

  switch_config #(.N(N), .W(W), .PULSE(PULSE)) u_cfg (
    .clk         (clk),
    .rst_n       (rst_n),
    .srv_gnt     (srv_gnt),
    .buf_gnt     (buf_gnt),
    .srv_wr      (srv_wr),
    .gnt_dest    (gnt_dest),
    .soa         (soa),
    .src_srv_en  (src_srv_en),
    .src_buf_en  (src_buf_en),
    .buf_rd      (buf_rd),
    .buf_wr_en   (buf_wr_en),
    .buf_wr_last (buf_wr_last),
    .in_busy     (in_busy),
    .out_busy    (out_busy)
  );

endmodule
