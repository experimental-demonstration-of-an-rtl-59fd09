// tb_switch_buffer: self-checking test of the switch recirculation buffer.
// Write windows (2 cycles, store at the end) and one-cycle reads are issued
// at random against a queue model of depth 8. Checks each cycle: the head
// request (valid and destination), the packet shown during and after a read,
// the occupied flag, the registered FIFO-full bit (set when at most one slot
// is free, counting an open write window), the overflow flag when a write
// finds the buffer full, and the miss flag for a window without a packet.
`timescale 1ns / 1ps

module tb_switch_buffer;
  import ops_pkg::*;
  localparam int N = 4;
  localparam int W = 2;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  pkt_t rx, tx;
  logic wr_en, wr_last, rd, req_valid, occupied, full, overflow, miss;
  logic [W-1:0] req_dest;
  int checks = 0, failures = 0;
  pkt_t model [$];
  pkt_t last_read;
  logic exp_full, exp_ovf, exp_miss;
  int n_full = 0, n_ovf = 0, n_miss = 0, n_rd = 0;
  int wr_phase = 0;

  switch_buffer #(.N(N), .DEPTH(DEPTH), .FULL_FREE(1)) dut (.clk(clk), .rst_n(rst_n),
    .rx_pkt(rx), .wr_en(wr_en), .wr_last(wr_last), .rd(rd), .tx_pkt(tx),
    .req_valid(req_valid), .req_dest(req_dest), .occupied(occupied), .full(full),
    .overflow(overflow), .miss(miss));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rx = '0; wr_en = 0; wr_last = 0; rd = 0;
    exp_full = 0; exp_ovf = 0; exp_miss = 0; last_read = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // registered flags from the previous edge
      checks++;
      if (full !== exp_full || overflow !== exp_ovf || miss !== exp_miss) begin
        failures++;
        if (failures < 10) $display("t=%0d flags full=%b/%b ovf=%b/%b miss=%b/%b", t, full, exp_full, overflow, exp_ovf, miss, exp_miss);
      end
      // new stimulus; the fill/drain bias changes every 300 cycles
      if (wr_phase == 0 && ($urandom % 3 == 0)) begin
        wr_phase = 1;
        if ($urandom % 10 == 0) rx = '0;
        else rx = {1'b1, ADDR_W'(1), ADDR_W'($urandom % N), {$urandom, $urandom}};
      end else if (wr_phase == 1) wr_phase = 2;
      else wr_phase = 0;
      wr_en   = (wr_phase != 0);
      wr_last = (wr_phase == 2);
      rd = (model.size() > 0) && ($urandom % (((t / 300) % 2 == 0) ? 6 : 2) == 0);
      #1;
      // combinational outputs against the model
      checks++;
      if (req_valid !== (model.size() > 0 && !rd)) begin failures++; $display("t=%0d req_valid", t); end
      if (model.size() > 0) begin
        checks++;
        if (req_dest !== model[0].dest[W-1:0]) begin failures++; $display("t=%0d req_dest", t); end
      end
      checks++;
      if (occupied !== (model.size() > 0 || wr_en)) begin failures++; $display("t=%0d occupied", t); end
      if (rd) begin
        checks++;
        if (tx !== model[0]) begin failures++; $display("t=%0d read data", t); end
      end else begin
        checks++;
        if (tx !== last_read) begin failures++; $display("t=%0d held data", t); end
      end
      // model update at the edge
      exp_full = (model.size() + (wr_en ? 1 : 0) + 1) >= DEPTH;
      exp_ovf  = 0;
      exp_miss = wr_last && !rx.valid;
      if (rd) begin last_read = model.pop_front(); n_rd++; end
      if (wr_last && rx.valid) begin
        if (model.size() >= DEPTH && !rd) exp_ovf = 1;
        else if (model.size() < DEPTH) model.push_back(rx);
      end
      if (exp_full) n_full++;
      if (exp_ovf) n_ovf++;
      if (exp_miss) n_miss++;
    end
    checks++;
    if (n_full == 0 || n_ovf == 0 || n_miss == 0 || n_rd < 100) begin
      failures++; $display("coverage full=%0d ovf=%0d miss=%0d rd=%0d", n_full, n_ovf, n_miss, n_rd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
