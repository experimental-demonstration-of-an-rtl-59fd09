// pkt_gen: packet source feeding one network interface.
//
// Builds packets with a valid bit, source, destination and payload fields.
// The payload comes from a 64-bit linear feedback shift register
// (x^64 + x^63 + x^61 + x^60 + 1) that advances once per packet, so every
// packet of a source carries a different pseudo-random word.
//
// Two modes, chosen by period:
//   * period != 0 (periodic, as in the demonstration): one packet every
//     period cycles, the destination alternating between dest_a and dest_b
//     (equal values give a fixed destination);
//   * period == 0 (random, as in the rack-scale emulation): in every cycle a
//     packet is generated with probability load / 65536, with a uniformly
//     random destination in 0..N-1. A 32-bit LFSR
//     (x^32 + x^22 + x^2 + x + 1) supplies these draws.
// A packet that cannot be handed over (out_ready low) is held and no new one
// is generated meanwhile, so the source never drops packets. Both LFSRs are
// seeded from src_id, so different sources produce different streams.
`timescale 1ns / 1ps

module pkt_gen
  import ops_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] src_id,
  input  logic              enable,
  input  logic [15:0]       period,
  input  logic [16:0]       load,
  input  logic [W-1:0]      dest_a,
  input  logic [W-1:0]      dest_b,
  output pkt_t              out_pkt,
  output logic              out_valid,
  input  logic              out_ready
);

  logic [63:0] pay_lfsr;
  logic [31:0] rnd_lfsr;
  logic [15:0] per_cnt;
  logic        alt;
  logic        fire;
  logic [W-1:0] rnd_dest;

  function automatic logic [63:0] step64(input logic [63:0] s);
    return {s[62:0], s[63] ^ s[62] ^ s[60] ^ s[59]};
  endfunction

  function automatic logic [31:0] step32(input logic [31:0] s);
    return {s[30:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
  endfunction

  assign rnd_dest = W'(32'(rnd_lfsr[31:16]) % N);

  always_comb begin
    if (period != '0) fire = (per_cnt == '0);
    else              fire = ({1'b0, rnd_lfsr[15:0]} < load);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pay_lfsr  <= {32'hA5C3_96E1, 26'h0, src_id} ^ 64'h1;
      rnd_lfsr  <= {16'h3D4B, 10'h0, src_id} | 32'h8000_0001;
      per_cnt   <= '0;
      alt       <= 1'b0;
      out_valid <= 1'b0;
      out_pkt   <= '0;
    end else begin
      rnd_lfsr <= step32(rnd_lfsr);
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (enable) begin
        if (period != '0) per_cnt <= (per_cnt == '0) ? period - 16'd1 : per_cnt - 16'd1;
        if (fire && (!out_valid || out_ready)) begin
          out_valid       <= 1'b1;
          out_pkt.valid   <= 1'b1;
          out_pkt.src     <= src_id;
          out_pkt.dest    <= ADDR_W'((period != '0) ? W'(alt ? dest_b : dest_a) : rnd_dest);
          out_pkt.payload <= pay_lfsr;
          pay_lfsr        <= step64(pay_lfsr);
          alt             <= !alt;
        end
      end
    end
  end

endmodule
