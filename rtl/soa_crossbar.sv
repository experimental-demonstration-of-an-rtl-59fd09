// soa_crossbar: behavioural model of the optical crossbar built from
// semiconductor optical amplifier (SOA) gates.
//
// Behavioural model: the real part is optical. Each switch input carries
// either the packet arriving from its network interface (src_srv_en) or the
// packet re-sent by its electronic buffer (src_buf_en); an input gate selects
// which. A gate soa[i][o] connects input i to output o; an output port passes
// whatever its open gate carries, combining the inputs (an N:1 combiner). The
// model works on packet words rather than light: a closed gate passes
// nothing (all zeros). The SOA switch-on time is not modelled; the
// scheduler's configuration pulse is wide enough to hide it. If two gates of
// one output are open at once the model ORs them, as light would add; the
// scheduler never does that.
`timescale 1ns / 1ps

module soa_crossbar
  import ops_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  pkt_t   [N-1:0]       srv_pkt,
  input  pkt_t   [N-1:0]       buf_pkt,
  input  logic   [N-1:0]       src_srv_en,
  input  logic   [N-1:0]       src_buf_en,
  input  logic   [N-1:0][N-1:0] soa,        // [in][out]
  output pkt_t   [N-1:0]       out_pkt
);

  pkt_t [N-1:0] in_light;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      in_light[i] = '0;
      if (src_srv_en[i]) in_light[i] |= srv_pkt[i];
      if (src_buf_en[i]) in_light[i] |= buf_pkt[i];
    end
    for (int o = 0; o < N; o++) begin
      out_pkt[o] = '0;
      for (int i = 0; i < N; i++) begin
        if (soa[i][o]) out_pkt[o] |= in_light[i];
      end
    end
  end

endmodule
