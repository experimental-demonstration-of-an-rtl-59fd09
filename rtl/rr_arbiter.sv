// rr_arbiter: N-bit round-robin arbiter used once per switch output port.
//
// The arbiter grants one of the requesting inputs. Priority rotates: the input
// that was just granted gets the lowest priority in the next round (the next
// input up gets the highest). It is built as a programmable priority encoder:
// a thermometer mask selects the requests at or above the priority pointer,
// and the lowest set bit of either the masked or, if that is empty, the full
// request vector wins. The lowest-set-bit search is written as x & (~x + 1),
// an add whose carry chain synthesis tools map onto fast carry-lookahead or
// dedicated carry logic, playing the role of the carry-lookahead slice chain.
//
// Interface: req is sampled combinationally and gnt (one-hot or zero) is
// combinational from req and the internal pointer. When advance is high at a
// clock edge and a grant was made, the pointer moves past the granted input.
// Reset puts the highest priority on input 0.
`timescale 1ns / 1ps

module rr_arbiter #(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);

  logic [N-1:0] prio_mask;   // ones from the highest-priority position up
  logic [N-1:0] masked;
  logic [N-1:0] gnt_masked;
  logic [N-1:0] gnt_plain;

  always_comb begin
    masked     = req & prio_mask;
    gnt_masked = masked & (~masked + N'(1));
    gnt_plain  = req & (~req + N'(1));
    gnt        = (masked != '0) ? gnt_masked : gnt_plain;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prio_mask <= '1;
    end else if (advance && gnt != '0) begin
      // bits strictly above the granted one; wraps to all-zero (i.e. plain
      // lowest-first) when the top input was granted
      prio_mask <= ~((gnt << 1) - N'(1));
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0);

endmodule
