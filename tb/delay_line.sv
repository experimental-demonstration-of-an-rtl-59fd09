// delay_line: transport-delay model of a cable or fibre, for testbenches.
// Every change of din reappears on dout DELAY ns later, however short the
// pulse (no inertial filtering). With KEEP_VALID set, dout only takes values
// whose top bit (a packet's valid bit) is set, so it holds the last packet
// seen, as a receiver's output register would.
`timescale 1ns / 1ps

module delay_line #(
  parameter int unsigned WIDTH      = 8,
  parameter realtime     DELAY      = 10.0,
  parameter bit          KEEP_VALID = 1'b0
) (
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  typedef struct { realtime t; logic [WIDTH-1:0] v; } ev_t;
  ev_t q [$];

  initial dout = '0;

  initial forever begin
    ev_t e;
    @(din);
    e.t = $realtime + DELAY;
    e.v = din;
    q.push_back(e);
  end

  initial forever begin
    ev_t e;
    wait (q.size() > 0);
    e = q[0];
    if (e.t > $realtime) #(e.t - $realtime);
    if (!KEEP_VALID || e.v[WIDTH-1]) dout = e.v;
    void'(q.pop_front());
  end
endmodule
