// ops_pkg: types and constants shared by the optical packet switch control plane.
//
// A packet is carried between blocks as one packed word: a valid bit, the
// source and destination port numbers and a 64-bit payload. In the
// demonstration setup each packet on the wire carries 64 bits (it stands for
// a 64-byte packet striped over 8 wavelengths); the payload field is those
// 64 bits. The address fields are 6 bits wide so that the same type serves
// switches of up to 64 ports (the largest size the two-stage allocator is
// aimed at); a 32-port switch uses the low 5 bits.
`timescale 1ns / 1ps

package ops_pkg;

  localparam int unsigned ADDR_W    = 6;   // source / destination field width
  localparam int unsigned PAYLOAD_W = 64;  // bits carried per packet

  typedef struct packed {
    logic                 valid;
    logic [ADDR_W-1:0]    src;
    logic [ADDR_W-1:0]    dest;
    logic [PAYLOAD_W-1:0] payload;
  } pkt_t;

  localparam int unsigned PKT_W = $bits(pkt_t);

endpackage
