// dec_ttl: the router's TTL decrement unit (DEC_TTL).
//
// Takes the TTL octet from the header shift register and returns TTL-1 to be
// written back into the register, so the packet leaves with the new value.
// A TTL of 0 or 1 cannot be forwarded; expired_o tells the control logic to
// drop the packet (no ICMP message is generated, as in the prototype).
// Combinational. Decrement and write-back follow the prototype; the drop
// rule for TTL <= 1 is this design's reading of standard IPv4 forwarding.
module dec_ttl (
  input  logic [7:0] ttl_i,
  output logic [7:0] ttl_o,
  output logic       expired_o
);

  assign ttl_o     = ttl_i - 8'd1;
  assign expired_o = (ttl_i <= 8'd1);

endmodule
