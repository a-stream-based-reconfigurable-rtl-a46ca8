// src_filter: the router's source-address filter (FILTER).
//
// Flags a packet whose IPv4 source address lies in the class-A network
// FILTER_NET (net 10 by default, as in the prototype), so that the control
// logic drops it. Purely combinational; its result is used in the cycle the
// header is processed. Reading "net 10" as 10.0.0.0/8 is this design's.
module src_filter #(
  parameter logic [7:0] FILTER_NET = 8'd10
) (
  input  logic [31:0] src_i,
  output logic        drop_o
);

  assign drop_o = (src_i[31:24] == FILTER_NET);

endmodule
