// ver_ihl: the VER and IHL registers of the router.
//
// When the first octet of a packet (Pkt_start) enters the router, its upper
// nibble (IP version) is checked against 4 and its lower nibble (IP header
// length in 32-bit words) is stored for later use; it is given in octets
// (IHL*4) on a 16-bit path to the control logic. That
// the check happens at Pkt_start and the length is stored follows the
// prototype; the flag and output encoding are this design's.
// Interface: captured on en_i && start_i; outputs are registered and hold
// until the next packet starts.
module ver_ihl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  logic        start_i,
  input  logic [7:0]  octet_i,
  output logic        ver_ok_o,
  output logic [15:0] hdr_bytes_o
);

  localparam logic [3:0] IP_VERSION = 4'd4;

  logic [3:0] ihl;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ver_ok_o <= 1'b0;
      ihl      <= '0;
    end else if (en_i && start_i) begin
      ver_ok_o <= (octet_i[7:4] == IP_VERSION);
      ihl      <= octet_i[3:0];
    end
  end

  assign hdr_bytes_o = {10'd0, ihl, 2'b00};

endmodule
