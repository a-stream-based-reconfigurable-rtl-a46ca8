// cnt16: the router's 16-bit octet counter (CNT16).
//
// Counts the octets of the current packet as they enter the header shift
// register: the octet flagged Pkt_start loads 1, each further packet octet
// adds one, and the count saturates at all ones. The control logic compares
// the count with the header length to know when the header is completely
// loaded. Width and role follow the prototype's router block diagram; the load-with-1 and
// saturation are this design's choices.
// Interface: everything is qualified by en_i (pipeline advance); count_o is
// registered and shows the octets entered so far.
module cnt16 #(
  parameter int WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  input  logic             start_i,  // Pkt_start octet enters
  input  logic             inc_i,    // a packet octet enters
  output logic [WIDTH-1:0] count_o
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      count_o <= '0;
    else if (en_i) begin
      if (start_i)                        count_o <= WIDTH'(1);
      else if (inc_i && count_o != '1)    count_o <= count_o + WIDTH'(1);
    end
  end

endmodule
