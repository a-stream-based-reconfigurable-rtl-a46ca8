// pkt_len: the router's PKT_LEN register and outgoing-octet index.
//
// When the control logic processes a header (PROC_PKT, which happens while
// octet 0 of the packet is leaving the shift register) the IP total-length
// field is loaded. From then on the index of each leaving octet is counted,
// and past_end_o tells when octets beyond the declared length leave, so the
// control logic can invalidate them. The index also selects what the route
// lookup puts on CBUS. The register and its loading under PROC_PKT follow
// the prototype's router block diagram; the index and end check are this design's.
// Interface: idx_o and past_end_o are combinational and describe the
// octet at the shift-register output in this cycle; in the load cycle they
// already show octet 0 of the new packet.
module pkt_len (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en_i,
  input  logic        load_i,    // PROC_PKT: octet 0 leaves now
  input  logic [15:0] len_i,     // total length field
  input  logic        step_i,    // an octet of the current packet leaves now
  output logic [15:0] idx_o,
  output logic        past_end_o
);

  logic [15:0] len_q, idx_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      len_q <= '0;
      idx_q <= '0;
    end else if (en_i) begin
      if (load_i) begin
        len_q <= len_i;
        idx_q <= 16'd1;
      end else if (step_i && idx_q != '1) begin
        idx_q <= idx_q + 16'd1;
      end
    end
  end

  assign idx_o      = load_i ? 16'd0 : idx_q;
  assign past_end_o = load_i ? (len_i == 16'd0) : (idx_q >= len_q);

endmodule
