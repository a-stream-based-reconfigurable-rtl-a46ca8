// sic: stream interface controller (SIC) of a stream module.
//
// Sits between the module's stream ports and the module's processing logic.
// It tells programming data (Prgm) from packet data (Valid) and either
// programs the module or feeds it data:
//  * A programming run is a sequence of consecutive Prgm words. If its first
//    octet equals MODULE_ID the run is for this module: the first octet and
//    every following one are consumed (they become idle slots in the
//    module's pipeline) and the following octets are written to consecutive
//    configuration addresses from 0. A run for another ID is fed through the
//    module unchanged, so it reaches the module it is meant for. The run ends
//    with the first word that is not Prgm.
//  * Packet words go to the module with their Pkt_start.
//  * Rdy from downstream halts the module (en_o low) and is passed upstream
//    in the same cycle, so the whole chain stops together.
//  * The module's INVALID_PKT line generates the outgoing Valid (and gates
//    Pkt_start), so a rejected packet leaves as idle slots.
// The roles above follow the prototype's description of the SIC; the run
// format with a leading module ID and the pass-through Rdy are this design's.
// Timing: a word is transferred on every clock with Rdy high. The outgoing
// word is combinational from the module's last pipeline stage.
module sic
  import stream_pkg::*;
#(
  parameter logic [7:0] MODULE_ID = 8'h01,
  parameter int         CFG_AW    = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  // upstream side
  input  stream_t           up_i,
  output logic              up_rdy_o,
  // downstream side
  output stream_t           dn_o,
  input  logic              dn_rdy_i,
  // module side
  output logic              en_o,
  output stream_t           mod_in_o,
  output logic              cfg_we_o,
  output logic [CFG_AW-1:0] cfg_addr_o,
  output logic [7:0]        cfg_data_o,
  input  stream_t           mod_out_i,
  input  logic              invalid_pkt_i
);

  typedef enum logic [1:0] {S_DATA, S_CFG, S_PASS} state_e;

  state_e            state;
  logic [CFG_AW-1:0] addr_q;
  logic              consume, valid_out;

  assign en_o     = dn_rdy_i;
  assign up_rdy_o = dn_rdy_i;

  // A Prgm word is consumed when it opens a run for this module or belongs
  // to one.
  assign consume = up_i.prgm &&
                   ((state == S_DATA && up_i.data == MODULE_ID) || state == S_CFG);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_DATA;
      addr_q <= '0;
    end else if (en_o) begin
      if (!up_i.prgm) begin
        state <= S_DATA;
      end else begin
        unique case (state)
          S_DATA: begin
            state  <= (up_i.data == MODULE_ID) ? S_CFG : S_PASS;
            addr_q <= '0;
          end
          S_CFG:  addr_q <= addr_q + 1'b1;
          S_PASS: ;
          default: state <= S_DATA;
        endcase
      end
    end
  end

  assign cfg_we_o   = en_o && up_i.prgm && state == S_CFG;
  assign cfg_addr_o = addr_q;
  assign cfg_data_o = up_i.data;

  always_comb begin
    mod_in_o           = up_i;
    mod_in_o.pkt_start = up_i.pkt_start && up_i.valid;
    if (consume) mod_in_o = '0;
  end

  assign valid_out = mod_out_i.valid && !invalid_pkt_i;
  always_comb begin
    dn_o           = mod_out_i;
    dn_o.valid     = valid_out;
    dn_o.pkt_start = mod_out_i.pkt_start && valid_out;
    if (!valid_out && !mod_out_i.prgm) dn_o.cbus = '0;
  end

  // Handshake rules of the stream bus.
  a_prgm_xor_valid : assert property (@(posedge clk) disable iff (!rst_n)
    !(up_i.prgm && up_i.valid))
    else $error("sic: word marked both Prgm and Valid");
  a_start_is_valid : assert property (@(posedge clk) disable iff (!rst_n)
    up_i.pkt_start |-> up_i.valid)
    else $error("sic: Pkt_start on a word that is not Valid");

endmodule
