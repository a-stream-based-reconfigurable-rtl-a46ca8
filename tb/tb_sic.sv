// tb_sic: checks the stream interface controller: a programming run with
// this module's ID is consumed and written to consecutive configuration
// addresses, a run for another ID is fed through, packet words reach the
// module, Rdy is passed upstream and freezes the run, and INVALID_PKT
// clears the outgoing Valid and Pkt_start.
`include "tb_check.svh"
module tb_sic;
  import stream_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, dn_rdy = 1, up_rdy, en, we, inv = 0;
  logic [5:0] waddr; logic [7:0] wdata;
  stream_t up = '0, dn, min, mout = '0;
  int wr_count = 0;
  always #5 clk = ~clk;

  sic #(.MODULE_ID(8'h01)) u_dut (.clk, .rst_n, .up_i(up), .up_rdy_o(up_rdy), .dn_o(dn), .dn_rdy_i(dn_rdy),
    .en_o(en), .mod_in_o(min), .cfg_we_o(we), .cfg_addr_o(waddr), .cfg_data_o(wdata),
    .mod_out_i(mout), .invalid_pkt_i(inv));

  initial begin repeat (50000) @(posedge clk); failures++; `TB_FINISH end

  task automatic send_run(byte unsigned id, int n, bit stalls);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      up = '0; up.prgm = 1; up.data = (i == 0) ? id : 8'(i * 7 + 3);
      dn_rdy = stalls ? ($urandom_range(0, 2) != 0) : 1'b1;
      #1;
      `CHECK(up_rdy == dn_rdy && en == dn_rdy, "Rdy passed upstream")
      if (id == 8'h01) begin
        `CHECK(min == '0, "own run consumed")
        `CHECK(we == (i > 0 && dn_rdy), "config write strobe")
        if (we) begin
          `CHECK(waddr == 6'(wr_count) && wdata == 8'(i * 7 + 3), $sformatf("config write %0d", i))
          wr_count++;
        end
      end else begin
        `CHECK(min == up && !we, "other run passed on")
      end
      if (!dn_rdy) i--;   // the word is offered again
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n <= 1; @(posedge clk);
    send_run(8'h01, 20, 0);
    @(negedge clk); up = '0; #1;
    `CHECK(!we, "run ends on idle word")
    wr_count = 0;
    send_run(8'h01, 30, 1);
    @(negedge clk); up = '0; dn_rdy = 1;
    send_run(8'h07, 10, 0);
    // packet words go to the module
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      up = '0; up.valid = 1; up.pkt_start = (i % 10 == 0); up.data = 8'(i); up.cbus = 4'($urandom);
      dn_rdy = 1; #1;
      `CHECK(min.valid && min.data == 8'(i) && min.pkt_start == (i % 10 == 0) && !we, "packet word to module")
    end
    // module output gating by INVALID_PKT
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      mout = stream_t'($urandom);
      mout.prgm = mout.prgm && !mout.valid;
      inv = $urandom; #1;
      `CHECK(dn.valid == (mout.valid && !inv), "Valid from INVALID_PKT")
      `CHECK(dn.pkt_start == (mout.pkt_start && mout.valid && !inv), "Pkt_start gated")
      `CHECK(dn.data == mout.data && dn.prgm == mout.prgm, "data passed")
    end
    `TB_FINISH
  end
endmodule
