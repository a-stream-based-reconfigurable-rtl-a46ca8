// tb_pkt_len: loads total lengths and steps octets out, checking the
// outgoing-octet index and the past-the-end flag against a model.
`include "tb_check.svh"
module tb_pkt_len;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0, step = 0;
  logic [15:0] len_in = 0, idx;
  logic past;
  int m_len, m_idx;
  always #5 clk = ~clk;

  pkt_len u_dut (.clk, .rst_n, .en_i(en), .load_i(load), .len_i(len_in), .step_i(step), .idx_o(idx), .past_end_o(past));

  initial begin repeat (100000) @(posedge clk); failures++; `TB_FINISH end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1; m_len = 0; m_idx = 0;
    @(posedge clk);
    for (int p = 0; p < 60; p++) begin
      automatic int L = $urandom_range(0, 80);
      automatic int n = $urandom_range(1, 100);
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        load   = (k == 0);
        len_in = 16'(L);
        step   = 1'b1;
        en     = $urandom_range(0, 5) != 0;
        #1;
        if (load) begin
          `CHECK(idx == 0, "index 0 in load cycle")
          `CHECK(past == (L == 0), "past_end in load cycle")
        end else begin
          `CHECK(idx == 16'(m_idx), $sformatf("index %0d vs %0d", idx, m_idx))
          `CHECK(past == (m_idx >= m_len), $sformatf("past_end idx %0d len %0d", m_idx, m_len))
        end
        @(posedge clk);
        if (en) begin
          if (load) begin m_len = L; m_idx = 1; end
          else m_idx++;
        end
        if (load && !en) k--;  // repeat the load until it is taken
      end
    end
    `TB_FINISH
  end
endmodule
