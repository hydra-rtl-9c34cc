// tb_shared_bus_arbiter: self-checking test of the internal shared bus. Two
// masters issue random reads and writes to a behavioural bank model; each
// master checks that its reads return the words it expects (from a model of
// the bank contents), in order, and that when both request in the same cycle
// the grant alternates.
module tb_shared_bus_arbiter;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic [1:0] m_req = '0, m_we = '0, m_gnt, m_rvalid;
  logic [BANK_AW-1:0] m_addr [2];
  fx16_t m_wdata [2];
  fx16_t m_rdata;
  logic b_req, b_we, b_rvalid;
  logic [BANK_AW-1:0] b_addr;
  fx16_t b_wdata, b_rdata;

  shared_bus_arbiter #(.N_MASTERS(2)) dut (.*);
  dram_bank_model #(.LATENCY(5)) u_bank (.clk, .req(b_req), .we(b_we), .addr(b_addr),
    .wdata(b_wdata), .rvalid(b_rvalid), .rdata(b_rdata));

  fx16_t model [1 << BANK_AW];
  fx16_t expq [2][$];
  logic [1:0] m_gnt_q;
  int both = 0, alternations = 0, last_winner = -1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << BANK_AW); i++) model[i] = '0;
    m_addr[0] = '0; m_addr[1] = '0; m_wdata[0] = '0; m_wdata[1] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      // new requests for masters that are idle or were just granted
      for (int m = 0; m < 2; m++) begin
        if (!m_req[m] && $urandom_range(1)) begin
          m_req[m]   = 1'b1;
          m_we[m]    = $urandom_range(1);
          m_addr[m]  = BANK_AW'($urandom_range(31));
          m_wdata[m] = fx16_t'($urandom);
        end
      end
      #1;
      if (m_req == 2'b11) begin
        both++;
        checks++;
        if (m_gnt != 2'b01 && m_gnt != 2'b10) begin failures++; $display("FAIL grant %b", m_gnt); end
        if (last_winner >= 0 && m_gnt[1-last_winner]) alternations++;
      end
      if (m_req != 0) begin
        checks++;
        if (m_gnt == 0 || (m_gnt & ~m_req) != 0) begin failures++; $display("FAIL no grant"); end
      end
      m_gnt_q = m_gnt;
      for (int m = 0; m < 2; m++) if (m_gnt[m]) begin
        last_winner = m;
        if (m_we[m]) model[m_addr[m]] = m_wdata[m];
        else expq[m].push_back(model[m_addr[m]]);
      end
      @(posedge clk);
      #1;
      for (int m = 0; m < 2; m++) if (m_gnt_q[m]) m_req[m] = 1'b0;
      for (int m = 0; m < 2; m++) if (m_rvalid[m]) begin
        checks++;
        if (expq[m].size() == 0) begin failures++; $display("FAIL spurious rvalid %0d", m); end
        else begin
          automatic fx16_t e = expq[m].pop_front();
          if (m_rdata !== e) begin failures++; $display("FAIL m%0d rdata %h exp %h", m, m_rdata, e); end
        end
      end
    end
    m_req = '0;
    repeat (10) @(posedge clk) begin
      for (int m = 0; m < 2; m++) if (m_rvalid[m]) begin
        checks++;
        if (m_rdata !== expq[m].pop_front()) failures++;
      end
    end
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin failures++; $display("FAIL reads lost"); end
    checks++;
    if (both == 0 || alternations * 10 < both * 9) begin
      failures++; $display("FAIL round robin: both=%0d alternations=%0d", both, alternations);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
