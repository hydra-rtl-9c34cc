// tb_stream_buffer: self-checking test of the <W,A> streaming buffer against a
// queue model, with random pushes and pops that never overflow or underflow,
// including simultaneous push and pop when full.
module tb_stream_buffer;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, push = 0, pop = 0, valid;
  wa_pair_t wr_data = '0, rd_data;
  logic [2:0] count;
  wa_pair_t q [$];
  int full_seen = 0;

  stream_buffer #(.DEPTH(4)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic do_push, do_pop;
      #1;
      checks++;
      if (count != 3'(q.size()) || valid != (q.size() != 0)) begin
        failures++; $display("FAIL count %0d exp %0d", count, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (rd_data != q[0]) begin failures++; $display("FAIL head %h exp %h", rd_data, q[0]); end
      end
      if (q.size() == 4) full_seen++;
      do_pop  = (q.size() != 0) && ($urandom_range(2) == 0);
      do_push = (q.size() < 4 || do_pop) && ($urandom_range(1) == 0);
      push <= do_push; pop <= do_pop;
      wr_data <= wa_pair_t'($urandom);
      @(posedge clk);
      if (do_pop) void'(q.pop_front());
      if (do_push) q.push_back(wr_data);
      push <= 0; pop <= 0;
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
