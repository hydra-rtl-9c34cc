// tb_buffer_ram: self-checking test of the on-chip buffer (AB/WB/OB memory).
// Fills a 64-word buffer with random words, reads all back in random order and
// checks the one-cycle read latency and read-before-write on a collision.
module tb_buffer_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 64;
  logic       wr_en = 0, rd_en = 0;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  logic [15:0] wr_data = 0, rd_data;
  logic [15:0] ref_mem [D];

  buffer_ram #(.DEPTH(D), .WIDTH(16)) dut (.*);

  task automatic check(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = 16'($urandom);
      wr_en <= 1; wr_addr <= 6'(i); wr_data <= ref_mem[i];
      @(posedge clk);
    end
    wr_en <= 0;
    for (int n = 0; n < 200; n++) begin
      automatic int a = $urandom_range(D-1);
      rd_en <= 1; rd_addr <= 6'(a);
      @(posedge clk);
      rd_en <= 0;
      #1 check(rd_data, ref_mem[a], "read");
    end
    // read and write of the same address in one cycle returns the old word
    rd_en <= 1; rd_addr <= 6'd7; wr_en <= 1; wr_addr <= 6'd7; wr_data <= ~ref_mem[7];
    @(posedge clk);
    rd_en <= 0; wr_en <= 0;
    #1 check(rd_data, ref_mem[7], "read-before-write");
    rd_en <= 1; rd_addr <= 6'd7;
    @(posedge clk);
    rd_en <= 0;
    #1 check(rd_data, ~ref_mem[7], "new word");
    // rd_en low keeps the output
    rd_addr <= 6'd3;
    @(posedge clk);
    #1 check(rd_data, ~ref_mem[7], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
