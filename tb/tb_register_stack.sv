// tb_register_stack: self-checking test of the layer register stack: writes
// every register, reads it back, checks the configuration struct, the status
// word and the one-cycle start pulse.
module tb_register_stack;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, wr_en = 0, busy = 0, done = 0, start;
  logic [REG_AW-1:0] wr_idx = '0, rd_idx = '0;
  fx16_t wr_data = '0, rd_data;
  layer_cfg_t cfg;

  register_stack dut (.*);

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %0h exp %0h", what, got, exp); end
  endtask

  task automatic wr(input int idx, input int val);
    wr_en <= 1; wr_idx <= REG_AW'(idx); wr_data <= fx16_t'(val);
    @(posedge clk);
    wr_en <= 0;
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    chk(cfg, '0, "reset");
    wr(0, 1); wr(1, 14); wr(2, 33); wr(3, 3); wr(4, 2); wr(5, 16'hff80); wr(6, 1234); wr(7, 462); wr(10, 300); wr(11, 40);
    wr(12, 4321); wr(13, 25);
    #1;
    chk(cfg.mode, 1, "mode"); chk(cfg.in_h, 14, "in_h"); chk(cfg.in_w, 33, "in_w");
    chk(cfg.k, 3, "k"); chk(cfg.stride, 2, "stride"); chk($unsigned(cfg.bias), 16'hff80, "bias");
    chk(cfg.src, 1234, "src"); chk(cfg.src_len, 462, "src_len");
    chk(cfg.ab_base, 300, "ab_base"); chk(cfg.wb_base, 40, "wb_base");
    rd_idx = 4'd10; #1 chk(rd_data, 300, "read ab_base");
    rd_idx = 4'd11; #1 chk(rd_data, 40, "read wb_base");
    chk(cfg.wsrc, 4321, "wsrc"); chk(cfg.wsrc_len, 25, "wsrc_len");
    rd_idx = 4'd12; #1 chk(rd_data, 4321, "read wsrc");
    rd_idx = 4'd13; #1 chk(rd_data, 25, "read wsrc_len");
    chk(start, 0, "no start");
    rd_idx = 4'd2; #1 chk(rd_data, 33, "read in_w");
    rd_idx = 4'd5; #1 chk($unsigned(rd_data), 16'hff80, "read bias");
    rd_idx = 4'd7; #1 chk(rd_data, 462, "read src_len");
    busy = 1; done = 0; rd_idx = 4'd9; #1 chk(rd_data, 1, "status busy");
    busy = 0; done = 1; #1 chk(rd_data, 2, "status done");
    @(posedge clk);
    wr_en <= 1; wr_idx <= 4'd8; wr_data <= 16'd1;
    @(posedge clk);
    wr_en <= 0;
    #1 chk(start, 1, "start pulse");
    @(posedge clk);
    #1 chk(start, 0, "start one cycle");
    chk(cfg.in_w, 33, "start not stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
