// tb_pool_unit: self-checking test of the pool unit with 4 lanes. Each lane
// gets its own random windows of random length at random times; the window
// maximum and the done pulse one cycle after the last element are checked.
module tb_pool_unit;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int L = 4;

  logic rst_n = 0;
  logic     [L-1:0] in_valid = '0, done;
  wa_pair_t [L-1:0] in_pair = '0;
  fx16_t    [L-1:0] result;

  pool_unit #(.N_LANES(L)) dut (.*);

  int    pos  [L];
  int    len  [L];
  fx16_t mx   [L];
  bit    expect_done [L];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < L; i++) begin pos[i] = 0; len[i] = $urandom_range(1, 9); expect_done[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < L; i++) begin
        if ($urandom_range(2) != 0) begin
          automatic fx16_t a = fx16_t'($urandom);
          if (pos[i] == 0 || a > mx[i]) mx[i] = a;
          in_valid[i] <= 1;
          in_pair[i]  <= '{first: (pos[i] == 0), last: (pos[i] == len[i]-1), w: '0, a: a};
          expect_done[i] = (pos[i] == len[i]-1);
          pos[i]++;
        end else begin
          in_valid[i] <= 0;
          expect_done[i] = 0;
        end
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < L; i++) begin
        checks++;
        if (done[i] != expect_done[i]) begin failures++; $display("FAIL done lane %0d", i); end
        if (expect_done[i]) begin
          checks++;
          if (result[i] !== mx[i]) begin failures++; $display("FAIL lane %0d max %0d exp %0d", i, result[i], mx[i]); end
          pos[i] = 0; len[i] = $urandom_range(1, 9);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
