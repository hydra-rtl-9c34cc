// tb_result_accumulation_unit: self-checking test of the result accumulation
// unit. For random neuron addresses it sends one to three passes of eight
// lanes with random lane masks, and checks the final value (sum of all masked
// lanes of all passes, saturated to FX16, with and without ReLU) one cycle
// after the last pass.
module tb_result_accumulation_unit;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, acc_first = 0, acc_last = 0, relu_en = 0, out_valid;
  logic [8:0] in_addr = '0, out_addr;
  fx16_t [7:0] in_data = '0;
  logic  [7:0] in_mask = '0;
  fx16_t out_data;

  result_accumulation_unit #(.N_LANES(8), .DEPTH(512)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int relu_hits = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      automatic int passes = $urandom_range(1, 3);
      automatic longint sum = 0;
      fx16_t e;
      automatic bit relu = $urandom_range(1);
      automatic logic [8:0] a = 9'($urandom);
      for (int p = 0; p < passes; p++) begin
        for (int i = 0; i < 8; i++) begin
          in_data[i] = (n % 7 == 0) ? fx16_t'($urandom) : fx16_t'($urandom_range(0, 4000)) - 16'sd2000;
          in_mask[i] = ($urandom_range(3) != 0);
          if (in_mask[i]) sum += longint'(in_data[i]);
        end
        in_valid <= 1; in_addr <= a; acc_first <= (p == 0); acc_last <= (p == passes-1);
        relu_en <= relu;
        @(posedge clk);
        in_valid <= 0;
        #1;
        checks++;
        if (out_valid != (p == passes-1)) begin failures++; $display("FAIL out_valid"); end
        // an unrelated address in between must not disturb the partial sum
        if (p != passes-1 && $urandom_range(1)) begin
          in_valid <= 1; in_addr <= a + 9'd1; acc_first <= 1; acc_last <= 0;
          @(posedge clk);
          in_valid <= 0;
          #1;
        end
      end
      e = (sum > 32767) ? 16'sh7fff : (sum < -32768) ? 16'sh8000 : fx16_t'(sum);
      if (relu && e < 0) begin e = 0; relu_hits++; end
      checks++;
      if (out_data !== e || out_addr !== a) begin
        failures++; $display("FAIL addr %0d data %0d exp %0d", out_addr, out_data, e);
      end
    end
    checks++;
    if (relu_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
