// tb_mac_unit: self-checking test of one MAC lane. Feeds random windows of
// random length (one pair per cycle, sometimes with idle cycles) and compares
// the FX16 result with bias + sum of products computed here, rounded by an
// arithmetic shift of 8 and saturated. Checks that done pulses exactly one
// cycle after the last pair.
module tb_mac_unit;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, in_valid = 0, done;
  wa_pair_t in_pair = '0;
  fx16_t bias = '0, result;

  mac_unit dut (.*);

  function automatic fx16_t ref_sat(input longint v);
    if (v > 32767) return 16'sh7fff;
    if (v < -32768) return 16'sh8000;
    return fx16_t'(v);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      automatic int len = $urandom_range(1, 25);
      longint acc;
      automatic bit big = (n % 5 == 0);
      bias <= fx16_t'($urandom_range(0, 2047)) - 16'sd1024;
      @(posedge clk);
      acc = longint'(bias) * 256;
      for (int i = 0; i < len; i++) begin
        fx16_t w, a;
        w = big ? fx16_t'($urandom) : fx16_t'($urandom_range(0, 1023)) - 16'sd512;
        a = big ? fx16_t'($urandom) : fx16_t'($urandom_range(0, 1023)) - 16'sd512;
        acc += longint'(w) * longint'(a);
        in_valid <= 1;
        in_pair  <= '{first: (i == 0), last: (i == len-1), w: w, a: a};
        @(posedge clk);
        in_valid <= 0;
        #1;
        checks++;
        if (done != (i == len-1)) begin failures++; $display("FAIL done timing"); end
        if ($urandom_range(3) == 0) @(posedge clk);
      end
      checks++;
      if (result !== ref_sat(acc >>> 8)) begin
        failures++; $display("FAIL result %0d exp %0d", result, ref_sat(acc >>> 8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
