// tb_hydra_unit: self-checking test of one Hydra unit (32 lanes, streaming
// buffers of depth 2 so that the controller has to hold fetches back). Through
// its chip-side ports it writes the kernel into WB, the input map into AB (or
// into the DRAM bank model, for the controller to load), the layer registers
// and the bias, starts the layer, polls the status register and reads every OB
// word back. Results are compared with an FX16 (Q8.8) convolution with bias
// and saturation, or with max pooling, computed here.
module tb_hydra_unit;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0;
  logic io_ab_we = 0, io_wb_we = 0, io_reg_we = 0, io_ob_rd = 0;
  logic [8:0] io_ab_addr = '0, io_ob_addr = '0;
  logic [5:0] io_wb_addr = '0;
  logic [REG_AW-1:0] io_reg_idx = '0;
  fx16_t io_wdata = '0, io_reg_rdata, io_ob_rdata, bus_rdata;
  logic bus_req, bus_gnt, bus_rvalid, busy, done;
  logic [BANK_AW-1:0] bus_addr;

  hydra_unit #(.SB_DEPTH(2)) dut (.*);

  assign bus_gnt = bus_req;
  dram_bank_model #(.LATENCY(5)) u_bank (.clk, .req(bus_req && rst_n), .we(1'b0), .addr(bus_addr),
    .wdata('0), .rvalid(bus_rvalid), .rdata(bus_rdata));

  int stalls = 0;
  always_ff @(posedge clk) if (dut.stall) stalls <= stalls + 1;

  fx16_t img [512];
  fx16_t ker [64];

  task automatic wr_reg(input reg_idx_e i, input int v);
    io_reg_we <= 1; io_reg_idx <= i; io_wdata <= fx16_t'(v);
    @(posedge clk);
    io_reg_we <= 0;
  endtask

  function automatic fx16_t sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : fx16_t'(v);
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit pool, input int h, input int w, input int k, input int s,
                     input int bias, input bit fetch, input int range, input int abb = 0, input int wbb = 0);
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    for (int i = 0; i < h * w; i++) begin
      img[i] = fx16_t'($urandom_range(0, 2 * range)) - fx16_t'(range);
      if (fetch) u_bank.mem[200 + i] = img[i];
      else begin
        io_ab_we <= 1; io_ab_addr <= 9'(abb + i); io_wdata <= img[i];
        @(posedge clk);
      end
    end
    io_ab_we <= 0;
    for (int i = 0; i < k * k; i++) begin
      ker[i] = fx16_t'($urandom_range(0, 2 * range)) - fx16_t'(range);
      io_wb_we <= 1; io_wb_addr <= 6'(wbb + i); io_wdata <= ker[i];
      @(posedge clk);
    end
    io_wb_we <= 0;
    wr_reg(REG_MODE, pool); wr_reg(REG_IN_H, h); wr_reg(REG_IN_W, w); wr_reg(REG_K, k);
    wr_reg(REG_STRIDE, s); wr_reg(REG_BIAS, bias); wr_reg(REG_SRC, 200);
    wr_reg(REG_SRC_LEN, fetch ? h * w : 0);
    wr_reg(REG_AB_BASE, abb); wr_reg(REG_WB_BASE, wbb);
    wr_reg(REG_START, 1);
    // poll the status register until done
    io_reg_idx <= REG_STATUS;
    @(posedge clk);
    #1;
    while (io_reg_rdata[1] != 1'b1) @(posedge clk);
    @(posedge clk);
    for (int r = 0; r < oh; r++)
      for (int c = 0; c < ow; c++) begin
        longint e;
        io_ob_rd <= 1; io_ob_addr <= 9'(r * ow + c);
        @(posedge clk);
        io_ob_rd <= 0;
        #1;
        if (pool) begin
          e = -40000;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            if (img[(r * s + i) * w + c * s + j] > e) e = img[(r * s + i) * w + c * s + j];
        end else begin
          e = longint'(fx16_t'(bias)) * 256;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            e += longint'(ker[i * k + j]) * longint'(img[(r * s + i) * w + c * s + j]);
          e = sat(e >>> 8);
        end
        checks++;
        if (io_ob_rdata !== fx16_t'(e)) begin
          failures++;
          $display("FAIL %s h%0d w%0d k%0d s%0d (%0d,%0d): %0d exp %0d", pool ? "pool" : "conv",
                   h, w, k, s, r, c, io_ob_rdata, e);
        end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0, 8, 40, 3, 1, 16'h0180, 0, 600);     // two lane groups per row, bias 1.5
    run(0, 12, 12, 5, 2, -200, 1, 900);        // loaded from the banks by the controller
    run(1, 14, 28, 2, 2, 0, 0, 30000);         // 2x2 max pooling
    run(0, 6, 6, 3, 1, 0, 0, 30000);           // large values: saturation
    run(1, 15, 15, 3, 3, 0, 1, 30000);
    run(0, 10, 10, 3, 2, 16'h0080, 0, 600, 400, 30);   // map at AB 400, kernel at WB 30
    run(0, 9, 9, 4, 1, 0, 1, 700, 256, 48);            // loaded from the banks to AB 256
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
