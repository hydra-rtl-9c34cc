// tb_workload_layers: layer shapes of VGG-16 and ResNet-34 (224 x 224 ImageNet
// inference) that fit the 512-word activation buffer whole, run on the full
// hydra_top at its default parameters (2 ranks x 8 chips, 32 lanes each).
//
// Each layer takes 16 input channels, one per Hydra, with random FX16 maps and
// kernels written by WRITE commands:
//   VGG-16 conv5_x   14 x 14 map, zero-padded to 16 x 16 by the host, 3x3,
//                    stride 1 -> 14 x 14 (one lane group per output row)
//   VGG-16 pool5     14 x 14 map, 2x2 max pooling, stride 2 -> 7 x 7
//   ResNet-34 conv5_1 14 x 14 map padded to 16 x 16, 3x3, stride 2 -> 7 x 7
//   VGG-16 fc6 slice 7 x 7 map convolved with a 7 x 7 kernel -> 1 output
//                    (49 weights of the 64-word weight buffer)
// Convolution results are read back rank by rank with the accumulation flags,
// summed over the 16 channels by the result accumulation unit with ReLU, and
// compared with a model here; pooling results are read per chip and compared
// lane by lane. The cycles from start to done of each layer are printed.
module tb_workload_layers;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int R = 2, C = 8, NH = 16;

  logic rst_n = 0;
  rank_cmd_t cmd [R];
  fx16_t wdata [R][C];
  logic [C-1:0] acc_mask [R];
  fx16_t rdata [R][C];
  logic [C-1:0] rvalid [R], bank_busy [R];
  logic bank_req [NH], bank_we [NH], bank_rvalid [NH];
  logic [BANK_AW-1:0] bank_addr [NH];
  fx16_t bank_wdata [NH], bank_rdata [NH];
  logic [NH-1:0] hydra_busy, hydra_done;
  logic res_valid;
  logic [8:0] res_addr;
  fx16_t res_data;

  hydra_top dut (.*);

  for (genvar h = 0; h < NH; h++) begin : g_bank
    dram_bank_model #(.LATENCY(5)) u_bank (.clk, .req(bank_req[h] && rst_n), .we(bank_we[h]),
      .addr(bank_addr[h]), .wdata(bank_wdata[h]), .rvalid(bank_rvalid[h]), .rdata(bank_rdata[h]));
  end

  fx16_t  img [NH][512];
  fx16_t  ker [NH][64];
  longint exp_res [512];

  function automatic fx16_t sat(input longint v);
    return (v > 32767) ? 16'sh7fff : (v < -32768) ? 16'sh8000 : fx16_t'(v);
  endfunction

  task automatic idle();
    for (int r = 0; r < R; r++) begin
      cmd[r] <= '0;
      acc_mask[r] <= '0;
      for (int c = 0; c < C; c++) wdata[r][c] <= '0;
    end
  endtask

  task automatic issue(input int r, input mem_cmd_e op, input region_e rg, input int a,
                       input fx16_t d [C], input bit first = 0, input bit last = 0);
    cmd[r] <= '{op: op, addr: {rg, 13'(a)}, acc_first: first, acc_last: last, relu_en: 1'b1};
    acc_mask[r] <= '1;
    for (int c = 0; c < C; c++) wdata[r][c] <= d[c];
    @(posedge clk);
    idle();
  endtask

  task automatic wr_reg_all(input reg_idx_e i, input int v);
    fx16_t d [C];
    for (int c = 0; c < C; c++) d[c] = fx16_t'(v);
    for (int r = 0; r < R; r++) issue(r, CMD_WRITE, RGN_REG, int'(i), d);
  endtask

  // random maps of h x w with a zero border of pad, and random k x k kernels
  task automatic make_data(input int h, input int w, input int pad, input int k);
    for (int ch = 0; ch < NH; ch++) begin
      for (int r = 0; r < h; r++)
        for (int c = 0; c < w; c++)
          img[ch][r * w + c] = (r < pad || r >= h - pad || c < pad || c >= w - pad)
                               ? '0 : fx16_t'($urandom_range(0, 1024)) - 16'sd512;
      for (int i = 0; i < k * k; i++) ker[ch][i] = fx16_t'($urandom_range(0, 128)) - 16'sd64;
    end
  endtask

  // load maps (and kernels for a convolution) into both ranks, set up and run
  task automatic run_layer(input string name, input bit pool, input int h, input int w,
                           input int k, input int s, input fx16_t bias);
    fx16_t d [C];
    time t0;
    for (int r = 0; r < R; r++) begin
      for (int i = 0; i < h * w; i++) begin
        for (int c = 0; c < C; c++) d[c] = img[r * C + c][i];
        issue(r, CMD_WRITE, RGN_AB, i, d);
      end
      if (!pool)
        for (int i = 0; i < k * k; i++) begin
          for (int c = 0; c < C; c++) d[c] = ker[r * C + c][i];
          issue(r, CMD_WRITE, RGN_WB, i, d);
        end
      for (int c = 0; c < C; c++) d[c] = (r == 0 && c == 0) ? bias : '0;
      issue(r, CMD_WRITE, RGN_REG, REG_BIAS, d);
    end
    wr_reg_all(REG_MODE, pool ? 1 : 0); wr_reg_all(REG_IN_H, h); wr_reg_all(REG_IN_W, w);
    wr_reg_all(REG_K, k); wr_reg_all(REG_STRIDE, s);
    wr_reg_all(REG_SRC_LEN, 0); wr_reg_all(REG_WSRC_LEN, 0);
    wr_reg_all(REG_AB_BASE, 0); wr_reg_all(REG_WB_BASE, 0);
    t0 = $time;
    wr_reg_all(REG_START, 1);
    repeat (2) @(posedge clk);
    while (hydra_done != '1) @(posedge clk);
    $display("%s: %0d x %0d, K=%0d, S=%0d done %0d cycles after start", name, h, w, k, s,
             ($time - t0) / 10);
  endtask

  task automatic check_conv(input string name, input int h, input int w, input int k,
                            input int s, input fx16_t bias);
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    int n_res = 0;
    fx16_t d [C];
    for (int r = 0; r < oh; r++)
      for (int c = 0; c < ow; c++) begin
        automatic longint tot = 0;
        for (int ch = 0; ch < NH; ch++) begin
          automatic longint a = (ch == 0) ? longint'(bias) * 256 : 0;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            a += longint'(ker[ch][i * k + j]) * longint'(img[ch][(r * s + i) * w + c * s + j]);
          tot += longint'(sat(a >>> 8));
        end
        tot = sat(tot);
        exp_res[r * ow + c] = (tot < 0) ? 0 : tot;
      end
    for (int c = 0; c < C; c++) d[c] = '0;
    fork
      begin
        for (int p = 0; p < oh * ow; p++) begin
          issue(0, CMD_READ, RGN_OB, p, d, 1, 0);
          issue(1, CMD_READ, RGN_OB, p, d, 0, 1);
        end
        repeat (4) @(posedge clk);
      end
      begin
        while (n_res < oh * ow) begin
          @(posedge clk);
          #1;
          if (res_valid) begin
            checks++;
            if (res_data !== fx16_t'(exp_res[res_addr])) begin
              failures++;
              $display("FAIL %s neuron %0d: %0d exp %0d", name, res_addr, res_data, exp_res[res_addr]);
            end
            n_res++;
          end
        end
      end
    join
  endtask

  task automatic check_pool(input string name, input int h, input int w, input int k, input int s);
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    for (int r = 0; r < R; r++)
      for (int p = 0; p < oh * ow; p++) begin
        cmd[r] <= '{op: CMD_READ, addr: {RGN_OB, 13'(p)}, acc_first: 1'b0, acc_last: 1'b0, relu_en: 1'b0};
        @(posedge clk);
        idle();
        #1;
        for (int c = 0; c < C; c++) begin
          automatic fx16_t e = 16'sh8000;
          automatic int ch = r * C + c, orow = p / ow, ocol = p % ow;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            if (img[ch][(orow * s + i) * w + ocol * s + j] > e) e = img[ch][(orow * s + i) * w + ocol * s + j];
          checks++;
          if (!rvalid[r][c] || rdata[r][c] !== e) begin
            failures++;
            $display("FAIL %s chip %0d pos %0d: %0d exp %0d", name, ch, p, rdata[r][c], e);
          end
        end
        @(posedge clk);
      end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idle();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    make_data(16, 16, 1, 3);
    run_layer("VGG-16 conv5_x", 0, 16, 16, 3, 1, 16'sh0100);
    check_conv("VGG-16 conv5_x", 16, 16, 3, 1, 16'sh0100);

    make_data(14, 14, 0, 2);
    run_layer("VGG-16 pool5", 1, 14, 14, 2, 2, '0);
    check_pool("VGG-16 pool5", 14, 14, 2, 2);

    make_data(16, 16, 1, 3);
    run_layer("ResNet-34 conv5_1", 0, 16, 16, 3, 2, -16'sh0080);
    check_conv("ResNet-34 conv5_1", 16, 16, 3, 2, -16'sh0080);

    make_data(7, 7, 0, 7);
    run_layer("VGG-16 fc6 slice", 0, 7, 7, 7, 1, 16'sh0040);
    check_conv("VGG-16 fc6 slice", 7, 7, 7, 1, 16'sh0040);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
