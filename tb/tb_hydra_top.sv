// tb_hydra_top: end-to-end test of the whole module at its default size:
// 2 ranks x 8 chips = 16 Hydra units of 32 lanes each, with a behavioural DRAM
// bank model per chip. The testbench plays the memory controller.
//
// Layer 1, a 3x3 convolution of 16 input channels of 8 x 36 into one output
// channel of 6 x 34 (two lane groups per output row): each chip convolves one
// channel. Rank 0 gets its input maps and kernels by WRITE commands into AB
// and WB; rank 1's Hydras load both from their DRAM banks while the controller also writes
// other bank words through chip I/O (bus arbitration). The bias is written
// only to the first chip so that it is added once. The OB words are read back
// rank by rank with accumulation flags; the result accumulation unit sums the
// 16 partial results per neuron and applies ReLU. Every result is compared with
// a model computed here (per chip: Q8.8 products + bias, shifted and saturated
// to FX16; then the sum over chips, saturated, ReLU).
//
// Layer 2, 2x2 max pooling with stride 2 of 16 other 14 x 16 maps placed at AB
// word 288. Rank 0's maps are written into AB while layer 1 is still running
// (prefetch overlapped with execution); rank 1's are loaded from the banks
// when layer 2 starts. Each chip's OB words are read and compared lane by lane.
//
// Each mechanism (broadcast of one fetch to several lanes, several lane groups
// per row, loading maps and kernels from the banks, bus contention, buffer writes overlapped
// with a running layer, accumulation across ranks, ReLU clamping, bias,
// pooling) is counted, and one that never happens fails.
module tb_hydra_top;
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

  // mechanism counters, from the design's internal strobes
  int n_bcast = 0, n_multigroup = 0, n_fetch = 0, n_wfetch = 0, n_contend = 0, n_stall = 0;
  always_ff @(posedge clk) begin
    if ($countones(dut.g_rank[0].g_chip[0].u_hydra.sb_push) > 1) n_bcast <= n_bcast + 1;
    if (dut.g_rank[0].g_chip[0].u_hydra.u_ctrl.state == 3'd2 &&
        dut.g_rank[0].g_chip[0].u_hydra.u_ctrl.ocol0 != 0) n_multigroup <= n_multigroup + 1;
    if (dut.g_rank[1].g_chip[3].m_req[1] && dut.g_rank[1].g_chip[3].m_gnt[1]) n_fetch <= n_fetch + 1;
    if (dut.g_rank[1].g_chip[3].u_hydra.c_wb_we) n_wfetch <= n_wfetch + 1;
    if (dut.g_rank[1].g_chip[3].m_req == 2'b11) n_contend <= n_contend + 1;
  end

  fx16_t img [NH][512];
  fx16_t ker [NH][9];
  time   t0;

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

  // one command to a rank, with a data lane per chip
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

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fx16_t d [C];
    longint exp_res [512];
    automatic int n_res = 0, n_relu = 0, n_acc = 0, n_bias = 0, n_pool = 0, n_overlap = 0;
    automatic int h = 8, w = 36, k = 3, oh = 6, ow = 34;
    fx16_t img2 [NH][224];
    idle();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // ---------------- layer 1: convolution ----------------
    for (int ch = 0; ch < NH; ch++) begin
      for (int i = 0; i < h * w; i++) img[ch][i] = fx16_t'($urandom_range(0, 1024)) - 16'sd512;
      for (int i = 0; i < k * k; i++) ker[ch][i] = fx16_t'($urandom_range(0, 256)) - 16'sd128;
    end
    // rank 1's maps are already in its DRAM banks at word 1000
    for (int c = 0; c < C; c++)
      for (int i = 0; i < h * w; i++) begin
        case (c)
          0: g_bank[8].u_bank.mem[1000 + i] = img[8][i];
          1: g_bank[9].u_bank.mem[1000 + i] = img[9][i];
          2: g_bank[10].u_bank.mem[1000 + i] = img[10][i];
          3: g_bank[11].u_bank.mem[1000 + i] = img[11][i];
          4: g_bank[12].u_bank.mem[1000 + i] = img[12][i];
          5: g_bank[13].u_bank.mem[1000 + i] = img[13][i];
          6: g_bank[14].u_bank.mem[1000 + i] = img[14][i];
          default: g_bank[15].u_bank.mem[1000 + i] = img[15][i];
        endcase
      end
    // rank 1's kernels are in its banks at word 1500
    for (int i = 0; i < k * k; i++) begin
      g_bank[8].u_bank.mem[1500 + i] = ker[8][i];   g_bank[9].u_bank.mem[1500 + i] = ker[9][i];
      g_bank[10].u_bank.mem[1500 + i] = ker[10][i]; g_bank[11].u_bank.mem[1500 + i] = ker[11][i];
      g_bank[12].u_bank.mem[1500 + i] = ker[12][i]; g_bank[13].u_bank.mem[1500 + i] = ker[13][i];
      g_bank[14].u_bank.mem[1500 + i] = ker[14][i]; g_bank[15].u_bank.mem[1500 + i] = ker[15][i];
    end
    // rank 0's kernels by WRITE commands into WB (one WRITE fills 8 chips)
    for (int i = 0; i < k * k; i++) begin
      for (int c = 0; c < C; c++) d[c] = ker[c][i];
      issue(0, CMD_WRITE, RGN_WB, i, d);
    end
    // rank 0 input maps by WRITE commands into AB
    for (int i = 0; i < h * w; i++) begin
      for (int c = 0; c < C; c++) d[c] = img[c][i];
      issue(0, CMD_WRITE, RGN_AB, i, d);
    end
    wr_reg_all(REG_MODE, 0); wr_reg_all(REG_IN_H, h); wr_reg_all(REG_IN_W, w);
    wr_reg_all(REG_K, k); wr_reg_all(REG_STRIDE, 1); wr_reg_all(REG_SRC, 1000);
    wr_reg_all(REG_AB_BASE, 0); wr_reg_all(REG_WB_BASE, 0); wr_reg_all(REG_WSRC, 1500);
    for (int c = 0; c < C; c++) d[c] = '0;
    issue(0, CMD_WRITE, RGN_REG, REG_SRC_LEN, d);
    issue(0, CMD_WRITE, RGN_REG, REG_WSRC_LEN, d);
    for (int c = 0; c < C; c++) d[c] = fx16_t'(h * w);
    issue(1, CMD_WRITE, RGN_REG, REG_SRC_LEN, d);
    for (int c = 0; c < C; c++) d[c] = fx16_t'(k * k);
    issue(1, CMD_WRITE, RGN_REG, REG_WSRC_LEN, d);
    // bias once: only chip 0 of rank 0 gets it
    for (int c = 0; c < C; c++) d[c] = (c == 0) ? 16'sh0300 : '0;
    issue(0, CMD_WRITE, RGN_REG, REG_BIAS, d);
    for (int c = 0; c < C; c++) d[c] = '0;
    issue(1, CMD_WRITE, RGN_REG, REG_BIAS, d);
    t0 = $time;
    wr_reg_all(REG_START, 1);
    // while rank 1 loads from its banks, write other bank words through chip I/O
    for (int n = 0; n < 40; n++) begin
      for (int c = 0; c < C; c++) d[c] = fx16_t'(n);
      #1;
      while (bank_busy[1] != '0) begin @(posedge clk); #1; end
      issue(1, CMD_WRITE, RGN_BANK, 4000 + n, d);
    end
    // prefetch: rank 0's layer-2 maps go into the free part of AB during layer 1
    for (int ch = 0; ch < NH; ch++)
      for (int i = 0; i < 224; i++) img2[ch][i] = fx16_t'($urandom);
    for (int i = 0; i < 224; i++) begin
      for (int c = 0; c < C; c++) d[c] = img2[c][i];
      if (hydra_busy[C-1:0] == '1) n_overlap++;
      issue(0, CMD_WRITE, RGN_AB, 288 + i, d);
    end
    while (hydra_done != '1) @(posedge clk);
    $display("layer 1 finished %0d cycles after its start command", ($time - t0) / 10);

    // model of the accumulated result
    for (int r = 0; r < oh; r++)
      for (int c = 0; c < ow; c++) begin
        automatic longint tot = 0;
        for (int ch = 0; ch < NH; ch++) begin
          automatic longint a = (ch == 0) ? longint'(16'sh0300) * 256 : 0;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            a += longint'(ker[ch][i * k + j]) * longint'(img[ch][(r + i) * w + c + j]);
          tot += longint'(sat(a >>> 8));
        end
        tot = sat(tot);
        if (tot < 0) begin tot = 0; n_relu++; end
        exp_res[r * ow + c] = tot;
      end
    // read back: rank 0 starts the partial sum, rank 1 finishes it
    fork
      begin
        for (int p = 0; p < oh * ow; p++) begin
          for (int c = 0; c < C; c++) d[c] = '0;
          issue(0, CMD_READ, RGN_OB, p, d, 1, 0);
          issue(1, CMD_READ, RGN_OB, p, d, 0, 1);
          n_acc++;
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
              $display("FAIL layer 1 neuron %0d: %0d exp %0d", res_addr, res_data, exp_res[res_addr]);
            end
            n_res++;
          end
        end
      end
    join
    n_bias = (dut.g_rank[0].g_chip[0].u_hydra.cfg.bias != 0 && dut.g_rank[0].g_chip[1].u_hydra.cfg.bias == 0) ? 1 : 0;

    // ---------------- layer 2: 2x2 max pooling, stride 2, from the banks ----------------
    h = 14; w = 16; k = 2; oh = 7; ow = 8;
    for (int ch = 0; ch < NH; ch++)
      for (int i = 0; i < h * w; i++) img[ch][i] = img2[ch][i];
    for (int i = 0; i < h * w; i++) begin
      g_bank[0].u_bank.mem[2000 + i] = img[0][i];   g_bank[1].u_bank.mem[2000 + i] = img[1][i];
      g_bank[2].u_bank.mem[2000 + i] = img[2][i];   g_bank[3].u_bank.mem[2000 + i] = img[3][i];
      g_bank[4].u_bank.mem[2000 + i] = img[4][i];   g_bank[5].u_bank.mem[2000 + i] = img[5][i];
      g_bank[6].u_bank.mem[2000 + i] = img[6][i];   g_bank[7].u_bank.mem[2000 + i] = img[7][i];
      g_bank[8].u_bank.mem[2000 + i] = img[8][i];   g_bank[9].u_bank.mem[2000 + i] = img[9][i];
      g_bank[10].u_bank.mem[2000 + i] = img[10][i]; g_bank[11].u_bank.mem[2000 + i] = img[11][i];
      g_bank[12].u_bank.mem[2000 + i] = img[12][i]; g_bank[13].u_bank.mem[2000 + i] = img[13][i];
      g_bank[14].u_bank.mem[2000 + i] = img[14][i]; g_bank[15].u_bank.mem[2000 + i] = img[15][i];
    end
    wr_reg_all(REG_MODE, 1); wr_reg_all(REG_IN_H, h); wr_reg_all(REG_IN_W, w);
    wr_reg_all(REG_K, k); wr_reg_all(REG_STRIDE, 2); wr_reg_all(REG_SRC, 2000);
    wr_reg_all(REG_AB_BASE, 288); wr_reg_all(REG_WSRC_LEN, 0);
    for (int c = 0; c < C; c++) d[c] = '0;
    issue(0, CMD_WRITE, RGN_REG, REG_SRC_LEN, d);
    for (int c = 0; c < C; c++) d[c] = fx16_t'(h * w);
    issue(1, CMD_WRITE, RGN_REG, REG_SRC_LEN, d);
    wr_reg_all(REG_START, 1);
    repeat (2) @(posedge clk);
    while (hydra_done != '1) @(posedge clk);
    for (int r = 0; r < R; r++)
      for (int p = 0; p < oh * ow; p++) begin
        for (int c = 0; c < C; c++) d[c] = '0;
        cmd[r] <= '{op: CMD_READ, addr: {RGN_OB, 13'(p)}, acc_first: 1'b0, acc_last: 1'b0, relu_en: 1'b0};
        @(posedge clk);
        idle();
        #1;
        for (int c = 0; c < C; c++) begin
          automatic fx16_t e = 16'sh8000;
          automatic int ch = r * C + c, orow = p / ow, ocol = p % ow;
          for (int i = 0; i < k; i++) for (int j = 0; j < k; j++)
            if (img[ch][(orow * 2 + i) * w + ocol * 2 + j] > e) e = img[ch][(orow * 2 + i) * w + ocol * 2 + j];
          checks++;
          if (!rvalid[r][c] || rdata[r][c] !== e) begin
            failures++;
            $display("FAIL pool chip %0d pos %0d: %0d exp %0d", ch, p, rdata[r][c], e);
          end else n_pool++;
        end
      end

    $display("mechanisms: broadcast=%0d multigroup=%0d bank_fetch=%0d kernel_fetch=%0d bus_contention=%0d overlap=%0d accumulate=%0d relu=%0d bias=%0d pool=%0d",
             n_bcast, n_multigroup, n_fetch, n_wfetch, n_contend, n_overlap, n_acc, n_relu, n_bias, n_pool);
    checks++; if (n_overlap == 0)    begin failures++; $display("FAIL no overlapped prefetch"); end
    checks++; if (n_bcast == 0)      begin failures++; $display("FAIL no broadcast"); end
    checks++; if (n_multigroup == 0) begin failures++; $display("FAIL no second lane group"); end
    checks++; if (n_fetch == 0)      begin failures++; $display("FAIL no bank load"); end
    checks++; if (n_wfetch != 9)     begin failures++; $display("FAIL kernel bank loads %0d exp 9", n_wfetch); end
    checks++; if (n_contend == 0)    begin failures++; $display("FAIL no bus contention"); end
    checks++; if (n_acc == 0)        begin failures++; $display("FAIL no accumulation"); end
    checks++; if (n_relu == 0)       begin failures++; $display("FAIL no ReLU clamp"); end
    checks++; if (n_bias == 0)       begin failures++; $display("FAIL bias not set once"); end
    checks++; if (n_pool == 0)       begin failures++; $display("FAIL no pooling"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
