// tb_hydra_controller: self-checking test of the Hydra controller with 8 lanes,
// against behavioural models of AB, WB, the DRAM banks, the lanes and OB.
// Runs convolutions and max pooling with several sizes and strides, with the
// input map and the kernel loaded by the controller's own bank reads in some
// runs. The lane
// models compute the window results from the pairs they receive; every OB word
// is compared with a convolution / pooling computed here from the input map.
// Also checks that each group fetches each needed activation exactly once,
// and random back-pressure from the streaming buffers (stall).
module tb_hydra_controller;
  import hydra_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int N = 8;

  logic rst_n = 0, start = 0, busy, done, stall;
  layer_cfg_t cfg = '0;
  logic bus_req, bus_gnt = 0, bus_rvalid;
  logic [BANK_AW-1:0] bus_addr;
  fx16_t bus_rdata;
  logic ab_we, ab_rd, wb_we, wb_rd, ob_we;
  logic [8:0] ab_waddr, ab_raddr, ob_waddr;
  logic [5:0] wb_waddr, wb_raddr;
  fx16_t ab_wdata, ab_rdata, wb_wdata, wb_rdata;
  logic     [N-1:0] sb_push, sb_afull = '0, lane_done = '0;
  wa_pair_t [N-1:0] sb_pair;
  logic [2:0] drain_lane;

  hydra_controller #(.N_MAC(N)) dut (.*);

  // behavioural AB / WB / banks
  fx16_t ab [512];
  fx16_t wb [64];
  fx16_t img [512];
  fx16_t kern [64];
  always_ff @(posedge clk) begin
    if (ab_we) ab[ab_waddr] <= ab_wdata;
    if (ab_rd) ab_rdata <= ab[ab_raddr];
    if (wb_we) wb[wb_waddr] <= wb_wdata;
    if (wb_rd) wb_rdata <= wb[wb_raddr];
  end
  dram_bank_model #(.LATENCY(5)) u_bank (.clk, .req(bus_req && bus_gnt), .we(1'b0),
    .addr(bus_addr), .wdata('0), .rvalid(bus_rvalid), .rdata(bus_rdata));
  always_ff @(posedge clk) bus_gnt <= ($urandom_range(2) != 0);

  // lane models
  longint acc [N];
  longint res [N];
  int     cnt [N];
  int     done_delay [N];
  int     ab_reads, ab_cnt, stalls, wb_fills;
  longint ob [512];
  always_ff @(posedge clk) begin
    if (ab_rd) ab_cnt <= ab_cnt + 1;
    if (wb_we) wb_fills <= wb_fills + 1;
    if (stall) stalls <= stalls + 1;
    for (int j = 0; j < N; j++) begin
      lane_done[j] <= 1'b0;
      if (done_delay[j] > 0) begin
        done_delay[j] <= done_delay[j] - 1;
        if (done_delay[j] == 1) lane_done[j] <= 1'b1;
      end
      if (sb_push[j]) begin
        automatic longint v;
        if (cfg.mode == MODE_POOL) v = (sb_pair[j].first || sb_pair[j].a > acc[j]) ? longint'(sb_pair[j].a) : acc[j];
        else v = (sb_pair[j].first ? 0 : acc[j]) + longint'(sb_pair[j].w) * longint'(sb_pair[j].a);
        acc[j] <= v;
        cnt[j] <= sb_pair[j].first ? 1 : cnt[j] + 1;
        if (sb_pair[j].last) begin res[j] <= v; done_delay[j] <= $urandom_range(1, 4); end
      end
    end
    sb_afull <= N'($urandom) & {N{($urandom_range(3) == 0)}};
    if (ob_we) ob[ob_waddr] <= res[drain_lane];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit pool, input int h, input int w, input int k, input int s, input bit fetch,
                     input int abb = 0, input int wbb = 0);
    int oh = (h - k) / s + 1, ow = (w - k) / s + 1;
    int exp_reads = 0;
    int fills0 = wb_fills;
    for (int i = 0; i < h * w; i++) begin
      img[i] = fx16_t'($urandom_range(0, 400)) - 16'sd200;
      if (fetch) u_bank.mem[100 + i] = img[i]; else ab[abb + i] = img[i];
    end
    for (int i = 0; i < 64; i++) wb[i] = fx16_t'($urandom_range(0, 200)) - 16'sd100;
    for (int i = 0; i < k * k; i++) begin
      kern[i] = wb[wbb + i];
      // kernel from the banks: WB holds garbage until the controller loads it
      if (fetch) begin u_bank.mem[3000 + i] = kern[i]; wb[wbb + i] = 16'sh7777; end
    end
    for (int r = 0; r < oh; r++)
      for (int c0 = 0; c0 < ow; c0 += N) begin
        int na = (ow - c0 < N) ? ow - c0 : N;
        exp_reads += k * ((na - 1) * s + k);
      end
    cfg.mode = pool ? MODE_POOL : MODE_CONV;
    cfg.in_h = 10'(h); cfg.in_w = 10'(w); cfg.k = 4'(k); cfg.stride = 4'(s);
    cfg.src = 100; cfg.src_len = fetch ? 10'(h * w) : '0;
    cfg.ab_base = 10'(abb); cfg.wb_base = 8'(wbb);
    cfg.wsrc = 3000; cfg.wsrc_len = fetch ? 8'(k * k) : '0;
    @(posedge clk);
    ab_reads = ab_cnt;
    start <= 1;
    @(posedge clk);
    start <= 0;
    #1;
    while (!done) @(posedge clk);
    ab_reads = ab_cnt - ab_reads;
    for (int r = 0; r < oh; r++)
      for (int c = 0; c < ow; c++) begin
        longint e = pool ? -100000 : 0;
        for (int i = 0; i < k; i++)
          for (int j = 0; j < k; j++) begin
            longint a = img[(r * s + i) * w + c * s + j];
            if (pool) e = (a > e) ? a : e;
            else e += longint'(kern[i * k + j]) * a;
          end
        checks++;
        if (ob[r * ow + c] != e) begin
          failures++;
          $display("FAIL %s h%0d w%0d k%0d s%0d at (%0d,%0d): %0d exp %0d", pool ? "pool" : "conv",
                   h, w, k, s, r, c, ob[r * ow + c], e);
        end
      end
    checks++;
    if (wb_fills - fills0 != (fetch ? k * k : 0)) begin
      failures++; $display("FAIL WB loads %0d exp %0d", wb_fills - fills0, fetch ? k * k : 0);
    end
    checks++;
    if (ab_reads != exp_reads) begin failures++; $display("FAIL AB reads %0d exp %0d", ab_reads, exp_reads); end
  endtask

  initial begin
    for (int j = 0; j < N; j++) begin acc[j] = 0; res[j] = 0; cnt[j] = 0; done_delay[j] = 0; end
    ab_cnt = 0; stalls = 0; wb_fills = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(0, 6, 6, 3, 1, 0);
    run(0, 9, 21, 3, 1, 1);
    run(0, 11, 13, 5, 2, 0);
    run(0, 8, 8, 1, 1, 0);
    run(0, 10, 12, 3, 1, 0, 300, 50);
    run(1, 8, 10, 2, 2, 1, 400, 0);
    run(1, 10, 20, 2, 2, 1);
    run(1, 9, 9, 3, 3, 0);
    run(0, 16, 30, 8, 1, 0);
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
