// ring_pal_tb: the traffic of the 16-core PAL luminance decoder on the
// default 16-tile ring.
//
// The decoder is a pipeline of tasks, one per tile, streaming 3 MS/s of
// 32-bit words at 100 MHz: 12 MB/s, one word every 33.3 cycles, on each
// connection, and its longest connection spans 4 hops. The mapping used here
// (an assumption: the task graph is a pipeline, with one duplicated stage
// fanning out over up to 4 hops) is:
//   tile i -> tile i+1 for i = 0..14, and tile 3 -> tiles 5, 6, 7.
// Phase 1 runs all streams at that rate for 200 words each and checks that
// every word arrives, in order, within depth*N + hops cycles, that no
// streaming tile is ever stalled, and that the load per connection is 3% of
// a link (12 MB/s of 400 MB/s).
// Phase 2 repeats one 4-hop stream (tile 3 -> tile 7) while all twelve
// tiles that do not take part saturate the ring with their own traffic: the
// stream must still never stall, which the guaranteed 1/16 share (25 MB/s)
// ensures.
// Phase 3 measures the best-case bandwidth of a 4-hop connection on an idle
// ring: exactly 13 of every 16 cycles.
module ring_pal_tb;
  localparam int N = 16, AW = 11, DW = 32, DEPTH = 4, IW = 4;
  localparam int PERIOD_X10 = 333;       // 33.3 cycles per word: 3 MS/s at 100 MHz

  logic clk = 0, rst_n = 0;
  logic [N-1:0]          net_valid, net_stall, dm_en, im_en, im_load_we;
  logic [N-1:0][IW-1:0]  net_dest;
  logic [N-1:0][AW-1:0]  net_addr, dm_addr;
  logic [N-1:0][DW-1:0]  net_data, dm_wdata, dm_rdata;
  logic [N-1:0][3:0]     dm_we;
  logic [N-1:0][10:0]    im_addr, im_load_addr;
  logic [N-1:0][31:0]    im_instr, im_load_data, tmr_period;
  logic [N-1:0]          tmr_we, tmr_enable, tmr_irq, tmr_ack;
  logic [N-1:0]          dlv_valid, inj_own, inj_borrow;

  ring_mpsoc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  function automatic int hops(int a, int b);
    return (b > a) ? b - a : b + N - a;
  endfunction

  typedef struct {
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    int            t_acc;
  } pkt_t;
  pkt_t exp_q [N][N][$];
  int inj_cnt [N], stall_cnt [N], conn_words [N][N];
  int n_dlv = 0, n_acc = 0;

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (net_valid[g] && !net_stall[g]) begin
          exp_q[g][net_dest[g]].push_back('{net_addr[g], net_data[g], cyc});
          n_acc++;
        end
        if (net_valid[g] && net_stall[g]) stall_cnt[g]++;
        if (inj_own[g] || inj_borrow[g]) inj_cnt[g]++;
        if (dlv_valid[g]) begin : deliver
          logic [DW-1:0] d;
          int src;
          pkt_t p;
          d = dut.g_tile[g].u_tile.u_ni.dlv_data;
          src = int'(d[31:28]);
          n_dlv++;
          conn_words[src][g]++;
          if (exp_q[src][g].size() == 0) check(0, "unexpected word");
          else begin
            p = exp_q[src][g].pop_front();
            check(p.addr == dut.g_tile[g].u_tile.u_ni.dlv_addr && p.data == d, "word in order");
            check(cyc - p.t_acc <= DEPTH * N + hops(src, g), "latency bound");
          end
        end
      end
    end
  end

  int seq [N];
  task automatic net_write(int i, int dest, logic [DW-1:0] data);
    bit stalled;
    net_valid[i] = 1;
    net_dest[i]  = IW'(dest);
    net_addr[i]  = AW'(seq[i]);
    net_data[i]  = data;
    do begin
      #1;
      stalled = net_stall[i];
      @(negedge clk);
    end while (stalled);
    net_valid[i] = 0;
  endtask

  // one sample stream at 3 MS/s; a tile with several outputs interleaves them
  task automatic pal_source(int i, int dests [$], int words);
    int t0;
    t0 = cyc;
    for (int k = 0; k < words; k++) begin
      while ((cyc - t0) * 10 < k * PERIOD_X10) @(negedge clk);
      foreach (dests[j]) begin
        net_write(i, dests[j], {4'(i), 28'(seq[i])});
        seq[i]++;
      end
    end
  endtask

  task automatic saturate(int i, int words);
    for (int k = 0; k < words; k++) begin
      net_write(i, $urandom_range(0, N - 1), {4'(i), 28'(seq[i])});
      seq[i]++;
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0, c1;
    net_valid = '0; net_dest = '0; net_addr = '0; net_data = '0;
    dm_en = '0; dm_we = '0; dm_addr = '0; dm_wdata = '0;
    im_en = '0; im_addr = '0; im_load_we = '0; im_load_addr = '0; im_load_data = '0;
    tmr_we = '0; tmr_period = '0; tmr_enable = '0; tmr_ack = '0;
    foreach (inj_cnt[i]) begin
      inj_cnt[i] = 0; stall_cnt[i] = 0; seq[i] = 0;
    end
    foreach (conn_words[i, j]) conn_words[i][j] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- phase 1: the decoder's streams
    c0 = cyc;
    for (int i = 0; i < N - 1; i++) begin
      fork
        automatic int ii = i;
        pal_source(ii, (ii == 3) ? '{4, 5, 6, 7} : '{ii + 1}, 200);
      join_none
    end
    wait fork;
    repeat (3 * N) @(negedge clk);
    c1 = cyc;
    for (int i = 0; i < N; i++) check(stall_cnt[i] == 0, $sformatf("tile %0d stalled %0d cycles", i, stall_cnt[i]));
    // 200 words in ~6660 cycles: 3% of the link's one word per cycle
    check(conn_words[0][1] == 200 && conn_words[3][7] == 200, "all words of each stream arrived");
    check(conn_words[0][1] * 1000 / (c1 - c0) >= 28 && conn_words[0][1] * 1000 / (c1 - c0) <= 31,
          $sformatf("load per connection %0d/1000 of the link", conn_words[0][1] * 1000 / (c1 - c0)));
    $display("phase 1: %0d cycles, %0d words per connection, load %0d/1000 per connection",
             c1 - c0, conn_words[0][1], conn_words[0][1] * 1000 / (c1 - c0));

    // ---- phase 2: a 4-hop stream against a saturated ring
    foreach (stall_cnt[i]) stall_cnt[i] = 0;
    for (int i = 0; i < N; i++) begin
      if (i < 3 || i > 7) begin
        fork
          automatic int ii = i;
          saturate(ii, 500);
        join_none
      end
    end
    pal_source(3, '{7}, 200);
    check(stall_cnt[3] == 0, $sformatf("4-hop stream stalled %0d cycles under full load", stall_cnt[3]));
    check(stall_cnt[0] > 0, "the other tiles were saturated");
    wait fork;
    repeat (3 * N) @(negedge clk);

    // ---- phase 3: best-case bandwidth of a 4-hop connection
    begin
      int i0;
      fork
        begin
          for (int k = 0; k < 100 * N; k++) begin
            net_write(3, 7, {4'(3), 28'(seq[3])});
            seq[3]++;
          end
        end
      join_none
      repeat (3 * N) @(negedge clk);
      c0 = cyc; i0 = inj_cnt[3];
      repeat (64 * N) @(negedge clk);
      check(inj_cnt[3] - i0 == 64 * 13, $sformatf("4-hop best case: %0d words in %0d cycles",
                                                 inj_cnt[3] - i0, cyc - c0));
      $display("phase 3: %0d words in %0d cycles (13/16 expected)", inj_cnt[3] - i0, cyc - c0);
      wait fork;
    end
    repeat (3 * N) @(negedge clk);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, "all words delivered");
    check(n_dlv == n_acc, "deliveries equal accepted writes");
    $display("accepted=%0d delivered=%0d", n_acc, n_dlv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
