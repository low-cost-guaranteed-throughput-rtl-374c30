// ring_mpsoc_tb: end-to-end test of the 16-tile ring MPSoC at its default
// sizes. CPU behaviour is modelled by tasks that drive each tile's network,
// data-memory, instruction-memory and timer ports.
//
// Phase 1, idle-ring latency: single writes between chosen tiles. The
// delivery cycle is predicted from the slot rotation (NI i holds slot
// (i - k) mod N after k clocks) and the two slot rules, and must match
// exactly: 1 cycle into the buffer, the wait for a usable slot, then one
// cycle per hop.
// Phase 2, saturation: every tile writes to random tiles as fast as it is
// allowed, so input buffers fill and CPUs stall. Checks: every word is
// delivered exactly once, in order per source/destination pair, to the right
// address, within depth*N + hops cycles of being accepted (the worst-case
// latency bound); every tile gets at least its guaranteed 1/N of the cycles.
// Phase 3, streaming: two software FIFOs of the split-pointer (C-HEAP) kind
// carry containers across the ring (tile 0 -> tile 4, 4 hops, and tile 9 ->
// tile 2, 9 hops) with capacity 3 containers, while other tiles add
// background traffic. Data and pointers travel only as remote writes; the
// reader reads its local memory. The stream contents are checked, and the
// FIFO must have been seen both full and empty, with its wrap flags toggling.
// Then every tile's data memory is read back and compared with the last word
// delivered to each address, instruction memories are loaded and fetched,
// and all timers interrupt.
// Every mechanism counted (own-slot injection, borrowed-slot injection,
// stall, delivery, FIFO full/empty, wrap, interrupt) must occur at least once.
module ring_mpsoc_tb;
  localparam int N = 16, AW = 11, DW = 32, DEPTH = 4, IW = 4;
  localparam int ALPHA = 3, S = 8;                 // FIFO capacity and container size
  localparam int FIFO_BASE = 'h100, WP_ADDR = 'h0F0, RP_ADDR = 'h0F1;
  localparam int BG_BASE = 'h400;                  // background traffic area

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

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // cycle counter: number of clock edges since reset was released
  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  function automatic int hops(int a, int b);
    return (b > a) ? b - a : b + N - a;
  endfunction

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    int            t_acc;
  } pkt_t;
  pkt_t exp_q [N][N][$];
  logic [DW-1:0] last_word [N][2 ** AW];
  bit            written   [N][2 ** AW];
  int n_own = 0, n_borrow = 0, n_dlv = 0, n_stall = 0, n_acc = 0, max_lat = 0;
  int inj_cnt [N];
  int lat_last = -1;

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (net_valid[g] && !net_stall[g]) begin
          exp_q[g][net_dest[g]].push_back('{net_addr[g], net_data[g], cyc});
          n_acc++;
        end
        if (net_valid[g] && net_stall[g]) n_stall++;
        if (inj_own[g]) n_own++;
        if (inj_borrow[g]) n_borrow++;
        if (inj_own[g] || inj_borrow[g]) inj_cnt[g]++;
        if (dlv_valid[g]) begin : deliver
          logic [AW-1:0] a;
          logic [DW-1:0] d;
          int src;
          pkt_t p;
          a = dut.g_tile[g].u_tile.u_ni.dlv_addr;
          d = dut.g_tile[g].u_tile.u_ni.dlv_data;
          src = int'(d[31:28]);        // every word carries its source tile
          n_dlv++;
          lat_last = cyc;
          if (exp_q[src][g].size() == 0) begin
            check(0, $sformatf("unexpected word %h at tile %0d", d, g));
          end else begin
            p = exp_q[src][g].pop_front();
            check(p.addr == a && p.data == d,
                  $sformatf("tile %0d got %h@%h, expected %h@%h from %0d", g, d, a, p.data, p.addr, src));
            check(cyc - p.t_acc <= DEPTH * N + hops(src, g),
                  $sformatf("latency %0d over bound %0d", cyc - p.t_acc, DEPTH * N + hops(src, g)));
            if (cyc - p.t_acc > max_lat) max_lat = cyc - p.t_acc;
          end
          last_word[g][a] = d;
          written[g][a]   = 1;
        end
      end
    end
  end

  // ------------------------------------------------------------ CPU models
  int seq [N];
  function automatic logic [DW-1:0] tag(int src, logic [27:0] payload);
    return {4'(src), payload};
  endfunction

  // store to a remote tile; blocks while the NI stalls the CPU
  task automatic net_write(int i, int dest, int addr, logic [DW-1:0] data);
    bit stalled;
    net_valid[i] = 1;
    net_dest[i]  = IW'(dest);
    net_addr[i]  = AW'(addr);
    net_data[i]  = data;
    do begin
      #1;
      stalled = net_stall[i];
      @(negedge clk);
    end while (stalled);
    net_valid[i] = 0;
  endtask

  // load from the tile's own data memory (one cycle)
  task automatic dm_read(int i, int addr, output logic [DW-1:0] data);
    dm_en[i] = 1;
    dm_we[i] = '0;
    dm_addr[i] = AW'(addr);
    @(negedge clk);
    data = dm_rdata[i];
    dm_en[i] = 0;
  endtask

  task automatic dm_write(int i, int addr, logic [DW-1:0] data);
    dm_en[i] = 1;
    dm_we[i] = 4'hF;
    dm_addr[i] = AW'(addr);
    dm_wdata[i] = data;
    @(negedge clk);
    dm_en[i] = 0;
    dm_we[i] = '0;
  endtask

  // C-HEAP pointers: {wrap flag, container index}
  function automatic logic [DW-1:0] next_ptr(logic [DW-1:0] p);
    if (p[15:0] == 16'(ALPHA - 1)) return {p[31:16] ^ 16'h1, 16'h0};
    return p + 1;
  endfunction

  int n_full = 0, n_empty = 0, n_wrap = 0, n_containers = 0;

  task automatic fifo_producer(int p, int c, int count);
    logic [DW-1:0] wp, rp;
    wp = '0;
    for (int k = 0; k < count; k++) begin
      // wait for space: full when indices match and wrap flags differ
      forever begin
        dm_read(p, RP_ADDR, rp);
        if (!(rp[15:0] == wp[15:0] && rp[16] != wp[16])) break;
        n_full++;
      end
      for (int j = 0; j < S; j++)
        net_write(p, c, FIFO_BASE + int'(wp[15:0]) * S + j, tag(p, 28'(k * S + j) | 28'h0800000));
      if (wp[15:0] == 16'(ALPHA - 1)) n_wrap++;
      wp = next_ptr(wp);
      net_write(p, c, WP_ADDR, tag(p, 28'(wp)));
    end
  endtask

  task automatic fifo_consumer(int p, int c, int count);
    logic [DW-1:0] wpc, rp, d;
    rp = '0;
    for (int k = 0; k < count; k++) begin
      forever begin
        dm_read(c, WP_ADDR, wpc);
        if (wpc[16:0] != rp[16:0]) break;
        n_empty++;
      end
      for (int j = 0; j < S; j++) begin
        dm_read(c, FIFO_BASE + int'(rp[15:0]) * S + j, d);
        check(d == tag(p, 28'(k * S + j) | 28'h0800000),
              $sformatf("stream %0d->%0d container %0d word %0d: %h", p, c, k, j, d));
      end
      // slow consumer now and then, so the producer finds the FIFO full
      if (k % 4 == 0) repeat (60) @(negedge clk);
      rp = next_ptr(rp);
      net_write(c, p, RP_ADDR, tag(c, 28'(rp)));
      n_containers++;
    end
  endtask

  task automatic saturate(int i, int words);
    for (int k = 0; k < words; k++) begin
      net_write(i, $urandom_range(0, N - 1), BG_BASE + $urandom_range(0, 255), tag(i, 28'(seq[i])));
      seq[i]++;
    end
  endtask

  task automatic background(int i, int cycles);
    for (int k = 0; k < cycles; k++) begin
      if ($urandom_range(0, 99) < 30) begin
        int d;
        d = $urandom_range(0, N - 1);
        net_write(i, d, BG_BASE + $urandom_range(0, 255), tag(i, 28'(seq[i])));
        seq[i]++;
      end else @(negedge clk);
    end
  endtask

  // ---------------------------------------------------------------- phases
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    net_valid = '0; net_dest = '0; net_addr = '0; net_data = '0;
    dm_en = '0; dm_we = '0; dm_addr = '0; dm_wdata = '0;
    im_en = '0; im_addr = '0; im_load_we = '0; im_load_addr = '0; im_load_data = '0;
    tmr_we = '0; tmr_period = '0; tmr_enable = '0; tmr_ack = '0;
    foreach (inj_cnt[i]) inj_cnt[i] = 0;
    foreach (seq[i]) seq[i] = 0;
    foreach (written[i, a]) written[i][a] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- phase 1: exact latency on an idle ring
    begin
      int pairs [6][2] = '{'{0, 1}, '{3, 7}, '{5, 4}, '{10, 10}, '{15, 0}, '{6, 13}};
      foreach (pairs[k]) begin
        int s, d, t_acc, c, sid, t_exp;
        s = pairs[k][0];
        d = pairs[k][1];
        repeat ($urandom_range(0, 20)) @(negedge clk);
        t_acc = cyc;                               // accepted at the end of this cycle
        // first cycle with a usable slot at NI s, all slots being empty
        c = t_acc + 1;
        forever begin
          sid = ((s - c) % N + N) % N;
          if (hops(s, d) <= hops(s, sid)) break;
          c++;
        end
        t_exp = c + hops(s, d);
        fork
          net_write(s, d, 'h7F0 + k, tag(s, 28'(k)));
        join_none
        while (cyc < t_exp) begin
          @(negedge clk);
          if (cyc < t_exp) check(!dlv_valid[d], $sformatf("early delivery %0d->%0d", s, d));
        end
        check(dlv_valid[d], $sformatf("delivery %0d->%0d in cycle %0d", s, d, t_exp));
        check(c - t_acc <= N, "idle-ring wait within N cycles");
        repeat (2) @(negedge clk);
      end
    end

    // ---- phase 2: saturation
    begin
      int c0, c1;
      int base [N];
      foreach (base[i]) base[i] = inj_cnt[i];
      c0 = cyc;
      for (int i = 0; i < N; i++) begin
        fork
          automatic int ii = i;
          saturate(ii, 400);
        join_none
      end
      // guaranteed share while every buffer is kept busy
      repeat (800) @(negedge clk);
      c1 = cyc;
      for (int i = 0; i < N; i++)
        check(inj_cnt[i] - base[i] >= (c1 - c0) / N - 1,
              $sformatf("tile %0d injected %0d in %0d cycles", i, inj_cnt[i] - base[i], c1 - c0));
      wait fork;
      repeat (3 * N) @(negedge clk);
    end

    // ---- phase 3: streaming over split-pointer FIFOs with background load
    dm_write(4, WP_ADDR, '0);
    dm_write(0, RP_ADDR, '0);
    dm_write(2, WP_ADDR, '0);
    dm_write(9, RP_ADDR, '0);
    fork
      fifo_producer(0, 4, 24);
      fifo_consumer(0, 4, 24);
      fifo_producer(9, 2, 24);
      fifo_consumer(9, 2, 24);
      background(6, 1500);
      background(12, 1500);
      background(14, 1500);
    join
    repeat (3 * N) @(negedge clk);

    // ---- all words delivered; memory contents match the last delivery
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, $sformatf("%0d words %0d->%0d never delivered", exp_q[s][d].size(), s, d));
    for (int i = 0; i < N; i++) begin
      for (int a = BG_BASE; a < BG_BASE + 256; a += 5) begin
        logic [DW-1:0] v;
        if (written[i][a]) begin
          dm_read(i, a, v);
          check(v == last_word[i][a], $sformatf("tile %0d word %h: %h vs %h", i, a, v, last_word[i][a]));
        end
      end
    end

    // ---- instruction memories and timers
    for (int i = 0; i < N; i++) begin
      im_load_we[i] = 1; im_load_addr[i] = 11'(i * 3); im_load_data[i] = 32'hCAFE_0000 + 32'(i);
    end
    @(negedge clk);
    im_load_we = '0;
    for (int i = 0; i < N; i++) begin
      im_en[i] = 1; im_addr[i] = 11'(i * 3);
    end
    @(negedge clk);
    for (int i = 0; i < N; i++) check(im_instr[i] == 32'hCAFE_0000 + 32'(i), "instruction fetch");
    im_en = '0;
    for (int i = 0; i < N; i++) begin
      tmr_we[i] = 1; tmr_period[i] = 32'(20 + i); tmr_enable[i] = 1;
    end
    @(negedge clk);
    tmr_we = '0;
    repeat (40) @(negedge clk);
    check(&tmr_irq, "every tile's timer interrupted");
    tmr_ack = '1;
    @(negedge clk);
    tmr_ack = '0;

    $display("own=%0d borrowed=%0d delivered=%0d accepted=%0d stalls=%0d max_latency=%0d",
             n_own, n_borrow, n_dlv, n_acc, n_stall, max_lat);
    $display("fifo: containers=%0d full=%0d empty=%0d wraps=%0d", n_containers, n_full, n_empty, n_wrap);
    check(n_own > 0, "own-slot injections happened");
    check(n_borrow > 0, "borrowed-slot injections happened");
    check(n_stall > 0, "CPU stalls happened");
    check(n_dlv == n_acc && n_dlv > 0, "deliveries equal accepted writes");
    check(n_containers == 48, "all containers streamed");
    check(n_full > 0, "FIFO full (application back-pressure) happened");
    check(n_empty > 0, "FIFO empty happened");
    check(n_wrap > 0, "wrap flags toggled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
