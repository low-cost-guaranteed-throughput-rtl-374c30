// ring_size_harness: drives and checks one ring_mpsoc of N_NODES tiles; used
// by ring_sizes_tb to run the same test at several ring sizes.
//
// 1. Idle-ring bandwidth: tile 0 streams to the tile farthest away and to
//    its neighbour, one after the other, with its CPU writing every cycle it
//    is not stalled; the number of words injected in a window of 8*N cycles
//    must equal 8*(N - hops + 1), the work-conserving bound.
// 2. Saturation: every tile writes to random tiles as fast as possible; each
//    word must arrive once, in order per source/destination pair, within
//    depth*N + hops cycles (exactly hops cycles after acceptance when the NI
//    has no input buffer, DEPTH = 0), and each tile must get at least 1/N of
//    the cycles.
// Reports done, checks and failures to its parent.
module ring_size_harness #(
  parameter int N = 4,
  parameter int DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int AW = 11, DW = 32;
  localparam int IW = (N < 2) ? 1 : $clog2(N);

  logic [N-1:0]          net_valid, net_stall, dm_en, im_en, im_load_we;
  logic [N-1:0][IW-1:0]  net_dest;
  logic [N-1:0][AW-1:0]  net_addr, dm_addr;
  logic [N-1:0][DW-1:0]  net_data, dm_wdata, dm_rdata;
  logic [N-1:0][3:0]     dm_we;
  logic [N-1:0][10:0]    im_addr, im_load_addr;
  logic [N-1:0][31:0]    im_instr, im_load_data, tmr_period;
  logic [N-1:0]          tmr_we, tmr_enable, tmr_irq, tmr_ack;
  logic [N-1:0]          dlv_valid, inj_own, inj_borrow;

  ring_mpsoc #(.N_NODES(N), .BUF_DEPTH(DEPTH)) dut (.*);

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d cycle %0d: %s", N, cyc, what);
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
  int inj_cnt [N];
  int n_dlv = 0, n_acc = 0;

  for (genvar g = 0; g < N; g++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n) begin
        if (net_valid[g] && !net_stall[g]) begin
          exp_q[g][net_dest[g]].push_back('{net_addr[g], net_data[g], cyc});
          n_acc++;
        end
        if (inj_own[g] || inj_borrow[g]) inj_cnt[g]++;
        if (dlv_valid[g]) begin : deliver
          logic [DW-1:0] d;
          int src;
          pkt_t p;
          d = dut.g_tile[g].u_tile.u_ni.dlv_data;
          src = int'(d[31:24]);
          n_dlv++;
          if (src >= N || exp_q[src][g].size() == 0) check(0, "unexpected word");
          else begin
            p = exp_q[src][g].pop_front();
            check(p.addr == dut.g_tile[g].u_tile.u_ni.dlv_addr && p.data == d, "word in order");
            // with no input buffer a write is accepted in the cycle it is injected
            if (DEPTH == 0) check(cyc - p.t_acc == hops(src, g), "latency equals hops");
            else check(cyc - p.t_acc <= DEPTH * N + hops(src, g), "latency bound");
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
    net_addr[i]  = AW'($urandom());
    net_data[i]  = data;
    do begin
      #1;
      stalled = net_stall[i];
      @(negedge clk);
    end while (stalled);
    net_valid[i] = 0;
  endtask

  task automatic blast(int i, int words);
    for (int k = 0; k < words; k++) begin
      net_write(i, $urandom_range(0, N - 1), {8'(i), 24'(seq[i])});
      seq[i]++;
    end
  endtask

  task automatic stream(int i, int dest, int cycles);
    int t_end;
    t_end = cyc + cycles;
    while (cyc < t_end) begin
      net_write(i, dest, {8'(i), 24'(seq[i])});
      seq[i]++;
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    net_valid = '0; net_dest = '0; net_addr = '0; net_data = '0;
    dm_en = '0; dm_we = '0; dm_addr = '0; dm_wdata = '0;
    im_en = '0; im_addr = '0; im_load_we = '0; im_load_addr = '0; im_load_data = '0;
    tmr_we = '0; tmr_period = '0; tmr_enable = '0; tmr_ack = '0;
    foreach (inj_cnt[i]) inj_cnt[i] = 0;
    foreach (seq[i]) seq[i] = 0;
    @(posedge rst_n);
    @(negedge clk);
    // 1. idle-ring bandwidth between two tiles
    for (int k = 0; k < 2; k++) begin
      int dest, c0, i0, win;
      dest = (k == 0) ? N - 1 : 1;
      win = 8 * N;
      fork
        stream(0, dest, win + 6 * N);
      join_none
      repeat (3 * N) @(negedge clk);       // buffer full, steady state
      c0 = cyc; i0 = inj_cnt[0];
      repeat (win) @(negedge clk);
      check(inj_cnt[0] - i0 == 8 * (N - hops(0, dest) + 1),
            $sformatf("0->%0d injected %0d of %0d cycles, expected %0d", dest,
                      inj_cnt[0] - i0, cyc - c0, 8 * (N - hops(0, dest) + 1)));
      wait fork;
      repeat (2 * N) @(negedge clk);
    end
    // 2. saturation
    begin
      int c0, base [N];
      foreach (base[i]) base[i] = inj_cnt[i];
      c0 = cyc;
      for (int i = 0; i < N; i++) begin
        fork
          automatic int ii = i;
          blast(ii, 300);
        join_none
      end
      repeat (200) @(negedge clk);
      for (int i = 0; i < N; i++)
        check(inj_cnt[i] - base[i] >= (cyc - c0) / N - 1, $sformatf("tile %0d guaranteed share", i));
      wait fork;
    end
    repeat (3 * N) @(negedge clk);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, "all words delivered");
    check(n_dlv == n_acc, "deliveries equal accepted writes");
    $display("N=%0d depth=%0d: accepted=%0d delivered=%0d", N, DEPTH, n_acc, n_dlv);
    done = 1;
  end
endmodule
