// ni_tb: self-checking test of one network interface (NI 2 of a 16-node
// ring, default sizes) with the rest of the ring played by the testbench.
//
// Each cycle the testbench presents on slot_in the slot that the upstream NI
// would pass on: slot numbers arrive in the descending order a rotating ring
// produces, and occupied slots carry packets that respect the ring's
// invariant (a packet never travels past the owner of its slot; a packet in
// the NI's own slot is addressed to this NI). A CPU model writes random
// words and holds a write while the NI stalls it. An independent model of
// the NI predicts, every cycle, the delivery to local memory, the slot sent
// downstream (pass-through, emptying or injection under the two slot rules)
// and the stall; the waiting time of every write is checked against the
// guaranteed bound of N cycles per word ahead of it in the buffer.
module ni_tb;
  localparam int unsigned N = 16, ME = 2, AW = 11, DW = 32, DEPTH = 4;
  localparam int unsigned IW = 4;

  typedef struct packed {
    logic          valid;
    logic [IW-1:0] sid;
    logic [IW-1:0] dest;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
  } slot_t;
  typedef struct {
    logic [IW-1:0] dest;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
    int            t_push;
    int            ahead;
  } req_t;

  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_stall, dlv_valid, inj_own, inj_borrow;
  logic [IW-1:0] wr_dest;
  logic [AW-1:0] wr_addr, dlv_addr;
  logic [DW-1:0] wr_data, dlv_data;
  slot_t slot_in, slot_out, cur_m, exp_out;
  req_t  q[$];
  int checks = 0, failures = 0, cyc = 0;
  int n_dlv = 0, n_own = 0, n_borrow = 0, n_stall = 0, n_blocked = 0, max_wait = 0;

  ni #(.N_NODES(N), .NODE_ID(ME), .ADDR_W(AW), .DATA_W(DW), .BUF_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_valid, .wr_dest, .wr_addr, .wr_data, .wr_stall,
    .slot_in, .slot_out, .dlv_valid, .dlv_addr, .dlv_data, .inj_own, .inj_borrow);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // distance downstream from a to b, a node being N away from itself
  function automatic int hop_dist(int a, int b);
    int node = a;
    for (int h = 1; h <= int'(N); h++) begin
      node = (node + 1) % N;
      if (node == b) return h;
    end
    return 0;
  endfunction

  // a slot as the upstream neighbour would hand it over
  function automatic slot_t upstream_slot(int sid, int load);
    slot_t s;
    int d;
    s = '0;
    s.sid = IW'(sid);
    if ($urandom_range(0, 99) < load) begin
      if (sid == ME || $urandom_range(0, 1) == 0) d = ME;
      else d = (ME + $urandom_range(1, hop_dist(ME, sid))) % N;  // on the way to the owner
      s.valid = 1;
      s.dest  = IW'(d);
      s.addr  = AW'($urandom());
      s.data  = $urandom();
    end
    return s;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int load;
    bit free, deliver, grant, hold;
    hold = 0;
    wr_valid = 0; wr_dest = '0; wr_addr = '0; wr_data = '0;
    slot_in = '0;
    cur_m = '0;
    cur_m.sid = IW'(ME);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      // phases: quiet ring, busy ring, saturated CPU
      load = (cyc < 2000) ? 0 : (cyc < 4000 ? 60 : 90);
      slot_in = upstream_slot(((int'(ME) - 1 - cyc) % int'(N) + int'(N)) % int'(N), load);
      if (!hold) begin
        wr_valid = ($urandom_range(0, 99) < ((cyc % 1000) < 500 ? 15 : 70));
        wr_dest  = IW'($urandom_range(0, N - 1));
        wr_addr  = AW'($urandom());
        wr_data  = $urandom();
      end
      #1;
      // model of the NI for this cycle
      deliver = cur_m.valid && cur_m.dest == IW'(ME);
      free    = !cur_m.valid || deliver;
      grant   = free && q.size() != 0 && hop_dist(ME, q[0].dest) <= hop_dist(ME, cur_m.sid);
      exp_out = cur_m;
      if (deliver) exp_out.valid = 0;
      if (grant) begin
        exp_out.valid = 1;
        exp_out.dest  = q[0].dest;
        exp_out.addr  = q[0].addr;
        exp_out.data  = q[0].data;
      end
      check(dlv_valid == deliver, "delivery strobe");
      if (deliver) check(dlv_addr == cur_m.addr && dlv_data == cur_m.data, "delivered word");
      check(slot_out == exp_out, $sformatf("slot_out %h exp %h", slot_out, exp_out));
      check(wr_stall == (wr_valid && q.size() == DEPTH), "stall");
      check(inj_own == (grant && cur_m.sid == IW'(ME)), "own-slot flag");
      check(inj_borrow == (grant && cur_m.sid != IW'(ME)), "borrowed-slot flag");
      n_dlv += int'(deliver);
      if (grant && cur_m.sid == IW'(ME)) n_own++;
      if (grant && cur_m.sid != IW'(ME)) n_borrow++;
      if (q.size() != 0 && !grant) n_blocked++;
      if (wr_valid && wr_stall) n_stall++;
      hold = wr_valid && wr_stall;   // a refused write is offered again
      if (grant) begin
        check(cyc - q[0].t_push <= (q[0].ahead + 1) * int'(N),
              $sformatf("waited %0d cycles with %0d ahead", cyc - q[0].t_push, q[0].ahead));
        if (cyc - q[0].t_push > max_wait) max_wait = cyc - q[0].t_push;
      end
      // state update at the coming edge
      @(posedge clk);
      if (grant) void'(q.pop_front());
      if (wr_valid && q.size() + (grant ? 1 : 0) < DEPTH)
        q.push_back('{dest: wr_dest, addr: wr_addr, data: wr_data, t_push: cyc, ahead: q.size()});
      cur_m = slot_in;
      @(negedge clk);
    end
    $display("deliveries=%0d own=%0d borrowed=%0d stalls=%0d blocked=%0d max_wait=%0d",
             n_dlv, n_own, n_borrow, n_stall, n_blocked, max_wait);
    check(n_dlv > 0 && n_own > 0 && n_borrow > 0 && n_stall > 0 && n_blocked > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
