// ni_arbiter_tb: exhaustive test of the slot arbitration rules.
//
// Two arbiters are checked: NI 5 of a 16-node ring and NI 3 of a 5-node
// ring (a size that is not a power of two). For every combination of slot
// state, slot number, request and destination the expected grant is worked
// out by walking the ring node by node from this NI: the grant is given when
// the slot is free and the destination is met no later than the slot's
// owner (the owner being met last, after a full turn, when the slot is this
// NI's own). It also counts, for every destination, how many of the N slot
// numbers can carry a packet when all slots are empty and checks that count
// against N - hops + 1, the work-conserving bandwidth bound.
module ni_arbiter_tb;
  int checks = 0, failures = 0;

  logic       a_free, a_req, a_grant, a_own, a_borrow;
  logic [3:0] a_sid, a_dest;
  logic       b_free, b_req, b_grant, b_own, b_borrow;
  logic [2:0] b_sid, b_dest;

  ni_arbiter #(.N_NODES(16), .NODE_ID(5)) dut_a (
    .slot_free(a_free), .slot_id(a_sid), .req_valid(a_req), .req_dest(a_dest),
    .grant(a_grant), .grant_own(a_own), .grant_borrow(a_borrow));
  ni_arbiter #(.N_NODES(5), .NODE_ID(3)) dut_b (
    .slot_free(b_free), .slot_id(b_sid), .req_valid(b_req), .req_dest(b_dest),
    .grant(b_grant), .grant_own(b_own), .grant_borrow(b_borrow));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Walk downstream from 'me'; return 1 when 'dest' is met no later than 'owner'.
  function automatic bit reachable(int me, int dest, int owner, int n);
    int node = me;
    for (int step = 1; step <= n; step++) begin
      node = (node + 1) % n;
      if (node == dest) return 1;
      if (node == owner) return 0;
    end
    return 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int usable;
    bit exp;
    for (int d = 0; d < 16; d++) begin
      usable = 0;
      for (int s = 0; s < 16; s++) begin
        for (int f = 0; f < 2; f++) begin
          for (int r = 0; r < 2; r++) begin
            a_free = f[0]; a_req = r[0]; a_sid = 4'(s); a_dest = 4'(d);
            #1;
            exp = f[0] && r[0] && reachable(5, d, s, 16);
            check(a_grant == exp, $sformatf("N16 id5 slot%0d dest%0d f%0d r%0d", s, d, f, r));
            check(a_own == (exp && s == 5), "grant_own N16");
            check(a_borrow == (exp && s != 5), "grant_borrow N16");
            if (f == 1 && r == 1 && a_grant) usable++;
          end
        end
      end
      // own slot always usable; N - hops + 1 slots in total
      check(usable == 16 - ((d - 5 + 16 - 1) % 16 + 1) + 1,
            $sformatf("usable slots to dest %0d: %0d", d, usable));
    end
    for (int d = 0; d < 5; d++) begin
      for (int s = 0; s < 5; s++) begin
        for (int f = 0; f < 2; f++) begin
          for (int r = 0; r < 2; r++) begin
            b_free = f[0]; b_req = r[0]; b_sid = 3'(s); b_dest = 3'(d);
            #1;
            exp = f[0] && r[0] && reachable(3, d, s, 5);
            check(b_grant == exp, $sformatf("N5 id3 slot%0d dest%0d f%0d r%0d", s, d, f, r));
            check(b_own == (exp && s == 3), "grant_own N5");
            check(b_borrow == (exp && s != 3), "grant_borrow N5");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
