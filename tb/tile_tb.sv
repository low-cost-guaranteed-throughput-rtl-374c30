// tile_tb: self-checking test of one processing tile (tile 3 of a 16-node
// ring, default sizes), with the rest of the ring played by the testbench.
//
// The testbench feeds slot_in with the slots a rotating ring would bring:
// some empty, some carrying words for this tile, some carrying words for
// tiles further downstream. It checks that
//   * words addressed to this tile end up in its data memory (read back by
//     the CPU port) in arrival order, i.e. the last write to a word wins;
//   * words for other tiles leave on slot_out unchanged one cycle later;
//   * the CPU's network writes leave on slot_out in program order with the
//     right destination, address and data, and the CPU is stalled while the
//     input buffer is full;
//   * the instruction memory returns what was loaded;
//   * the timer interrupts with the programmed period.
module tile_tb;
  localparam int unsigned N = 16, ME = 3, AW = 11, DW = 32;
  localparam int unsigned IW = 4;

  typedef struct packed {
    logic          valid;
    logic [IW-1:0] sid;
    logic [IW-1:0] dest;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
  } slot_t;
  typedef struct packed {
    logic [IW-1:0] dest;
    logic [AW-1:0] addr;
    logic [DW-1:0] data;
  } wr_t;

  logic clk = 0, rst_n = 0;
  logic net_valid, net_stall, dm_en, im_en, im_load_we, tmr_we, tmr_enable, tmr_irq, tmr_ack;
  logic dlv_valid, inj_own, inj_borrow;
  logic [IW-1:0] net_dest;
  logic [AW-1:0] net_addr, dm_addr;
  logic [DW-1:0] net_data, dm_wdata, dm_rdata;
  logic [3:0] dm_we;
  logic [10:0] im_addr, im_load_addr;
  logic [31:0] im_instr, im_load_data, tmr_period;
  slot_t slot_in, slot_out, prev_in;
  wr_t   sent[$];
  logic [DW-1:0] mem_model [2 ** AW];
  bit    mem_written [2 ** AW];
  int checks = 0, failures = 0, cyc = 0;
  int n_remote = 0, n_pass = 0, n_sent = 0, n_stall = 0, n_irq = 0;

  tile #(.N_NODES(N), .NODE_ID(ME)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ring side and CPU network writes
  initial begin
    int sid;
    wr_t w;
    bit hold;
    hold = 0;
    net_valid = 0; net_dest = '0; net_addr = '0; net_data = '0;
    dm_en = 0; dm_we = 0; dm_addr = '0; dm_wdata = '0;
    im_en = 0; im_addr = '0; im_load_we = 0; im_load_addr = '0; im_load_data = '0;
    tmr_we = 0; tmr_enable = 0; tmr_ack = 0; tmr_period = '0;
    slot_in = '0;
    prev_in = '0;
    foreach (mem_written[i]) mem_written[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 3000; cyc++) begin
      sid = ((int'(ME) - 1 - cyc) % int'(N) + int'(N)) % int'(N);
      slot_in = '0;
      slot_in.sid = IW'(sid);
      if ($urandom_range(0, 99) < 50) begin
        slot_in.valid = 1;
        // words for this tile use a small address range so they overwrite
        if (sid == ME || $urandom_range(0, 1) == 0) slot_in.dest = IW'(ME);
        else slot_in.dest = IW'((ME + $urandom_range(1, (sid - ME + N) % N)) % N);
        slot_in.addr = (slot_in.dest == IW'(ME)) ? AW'($urandom_range(0, 63)) : AW'($urandom());
        slot_in.data = $urandom();
      end
      if (!hold) begin
        net_valid = ($urandom_range(0, 99) < 40);
        net_dest  = IW'($urandom_range(0, N - 1));
        net_addr  = AW'($urandom());
        net_data  = $urandom();
      end
      #1;
      // the slot handed over last cycle leaves unchanged unless it was ours
      if (prev_in.valid && prev_in.dest != IW'(ME)) begin
        check(slot_out == prev_in, "pass-through slot");
        n_pass++;
      end
      if (inj_own || inj_borrow) begin
        check(sent.size() != 0, "injection without a pending write");
        if (sent.size() != 0) begin
          w = sent.pop_front();
          check(slot_out.valid && slot_out.dest == w.dest && slot_out.addr == w.addr &&
                slot_out.data == w.data, "injected word matches the CPU write");
          n_sent++;
        end
      end
      if (net_valid && net_stall) n_stall++;
      hold = net_valid && net_stall;   // a refused write is offered again
      @(posedge clk);
      if (net_valid && !net_stall) sent.push_back('{net_dest, net_addr, net_data});
      if (dlv_valid) n_remote++;
      @(negedge clk);
      prev_in = slot_in;
      // model of the data memory: only words that arrive for this tile
      if (prev_in.valid && prev_in.dest == IW'(ME)) begin
        mem_model[prev_in.addr] = prev_in.data;
        mem_written[prev_in.addr] = 1;
      end
    end
    net_valid = 0;
    slot_in = '0;
    slot_in.sid = IW'((int'(ME) - 1 - cyc) % int'(N) + int'(N)) % int'(N);
    // read the data memory through the CPU port
    for (int a = 0; a < 64; a++) begin
      @(negedge clk);
      dm_en = 1; dm_addr = AW'(a);
      @(posedge clk);
      #1;
      if (mem_written[a]) check(dm_rdata == mem_model[a], $sformatf("dmem word %0d", a));
    end
    dm_en = 0;
    check(n_remote > 100 && n_pass > 100 && n_sent > 100 && n_stall > 0,
          $sformatf("traffic: remote=%0d pass=%0d sent=%0d stall=%0d", n_remote, n_pass, n_sent, n_stall));
    // instruction memory
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      im_load_we = 1; im_load_addr = 11'(a * 7); im_load_data = 32'hB000_0000 + 32'(a);
    end
    @(negedge clk);
    im_load_we = 0;
    for (int a = 31; a >= 0; a--) begin
      im_en = 1; im_addr = 11'(a * 7);
      @(posedge clk);
      #1;
      check(im_instr == 32'hB000_0000 + 32'(a), "instruction fetch");
      @(negedge clk);
    end
    im_en = 0;
    // timer: period 20, count interrupts over 200 cycles
    tmr_we = 1; tmr_period = 32'd20; tmr_enable = 1;
    @(negedge clk);
    tmr_we = 0;
    repeat (200) begin
      @(negedge clk);
      tmr_ack = tmr_irq;
      if (tmr_irq) n_irq++;
    end
    check(n_irq == 10, $sformatf("timer interrupts: %0d", n_irq));
    $display("remote=%0d pass=%0d sent=%0d stall=%0d irq=%0d", n_remote, n_pass, n_sent, n_stall, n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
