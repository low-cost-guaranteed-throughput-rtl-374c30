// tile_timer_tb: self-checking test of the time-slice timer.
//
// Measures the cycles between interrupts for several programmed periods
// (they must equal the period exactly, with no drift across slices), checks
// that the interrupt holds until acknowledged, that disabling the timer
// freezes it, and that the default period after reset is used.
module tile_timer_tb;
  logic clk = 0, rst_n = 0;
  logic cfg_we, cfg_enable, irq, irq_ack;
  logic [31:0] cfg_period;
  int checks = 0, failures = 0, cyc = 0;

  tile_timer #(.CNT_W(32), .DEFAULT_PERIOD(37)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cyc, what);
    end
  endtask

  // acknowledge every interrupt at once; return the cycle at which irq rose
  task automatic wait_irq(output int t);
    do @(negedge clk); while (!irq);
    t = cyc;
    irq_ack = 1;
    @(negedge clk);
    irq_ack = 0;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    cfg_we = 0; cfg_enable = 1; irq_ack = 0; cfg_period = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait_irq(t0);
    for (int k = 0; k < 3; k++) begin
      wait_irq(t1);
      check(t1 - t0 == 37, $sformatf("default period: %0d", t1 - t0));
      t0 = t1;
    end
    for (int p = 3; p <= 140; p += 43) begin
      @(negedge clk);
      cfg_we = 1; cfg_period = 32'(p);
      @(negedge clk);
      cfg_we = 0;
      wait_irq(t0);
      for (int k = 0; k < 4; k++) begin
        wait_irq(t1);
        check(t1 - t0 == p, $sformatf("period %0d measured %0d", p, t1 - t0));
        t0 = t1;
      end
    end
    // irq is sticky until acknowledged
    @(negedge clk);
    cfg_we = 1; cfg_period = 32'd10;
    @(negedge clk);
    cfg_we = 0;
    do @(negedge clk); while (!irq);
    repeat (25) begin
      @(negedge clk);
      check(irq, "irq held without acknowledge");
    end
    irq_ack = 1;
    @(negedge clk);
    irq_ack = 0;
    check(!irq, "irq cleared by acknowledge");
    // disabled: no interrupt for a long time
    cfg_enable = 0;
    repeat (50) begin
      @(negedge clk);
      check(!irq, "no irq while disabled");
    end
    cfg_enable = 1;
    wait_irq(t0);
    check(1, "irq after re-enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
