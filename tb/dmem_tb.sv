// dmem_tb: self-checking test of the dual-ported data memory.
//
// Random CPU accesses on port A (reads, whole-word and partial byte-enabled
// writes) and network writes on port B, often to the same word, against an
// array reference model. Checks the one-cycle read latency, byte enables,
// read-before-write on port A and that a network write wins a same-word
// collision.
module dmem_tb;
  localparam int unsigned WORDS = 256, DW = 32;

  logic clk = 0;
  logic a_en, b_we;
  logic [3:0] a_we;
  logic [7:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, a_rdata, b_wdata;
  logic [DW-1:0] model [WORDS];
  logic [DW-1:0] exp_rd;
  bit   exp_valid;
  int checks = 0, failures = 0, collisions = 0;

  dmem #(.WORDS(WORDS), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0; b_we = 0; b_addr = 0; b_wdata = 0;
    // fill both model and memory through port B
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      b_we = 1; b_addr = 8'(i); b_wdata = $urandom();
      model[i] = b_wdata;
    end
    @(negedge clk);
    b_we = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      a_en    = ($urandom_range(0, 3) != 0);
      a_we    = ($urandom_range(0, 1) == 0) ? 4'($urandom()) : 4'h0;
      a_addr  = 8'($urandom_range(0, 15));
      a_wdata = $urandom();
      b_we    = ($urandom_range(0, 2) == 0);
      b_addr  = ($urandom_range(0, 1) == 0) ? a_addr : 8'($urandom_range(0, 15));
      b_wdata = $urandom();
      exp_valid = a_en;
      exp_rd    = exp_valid ? model[a_addr] : a_rdata;  // read before write; hold when idle
      if (a_en) begin
        for (int b = 0; b < 4; b++)
          if (a_we[b] && !(b_we && b_addr == a_addr)) model[a_addr][8*b +: 8] = a_wdata[8*b +: 8];
      end
      if (a_en && a_we != 0 && b_we && b_addr == a_addr) collisions++;
      if (b_we) model[b_addr] = b_wdata;
      @(posedge clk);
      #1;
      check(a_rdata == exp_rd, $sformatf("read %h exp %h", a_rdata, exp_rd));
      @(negedge clk);
    end
    // read back everything
    b_we = 0; a_we = 0;
    for (int i = 0; i < 16; i++) begin
      a_en = 1; a_addr = 8'(i);
      @(posedge clk);
      #1;
      check(a_rdata == model[i], $sformatf("final word %0d", i));
      @(negedge clk);
    end
    check(collisions > 0, "write collisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
