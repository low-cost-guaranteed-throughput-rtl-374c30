// imem_tb: self-checking test of the instruction memory: a program image is
// loaded through the load port, then fetched back in random order with a
// one-cycle latency, including fetches of words rewritten on the way.
module imem_tb;
  localparam int unsigned WORDS = 512;

  logic clk = 0;
  logic f_en, l_we;
  logic [8:0] f_addr, l_addr;
  logic [31:0] f_instr, l_wdata;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS), .DATA_W(32)) dut (.*);

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
    logic [31:0] exp;
    f_en = 0; f_addr = 0; l_we = 0; l_addr = 0; l_wdata = 0;
    for (int i = 0; i < int'(WORDS); i++) begin
      @(negedge clk);
      l_we = 1; l_addr = 9'(i); l_wdata = 32'h9000_0000 ^ (32'(i) * 32'h0001_0003);
      model[i] = l_wdata;
    end
    @(negedge clk);
    l_we = 0;
    for (int k = 0; k < 3000; k++) begin
      f_en = 1; f_addr = 9'($urandom_range(0, WORDS - 1));
      l_we = ($urandom_range(0, 9) == 0);
      l_addr = 9'($urandom_range(0, WORDS - 1));
      l_wdata = $urandom();
      exp = model[f_addr];
      @(posedge clk);
      #1;
      check(f_instr == exp, $sformatf("fetch %0d: %h exp %h", f_addr, f_instr, exp));
      if (l_we) model[l_addr] = l_wdata;
      // a fetch that is not enabled keeps the last instruction
      f_en = 0; f_addr = 9'($urandom());
      l_we = 0;
      exp = f_instr;
      @(posedge clk);
      #1;
      check(f_instr == exp, "hold without fetch");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
