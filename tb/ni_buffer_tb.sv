// ni_buffer_tb: self-checking test of the NI input buffer.
//
// Random pushes and pops (pops only when not empty, as the arbiter does)
// against a queue reference model. Every cycle it checks 'full',
// 'head_valid' and the head tuple; it also checks that a push while full is
// refused even with a simultaneous pop, and that an entry appears at the
// head one cycle after it was pushed into an empty buffer.
module ni_buffer_tb;
  localparam int unsigned DEPTH = 4;
  localparam int unsigned WIDTH = 47;

  logic clk = 0, rst_n = 0;
  logic push, pop, full, head_valid;
  logic [WIDTH-1:0] push_data, head_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model[$];
  int n_full = 0, n_refused = 0, n_both = 0;

  ni_buffer #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!head_valid && !full, "empty after reset");
    // one push into an empty buffer: visible at the head next cycle
    push = 1; push_data = 47'h1234_5678_9ab;
    @(negedge clk);
    push = 0;
    check(head_valid && head_data == 47'h1234_5678_9ab, "head one cycle after push");
    pop = 1;
    @(negedge clk);
    pop = 0;
    check(!head_valid, "empty after pop");
    model.delete();
    // random traffic with a bias that often fills the buffer
    for (int cyc = 0; cyc < 4000; cyc++) begin
      push      = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 80));
      push_data = {$urandom(), $urandom()};
      pop       = head_valid && ($urandom_range(0, 99) < 50);
      // compare outputs with the model before the edge
      check(full == (model.size() == DEPTH), "full flag");
      check(head_valid == (model.size() != 0), "head_valid");
      if (model.size() != 0) check(head_data == model[0], "head data");
      if (full) n_full++;
      if (full && push) n_refused++;
      if (full && push && pop) n_both++;
      @(posedge clk);
      if (pop && model.size() != 0) void'(model.pop_front());
      @(negedge clk);
    end
    $display("full=%0d refused=%0d refused_with_pop=%0d", n_full, n_refused, n_both);
    check(n_refused > 0 && n_both > 0, "full-buffer refusals exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model update for pushes, sampled at the edge with the pre-edge 'full'
  always @(posedge clk) begin
    if (rst_n && push && !full) model.push_back(push_data);
  end
endmodule
