// ring_sizes_tb: runs ring_size_harness on rings of 2, 4, 8 and 32 tiles,
// the sizes besides the default 16 for which the ring's cost was reported,
// and on an 8-tile ring whose NIs have no input buffer.
// Each harness checks the work-conserving bandwidth bound between two tiles
// on an idle ring, exactly-once in-order delivery under saturation, the
// depth*N + hops latency bound and every tile's guaranteed 1/N share.
module ring_sizes_tb;
  logic clk = 0, rst_n = 0;
  logic [4:0] done;
  int c [5], f [5];
  int checks, failures;

  always #5 clk = ~clk;

  ring_size_harness #(.N(2))  h2  (.clk, .rst_n, .done(done[0]), .checks(c[0]), .failures(f[0]));
  ring_size_harness #(.N(4))  h4  (.clk, .rst_n, .done(done[1]), .checks(c[1]), .failures(f[1]));
  ring_size_harness #(.N(8))  h8  (.clk, .rst_n, .done(done[2]), .checks(c[2]), .failures(f[2]));
  ring_size_harness #(.N(32)) h32 (.clk, .rst_n, .done(done[3]), .checks(c[3]), .failures(f[3]));
  ring_size_harness #(.N(8), .DEPTH(0)) h8nb (.clk, .rst_n, .done(done[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    #50000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c[0] + c[1] + c[2] + c[3] + c[4], f[0] + f[1] + f[2] + f[3] + f[4] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (&done);
    checks = c[0] + c[1] + c[2] + c[3] + c[4];
    failures = f[0] + f[1] + f[2] + f[3] + f[4];
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
