// tile_timer: the interrupt timer that ends each time slice of a tile's
// time-division-multiplexed task scheduler.
//
// A down-counter reloaded with the time-slice length. While cfg_enable is
// high it counts one per clock; when it has counted 'period' cycles it raises
// irq, which stays high until irq_ack, and starts the next slice at once so
// slices do not drift. Writing cfg_period (cfg_we) restarts the slice with
// the new length; a period of 0 is treated as 1. The timer's presence
// follows the design; its registers and default are this design's choices.
module tile_timer #(
  parameter int unsigned CNT_W          = 32,
  parameter int unsigned DEFAULT_PERIOD = 100000
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_we,
  input  logic [CNT_W-1:0] cfg_period,
  input  logic             cfg_enable,
  output logic             irq,
  input  logic             irq_ack
);

  logic [CNT_W-1:0] period, cnt;
  logic             expire;

  assign expire = cfg_enable && (cnt <= CNT_W'(1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period <= CNT_W'(DEFAULT_PERIOD);
      cnt    <= CNT_W'(DEFAULT_PERIOD);
      irq    <= 1'b0;
    end else begin
      if (cfg_we) begin
        period <= cfg_period;
        cnt    <= cfg_period;
      end else if (expire) begin
        cnt <= period;
      end else if (cfg_enable) begin
        cnt <= cnt - CNT_W'(1);
      end
      if (expire && !cfg_we) irq <= 1'b1;
      else if (irq_ack)      irq <= 1'b0;
    end
  end

endmodule
