// dmem: dual-ported local data memory of a processing tile.
//
// Port A belongs to the CPU: byte-enabled writes and a registered read, one
// cycle from a_en to a_rdata. Port B belongs to the NI's output port: the
// ring is write-only and delivers one whole word per cycle, which must be
// accepted in the cycle it arrives, so port B is a write-only port that is
// always ready. Because the ring serialises all traffic to a node, no
// arbitration between remote writers is needed. When both ports write the
// same word in one cycle the network write wins (this design's choice, as
// are the byte enables and the size). Contents are not reset.
module dmem #(
  parameter int unsigned WORDS  = 2048,
  parameter int unsigned DATA_W = ring_pkg::DATA_W_DEF,
  localparam int unsigned AW = (WORDS < 2) ? 1 : $clog2(WORDS),
  localparam int unsigned BW = DATA_W / 8
) (
  input  logic              clk,
  // port A: CPU
  input  logic              a_en,
  input  logic [BW-1:0]     a_we,
  input  logic [AW-1:0]     a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B: network (write-only)
  input  logic              b_we,
  input  logic [AW-1:0]     b_addr,
  input  logic [DATA_W-1:0] b_wdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int b = 0; b < int'(BW); b++) begin
        if (a_we[b] && !(b_we && b_addr == a_addr)) mem[a_addr][8*b +: 8] <= a_wdata[8*b +: 8];
      end
    end
    if (b_we) mem[b_addr] <= b_wdata;
  end

endmodule
