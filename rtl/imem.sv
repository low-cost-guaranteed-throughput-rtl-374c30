// imem: local instruction memory of a processing tile.
//
// A single-cycle memory: f_en with f_addr returns f_instr at the next clock.
// A separate load port writes the program image. The memory's place in the
// tile follows the design; the load port and the size are this design's.
module imem #(
  parameter int unsigned WORDS  = ring_pkg::IMEM_WORDS_DEF,
  parameter int unsigned DATA_W = 32,
  localparam int unsigned AW = (WORDS < 2) ? 1 : $clog2(WORDS)
) (
  input  logic              clk,
  input  logic              f_en,
  input  logic [AW-1:0]     f_addr,
  output logic [DATA_W-1:0] f_instr,
  input  logic              l_we,
  input  logic [AW-1:0]     l_addr,
  input  logic [DATA_W-1:0] l_wdata
);

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (f_en) f_instr <= mem[f_addr];
    if (l_we) mem[l_addr] <= l_wdata;
  end

endmodule
