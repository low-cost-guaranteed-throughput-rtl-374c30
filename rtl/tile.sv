// tile: one processing tile of the ring MPSoC, without its CPU.
//
// Holds the tile's network interface, its dual-ported local data memory, its
// instruction memory and its interrupt timer. The NI's output port drives
// port B of the data memory directly, so a word arriving over the ring is
// stored in the cycle it arrives. The CPU (a soft-core processor that is not
// part of this RTL) connects to the remaining ports:
//   net_*  stores to a remote tile: destination NI, word address in that
//          tile's data memory, data. net_stall holds the CPU while the NI's
//          input buffer is full.
//   dm_*   loads and stores to the local data memory (port A, 1-cycle read).
//   im_*   instruction fetch (1-cycle read) and program load.
//   tmr_*  time-slice timer and its interrupt.
// The tile's composition follows the design; the CPU-side port shapes are
// this design's.
module tile #(
  parameter int unsigned N_NODES    = ring_pkg::N_NODES_DEF,
  parameter int unsigned NODE_ID    = 0,
  parameter int unsigned ADDR_W     = ring_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W     = ring_pkg::DATA_W_DEF,
  parameter int unsigned BUF_DEPTH  = ring_pkg::BUF_DEPTH_DEF,
  parameter int unsigned IMEM_WORDS = ring_pkg::IMEM_WORDS_DEF,
  localparam int unsigned ID_W   = ring_pkg::id_width(N_NODES),
  localparam int unsigned SLOT_W = ring_pkg::slot_width(N_NODES, ADDR_W, DATA_W),
  localparam int unsigned IAW    = (IMEM_WORDS < 2) ? 1 : $clog2(IMEM_WORDS),
  localparam int unsigned BW     = DATA_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU -> network
  input  logic              net_valid,
  input  logic [ID_W-1:0]   net_dest,
  input  logic [ADDR_W-1:0] net_addr,
  input  logic [DATA_W-1:0] net_data,
  output logic              net_stall,
  // CPU <-> local data memory
  input  logic              dm_en,
  input  logic [BW-1:0]     dm_we,
  input  logic [ADDR_W-1:0] dm_addr,
  input  logic [DATA_W-1:0] dm_wdata,
  output logic [DATA_W-1:0] dm_rdata,
  // instruction memory
  input  logic              im_en,
  input  logic [IAW-1:0]    im_addr,
  output logic [31:0]       im_instr,
  input  logic              im_load_we,
  input  logic [IAW-1:0]    im_load_addr,
  input  logic [31:0]       im_load_data,
  // timer
  input  logic              tmr_we,
  input  logic [31:0]       tmr_period,
  input  logic              tmr_enable,
  output logic              tmr_irq,
  input  logic              tmr_ack,
  // ring
  input  logic [SLOT_W-1:0] slot_in,
  output logic [SLOT_W-1:0] slot_out,
  // status of the NI
  output logic              dlv_valid,
  output logic              inj_own,
  output logic              inj_borrow
);

  logic [ADDR_W-1:0] dlv_addr;
  logic [DATA_W-1:0] dlv_data;

  ni #(
    .N_NODES   (N_NODES),
    .NODE_ID   (NODE_ID),
    .ADDR_W    (ADDR_W),
    .DATA_W    (DATA_W),
    .BUF_DEPTH (BUF_DEPTH)
  ) u_ni (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_valid   (net_valid),
    .wr_dest    (net_dest),
    .wr_addr    (net_addr),
    .wr_data    (net_data),
    .wr_stall   (net_stall),
    .slot_in    (slot_in),
    .slot_out   (slot_out),
    .dlv_valid  (dlv_valid),
    .dlv_addr   (dlv_addr),
    .dlv_data   (dlv_data),
    .inj_own    (inj_own),
    .inj_borrow (inj_borrow)
  );

  dmem #(
    .WORDS  (2 ** ADDR_W),
    .DATA_W (DATA_W)
  ) u_dmem (
    .clk     (clk),
    .a_en    (dm_en),
    .a_we    (dm_we),
    .a_addr  (dm_addr),
    .a_wdata (dm_wdata),
    .a_rdata (dm_rdata),
    .b_we    (dlv_valid),
    .b_addr  (dlv_addr),
    .b_wdata (dlv_data)
  );

  imem #(
    .WORDS  (IMEM_WORDS),
    .DATA_W (32)
  ) u_imem (
    .clk     (clk),
    .f_en    (im_en),
    .f_addr  (im_addr),
    .f_instr (im_instr),
    .l_we    (im_load_we),
    .l_addr  (im_load_addr),
    .l_wdata (im_load_data)
  );

  tile_timer #(
    .CNT_W (32)
  ) u_timer (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (tmr_we),
    .cfg_period (tmr_period),
    .cfg_enable (tmr_enable),
    .irq        (tmr_irq),
    .irq_ack    (tmr_ack)
  );

endmodule
