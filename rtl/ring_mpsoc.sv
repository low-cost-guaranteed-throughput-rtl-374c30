// ring_mpsoc: N processing tiles joined by the slotted, write-only,
// unidirectional communication ring.
//
// Tile i's NI passes its slot to tile (i+1) mod N every clock; there are no
// routers and no buffers inside the ring. Any tile can write any word of any
// other tile's data memory. Each NI owns one slot out of N, which guarantees
// it 1/N of the link bandwidth and at most N-1 cycles of waiting with an
// empty input buffer (N*depth with a full one); it may also borrow empty
// slots whose owner lies at or beyond the destination, which gives up to
// (N - hops + 1)/N of the bandwidth between two tiles when the ring is idle.
// A word written by a CPU at a clock edge reaches the destination memory
// 1 + wait + hops cycles later.
//
// Every port is an array indexed by tile; the CPUs, which are not part of
// this RTL, connect there (see tile.sv for the meaning of each port).
module ring_mpsoc #(
  parameter int unsigned N_NODES    = ring_pkg::N_NODES_DEF,
  parameter int unsigned ADDR_W     = ring_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W     = ring_pkg::DATA_W_DEF,
  parameter int unsigned BUF_DEPTH  = ring_pkg::BUF_DEPTH_DEF,
  parameter int unsigned IMEM_WORDS = ring_pkg::IMEM_WORDS_DEF,
  localparam int unsigned ID_W   = ring_pkg::id_width(N_NODES),
  localparam int unsigned SLOT_W = ring_pkg::slot_width(N_NODES, ADDR_W, DATA_W),
  localparam int unsigned IAW    = (IMEM_WORDS < 2) ? 1 : $clog2(IMEM_WORDS),
  localparam int unsigned BW     = DATA_W / 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_NODES-1:0]             net_valid,
  input  logic [N_NODES-1:0][ID_W-1:0]   net_dest,
  input  logic [N_NODES-1:0][ADDR_W-1:0] net_addr,
  input  logic [N_NODES-1:0][DATA_W-1:0] net_data,
  output logic [N_NODES-1:0]             net_stall,
  input  logic [N_NODES-1:0]             dm_en,
  input  logic [N_NODES-1:0][BW-1:0]     dm_we,
  input  logic [N_NODES-1:0][ADDR_W-1:0] dm_addr,
  input  logic [N_NODES-1:0][DATA_W-1:0] dm_wdata,
  output logic [N_NODES-1:0][DATA_W-1:0] dm_rdata,
  input  logic [N_NODES-1:0]             im_en,
  input  logic [N_NODES-1:0][IAW-1:0]    im_addr,
  output logic [N_NODES-1:0][31:0]       im_instr,
  input  logic [N_NODES-1:0]             im_load_we,
  input  logic [N_NODES-1:0][IAW-1:0]    im_load_addr,
  input  logic [N_NODES-1:0][31:0]       im_load_data,
  input  logic [N_NODES-1:0]             tmr_we,
  input  logic [N_NODES-1:0][31:0]       tmr_period,
  input  logic [N_NODES-1:0]             tmr_enable,
  output logic [N_NODES-1:0]             tmr_irq,
  input  logic [N_NODES-1:0]             tmr_ack,
  output logic [N_NODES-1:0]             dlv_valid,
  output logic [N_NODES-1:0]             inj_own,
  output logic [N_NODES-1:0]             inj_borrow
);

  logic [N_NODES-1:0][SLOT_W-1:0] link;  // link[i]: from tile i to tile i+1

  for (genvar i = 0; i < int'(N_NODES); i++) begin : g_tile
    tile #(
      .N_NODES    (N_NODES),
      .NODE_ID    (i),
      .ADDR_W     (ADDR_W),
      .DATA_W     (DATA_W),
      .BUF_DEPTH  (BUF_DEPTH),
      .IMEM_WORDS (IMEM_WORDS)
    ) u_tile (
      .clk          (clk),
      .rst_n        (rst_n),
      .net_valid    (net_valid[i]),
      .net_dest     (net_dest[i]),
      .net_addr     (net_addr[i]),
      .net_data     (net_data[i]),
      .net_stall    (net_stall[i]),
      .dm_en        (dm_en[i]),
      .dm_we        (dm_we[i]),
      .dm_addr      (dm_addr[i]),
      .dm_wdata     (dm_wdata[i]),
      .dm_rdata     (dm_rdata[i]),
      .im_en        (im_en[i]),
      .im_addr      (im_addr[i]),
      .im_instr     (im_instr[i]),
      .im_load_we   (im_load_we[i]),
      .im_load_addr (im_load_addr[i]),
      .im_load_data (im_load_data[i]),
      .tmr_we       (tmr_we[i]),
      .tmr_period   (tmr_period[i]),
      .tmr_enable   (tmr_enable[i]),
      .tmr_irq      (tmr_irq[i]),
      .tmr_ack      (tmr_ack[i]),
      .slot_in      (link[(i + int'(N_NODES) - 1) % int'(N_NODES)]),
      .slot_out     (link[i]),
      .dlv_valid    (dlv_valid[i]),
      .inj_own      (inj_own[i]),
      .inj_borrow   (inj_borrow[i])
    );
  end

endmodule
