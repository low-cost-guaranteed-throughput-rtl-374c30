// ni: network interface and ring stage of the slotted write-only ring.
//
// The ring has no separate routers: chaining NIs forms it. Each NI holds one
// slot register; every clock the slot moves on to the next NI (slot_out of
// NI i feeds slot_in of NI i+1, and the last feeds the first). A slot is
// {valid, slot id, destination NI, remote word address, data word}.
//
// In each cycle, for the slot held in the register:
//   * if it is valid and addressed to this NI it is delivered on dlv_* to the
//     local data memory in that same cycle (there is no back-pressure: the
//     memory must accept it), and the slot becomes empty;
//   * ni_arbiter decides whether the head of the input buffer (ni_buffer) may
//     be put into the slot (own slot, or an empty slot whose owner lies at or
//     beyond the destination);
//   * a two-input multiplexer sends either the slot or the injected word to
//     the next NI.
// A packet injected at NI s reaches NI d after hops(s,d) cycles, 1..N; it is
// delivered during the cycle it sits in NI d's register. A CPU write accepted
// at a clock edge can be injected in the next cycle at the earliest.
// The input buffer is optional: with BUF_DEPTH = 0 the CPU's write is offered
// to the arbiter directly and wr_stall holds the CPU until the cycle in which
// it is injected (wr_stall then depends combinationally on the slot).
//
// The slot number travels with the slot; at reset NI i holds empty slot i,
// so every NI meets its own slot once every N cycles, which bounds its
// waiting time to N-1 cycles and guarantees it 1/N of the link bandwidth.
// The structure and the two arbitration rules follow the design; the field
// widths, the reset state and the slot-number encoding are this design's.
module ni #(
  parameter int unsigned N_NODES   = ring_pkg::N_NODES_DEF,
  parameter int unsigned NODE_ID   = 0,
  parameter int unsigned ADDR_W    = ring_pkg::ADDR_W_DEF,
  parameter int unsigned DATA_W    = ring_pkg::DATA_W_DEF,
  parameter int unsigned BUF_DEPTH = ring_pkg::BUF_DEPTH_DEF,
  localparam int unsigned ID_W   = ring_pkg::id_width(N_NODES),
  localparam int unsigned SLOT_W = ring_pkg::slot_width(N_NODES, ADDR_W, DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // local input port (CPU writes to the network)
  input  logic              wr_valid,
  input  logic [ID_W-1:0]   wr_dest,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [DATA_W-1:0] wr_data,
  output logic              wr_stall,
  // ring links
  input  logic [SLOT_W-1:0] slot_in,
  output logic [SLOT_W-1:0] slot_out,
  // local output port (to the data memory)
  output logic              dlv_valid,
  output logic [ADDR_W-1:0] dlv_addr,
  output logic [DATA_W-1:0] dlv_data,
  // status
  output logic              inj_own,
  output logic              inj_borrow
);

  typedef struct packed {
    logic              valid;
    logic [ID_W-1:0]   sid;
    logic [ID_W-1:0]   dest;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } slot_t;

  typedef struct packed {
    logic [ID_W-1:0]   dest;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
  } req_t;

  slot_t cur, nxt;
  req_t  head;
  logic  head_valid, grant, deliver;

  // slot register: the slot currently at this NI
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur       <= '0;
      cur.sid   <= ID_W'(NODE_ID);
    end else begin
      cur <= slot_t'(slot_in);
    end
  end

  // input buffer; with BUF_DEPTH = 0 the buffer is left out and the CPU's
  // write waits at the input port, stalled, until it is injected
  if (BUF_DEPTH == 0) begin : g_nobuf
    assign head_valid = wr_valid;
    assign head       = '{dest: wr_dest, addr: wr_addr, data: wr_data};
    assign wr_stall   = wr_valid && !grant;
  end else begin : g_buf
    logic buf_full;

    ni_buffer #(
      .DEPTH (BUF_DEPTH),
      .WIDTH ($bits(req_t))
    ) u_buf (
      .clk        (clk),
      .rst_n      (rst_n),
      .push       (wr_valid),
      .push_data  ({wr_dest, wr_addr, wr_data}),
      .full       (buf_full),
      .pop        (grant),
      .head_valid (head_valid),
      .head_data  (head)
    );

    assign wr_stall = wr_valid && buf_full;
  end

  assign deliver   = cur.valid && (cur.dest == ID_W'(NODE_ID));
  assign dlv_valid = deliver;
  assign dlv_addr  = cur.addr;
  assign dlv_data  = cur.data;

  ni_arbiter #(
    .N_NODES (N_NODES),
    .NODE_ID (NODE_ID)
  ) u_arb (
    .slot_free    (!cur.valid || deliver),
    .slot_id      (cur.sid),
    .req_valid    (head_valid),
    .req_dest     (head.dest),
    .grant        (grant),
    .grant_own    (inj_own),
    .grant_borrow (inj_borrow)
  );

  // two-input multiplexer towards the next NI
  always_comb begin
    nxt = cur;
    if (deliver) nxt.valid = 1'b0;
    if (grant) begin
      nxt.valid = 1'b1;
      nxt.dest  = head.dest;
      nxt.addr  = head.addr;
      nxt.data  = head.data;
    end
  end
  assign slot_out = nxt;

  // Handshake rule for the CPU: a stalled write is held, unchanged, until
  // the cycle it is accepted.
  property p_hold_while_stalled;
    @(posedge clk) disable iff (!rst_n)
      wr_stall |=> wr_valid && $stable(wr_dest) && $stable(wr_addr) && $stable(wr_data);
  endproperty
  a_hold_while_stalled: assert property (p_hold_while_stalled)
    else $error("ni %0d: write changed while stalled", NODE_ID);

  // A slot reaching its owner has always been emptied on the way: packets
  // in a slot never travel past its owner.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(cur.sid == ID_W'(NODE_ID) && cur.valid && !deliver))
      else $error("ni %0d: own slot arrived occupied", NODE_ID);
  end

endmodule
