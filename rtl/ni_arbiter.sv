// ni_arbiter: the combinational "arbitration control" of one network interface.
//
// Decides in the current cycle whether the head of the input buffer may be
// injected into the slot that is at this NI. Two rules apply:
//   Rule 1: a slot whose number equals this NI's number is owned by it and
//           may always be used.
//   Rule 2: an empty slot owned by another NI may be used when the
//           destination is reached no later than the slot's owner, so the
//           packet has left the slot before the owner sees it again.
// Both rules reduce to one comparison of hop counts along the ring
// (1..N_NODES, the owner of the current slot being N_NODES hops away from
// itself): hops(this, dest) <= hops(this, owner), with the slot free. A free
// slot is an empty one or one that is being delivered at this NI in this
// cycle. The two rules come from the design; counting a slot emptied by a
// delivery here as free in the same cycle is this design's choice. Purely
// combinational; grant_own/grant_borrow tell which rule granted.
module ni_arbiter #(
  parameter int unsigned N_NODES = ring_pkg::N_NODES_DEF,
  parameter int unsigned NODE_ID = 0,
  localparam int unsigned ID_W = ring_pkg::id_width(N_NODES)
) (
  input  logic            slot_free,
  input  logic [ID_W-1:0] slot_id,
  input  logic            req_valid,
  input  logic [ID_W-1:0] req_dest,
  output logic            grant,
  output logic            grant_own,
  output logic            grant_borrow
);

  int unsigned dest_hops, owner_hops;
  logic        own, reach_ok;

  always_comb begin
    dest_hops    = ring_pkg::hops(NODE_ID, int'(req_dest), N_NODES);
    owner_hops   = ring_pkg::hops(NODE_ID, int'(slot_id), N_NODES);
    own          = (slot_id == ID_W'(NODE_ID));
    reach_ok     = (dest_hops <= owner_hops);
    grant        = req_valid && slot_free && reach_ok;
    grant_own    = grant && own;
    grant_borrow = grant && !own;
  end

endmodule
