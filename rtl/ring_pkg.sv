// ring_pkg: constants and helpers shared by the slotted ring.
//
// The ring moves one slot per NI per clock. A slot carries a valid bit, the
// number of the slot (which is also the number of the NI that owns it), the
// destination NI, a word address inside the destination's data memory and
// one data word. Default sizes: 16 NIs and 32-bit words, as in the 16-core
// system the ring was built for; the 11-bit remote address (8 KiB of local
// data memory) and the 4-entry input buffer are this design's own choices.
package ring_pkg;

  localparam int unsigned N_NODES_DEF   = 16;
  localparam int unsigned DATA_W_DEF    = 32;
  localparam int unsigned ADDR_W_DEF    = 11;
  localparam int unsigned BUF_DEPTH_DEF = 4;
  localparam int unsigned IMEM_WORDS_DEF = 2048;

  // Width of a node or slot number.
  function automatic int unsigned id_width(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n);
  endfunction

  // Width of a slot on the ring: valid, slot id, destination, address, data.
  function automatic int unsigned slot_width(input int unsigned n, input int unsigned aw,
                                             input int unsigned dw);
    return 1 + 2 * id_width(n) + aw + dw;
  endfunction

  // Hops from NI 'from' to NI 'to' going downstream, in 1..n. A node is n
  // hops away from itself: a slot returns to its owner after a full turn.
  function automatic int unsigned hops(input int unsigned from, input int unsigned to,
                                       input int unsigned n);
    return (to > from) ? (to - from) : (to + n - from);
  endfunction

endpackage
