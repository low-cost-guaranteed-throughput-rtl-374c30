// ni_buffer: the small input buffer at the local port of a network interface.
//
// A synchronous FIFO of DEPTH entries, each a tuple {destination NI, remote
// word address, data word} written by the tile's CPU. The arbitration logic
// pops the head when it injects it onto the ring. When the buffer is full
// the CPU's write is refused and the CPU stalls until an entry leaves; a push
// is refused while full even if a pop happens in the same cycle, so 'full'
// does not depend on the ring arbitration. A pushed entry is visible at the
// head one cycle later. The buffer and its depth parameter follow the
// design; the depth value, the full-refusal rule and the synchronous
// active-low reset are this design's choices.
module ni_buffer #(
  parameter int unsigned DEPTH = ring_pkg::BUF_DEPTH_DEF,
  parameter int unsigned WIDTH = 47,
  localparam int unsigned PW = (DEPTH < 2) ? 1 : $clog2(DEPTH),
  localparam int unsigned CW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             full,
  input  logic             pop,
  output logic             head_valid,
  output logic [WIDTH-1:0] head_data
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [CW-1:0]    count;
  logic             do_push, do_pop;

  assign full       = (count == CW'(DEPTH));
  assign head_valid = (count != '0);
  assign head_data  = mem[rd_ptr];
  assign do_push    = push && !full;
  assign do_pop     = pop && head_valid;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= next_ptr(wr_ptr);
      if (do_pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= push_data;
  end

  // The arbiter only pops a head that exists.
  always_ff @(posedge clk) begin
    if (rst_n) assert (!(pop && !head_valid)) else $error("ni_buffer: pop while empty");
  end

endmodule
