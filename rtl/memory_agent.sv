// memory_agent: a memory module of the list store, attached to one port of
// the top row of the banyan network.
//
// In every cycle it does at most one thing, chosen from the port contents:
//   * Outgoing latch holds a STING: absorb it and write its data word into
//     cell `cidx`. No acknowledgement is sent.
//   * Outgoing latch holds an RSVP: if the Incoming latch is empty, absorb it
//     and load the Incoming latch with an answer carrying the contents of
//     cell `cidx` and the request's return address. If the Incoming latch is
//     full the RSVP waits and nothing else is done.
//   * Outgoing latch empty: if the New latch is empty, `supply_en` is high
//     and a free cell is left, allocate a cell and place it in the New latch
//     with address 0 (the switches fill in the path on the way down). This is
//     how the memory feeds the NEW-sink.
// That priority order follows the source model. The cell store, its size and
// the allocator (a counter handing out cells 0, 1, 2, ... until CELLS are
// used; cells are never reclaimed because reclamation is not part of the
// design) are this design's choice. `supply_en` stands for the memory's
// readiness to produce new cells (the "memory responsiveness" of the
// evaluation); tie it high for a memory that is always ready.
//
// The store is reset to zero. Reads are asynchronous, so an answer is in
// the Incoming latch one cycle after the RSVP reached the memory's port.
module memory_agent
  import banyan_pkg::*;
#(
  parameter int unsigned CELLS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  port_state_t port,
  input  logic        supply_en,
  output above_ctl_t  ctl,
  output logic        did_sting,    // a STING was absorbed this cycle
  output logic        did_rsvp,     // an RSVP was answered
  output logic        rsvp_blocked, // an RSVP waited for the Incoming latch
  output logic        did_new,      // a new cell was put into the NEW-sink
  output logic        exhausted     // every cell has been handed out
);

  localparam int unsigned CW = $clog2(CELLS + 1);

  logic [DATA_W-1:0] store [CELLS];
  logic [CW-1:0]     next_free;

  assign exhausted = (next_free == CW'(CELLS));

  always_comb begin
    ctl          = '0;
    did_sting    = 1'b0;
    did_rsvp     = 1'b0;
    rsvp_blocked = 1'b0;
    did_new      = 1'b0;
    if (port.o_v) begin
      if (!port.o.rsvp) begin
        ctl.o_take = 1'b1;
        did_sting  = 1'b1;
      end else if (!port.i_v) begin
        ctl.o_take      = 1'b1;
        ctl.i_load      = 1'b1;
        ctl.i_din       = port.o;
        ctl.i_din.data  = store[port.o.cidx[$clog2(CELLS)-1:0]];
        did_rsvp        = 1'b1;
      end else begin
        rsvp_blocked = 1'b1;
      end
    end else if (!port.n_v && supply_en && !exhausted) begin
      ctl.n_load      = 1'b1;
      ctl.n_din       = '0;
      ctl.n_din.cidx  = CELL_W'(next_free);
      did_new         = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_free <= '0;
      for (int k = 0; k < CELLS; k++) store[k] <= '0;
    end else begin
      if (did_sting) store[port.o.cidx[$clog2(CELLS)-1:0]] <= port.o.data;
      if (did_new)   next_free <= next_free + 1'b1;
    end
  end

  initial assert (CELLS >= 2 && CELLS <= (1 << CELL_W))
    else $error("memory_agent: CELLS must fit the cell index field");

endmodule
