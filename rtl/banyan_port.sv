// banyan_port: one port of the banyan network, the storage between two
// agents (a processor and a switch, two switches, or a switch and a memory).
//
// It holds three latches of one packet each: Outgoing (travelling towards
// the memories), Incoming (answers travelling towards the processors) and
// New (allocated cells held in the NEW-sink). A latch is loaded only while it
// is empty and emptied only while it is full, so a latch freed in one cycle
// can be refilled in the next one at the earliest: every decision an agent
// takes looks at the latch contents registered at the start of the cycle.
//
// Interface: `below` carries the commands of the agent on the processor side
// (load Outgoing, take Incoming, take New); `above` those of the agent on the
// memory side (take Outgoing, load Incoming, load New). `state` shows all
// three latches to both agents. Reset empties all latches.
//
// The three one-packet latches and the sense-then-transfer cycle follow the
// source model; the control bundles and the reset are this design's choice.
module banyan_port
  import banyan_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  below_ctl_t  below,
  input  above_ctl_t  above,
  output port_state_t state
);

  port_state_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      if (below.o_load)      begin q.o_v <= 1'b1; q.o <= below.o_din; end
      else if (above.o_take) begin q.o_v <= 1'b0; end
      if (above.i_load)      begin q.i_v <= 1'b1; q.i <= above.i_din; end
      else if (below.i_take) begin q.i_v <= 1'b0; end
      if (above.n_load)      begin q.n_v <= 1'b1; q.n <= above.n_din; end
      else if (below.n_take) begin q.n_v <= 1'b0; end
    end
  end

  assign state = q;

  // Handshake rules of the medium: load an empty latch, empty a full one.
  a_o_load : assert property (@(posedge clk) disable iff (!rst_n) below.o_load |-> !q.o_v);
  a_o_take : assert property (@(posedge clk) disable iff (!rst_n) above.o_take |-> q.o_v);
  a_i_load : assert property (@(posedge clk) disable iff (!rst_n) above.i_load |-> !q.i_v);
  a_i_take : assert property (@(posedge clk) disable iff (!rst_n) below.i_take |-> q.i_v);
  a_n_load : assert property (@(posedge clk) disable iff (!rst_n) above.n_load |-> !q.n_v);
  a_n_take : assert property (@(posedge clk) disable iff (!rst_n) below.n_take |-> q.n_v);

endmodule
