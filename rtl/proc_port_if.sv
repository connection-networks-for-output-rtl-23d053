// proc_port_if: the network interface of one processor (list processing
// unit), attached to its port in the bottom row of the banyan network.
//
// The processor presents one request at a time (req_valid, req_op and the
// operands) and keeps it until req_ready. The interface
//   * NEW: takes the cell waiting in the port's New latch (the NEW-sink) and
//     returns it at once as (resp_mem, resp_cidx); if the latch is empty the
//     processor waits.
//   * STING: loads the Outgoing latch with a store packet for memory
//     req_dest; blocked while the latch is still full. No answer comes back.
//   * RSVP: loads the Outgoing latch with a fetch packet, then waits until
//     the answer arrives in the Incoming latch and returns its data. No other
//     request is accepted meanwhile: the processor waits for each fetch.
// After reset the interface first takes one cell from the NEW-sink before it
// accepts requests. Since new cells flow straight across an empty network,
// the index of the memory that sent it is the processor's own column; it is
// kept as `id` ("associated memory") for local references. This start-up
// step and the request kinds follow the source model; the request/response
// handshake is this design's choice.
//
// Timing: NEW and STING complete in the cycle they are accepted; an RSVP
// answer comes back 2*STAGES+2 cycles after the request is accepted when
// nothing is in its way (STAGES hops up, one cycle in the memory, STAGES
// hops down, one cycle to reach the processor's port). resp_valid is
// combinational from the port; `status` classifies every cycle for
// utilisation counts (idle, active, waiting, blocked).
module proc_port_if
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  port_state_t       port,
  output below_ctl_t        ctl,
  // request from the processor
  input  logic              req_valid,
  input  op_e               req_op,
  input  logic [STAGES-1:0] req_dest,
  input  logic [CELL_W-1:0] req_cidx,
  input  logic [DATA_W-1:0] req_data,
  output logic              req_ready,
  // response (NEW cell or RSVP answer)
  output logic              resp_valid,
  output op_e               resp_op,
  output logic [STAGES-1:0] resp_mem,
  output logic [CELL_W-1:0] resp_cidx,
  output logic [DATA_W-1:0] resp_data,
  // identity learnt at start-up
  output logic              id_valid,
  output logic [STAGES-1:0] id,
  output pstat_e            status
);

  typedef enum logic [1:0] {S_INIT, S_READY, S_FETCH} state_e;
  state_e state, state_d;

  always_comb begin
    ctl        = '0;
    req_ready  = 1'b0;
    resp_valid = 1'b0;
    resp_op    = OP_NEW;
    resp_mem   = '0;
    resp_cidx  = '0;
    resp_data  = '0;
    status     = PS_IDLE;
    state_d    = state;
    unique case (state)
      S_INIT: begin
        if (port.n_v) begin
          ctl.n_take = 1'b1;
          state_d    = S_READY;
        end
      end
      S_READY: begin
        if (req_valid) begin
          unique case (req_op)
            OP_NEW: begin
              if (port.n_v) begin
                ctl.n_take = 1'b1;
                req_ready  = 1'b1;
                resp_valid = 1'b1;
                resp_op    = OP_NEW;
                resp_mem   = port.n.addr[STAGES-1:0];
                resp_cidx  = port.n.cidx;
                status     = PS_ACTIVE;
              end else begin
                status = PS_WAITING;
              end
            end
            OP_STING, OP_RSVP: begin
              if (!port.o_v) begin
                ctl.o_load         = 1'b1;
                ctl.o_din.rsvp     = (req_op == OP_RSVP);
                ctl.o_din.addr     = addr_t'(req_dest);
                ctl.o_din.cidx     = req_cidx;
                ctl.o_din.data     = req_data;
                req_ready          = 1'b1;
                status             = PS_ACTIVE;
                if (req_op == OP_RSVP) state_d = S_FETCH;
              end else begin
                status = PS_BLOCKED;
              end
            end
            default: ;
          endcase
        end
      end
      S_FETCH: begin
        if (port.i_v) begin
          ctl.i_take = 1'b1;
          resp_valid = 1'b1;
          resp_op    = OP_RSVP;
          resp_mem   = port.i.addr[STAGES-1:0];
          resp_cidx  = port.i.cidx;
          resp_data  = port.i.data;
          status     = PS_ACTIVE;
          state_d    = S_READY;
        end else begin
          status = PS_WAITING;
        end
      end
      default: state_d = S_INIT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_INIT;
      id_valid <= 1'b0;
      id       <= '0;
    end else begin
      state <= state_d;
      if (state == S_INIT && port.n_v) begin
        id_valid <= 1'b1;
        id       <= port.n.addr[STAGES-1:0];
      end
    end
  end

  // A fetch is answered only while one is outstanding.
  a_no_stray_answer : assert property (@(posedge clk) disable iff (!rst_n)
    port.i_v |-> state == S_FETCH);

endmodule
