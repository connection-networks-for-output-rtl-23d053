// list_multiprocessor: processor-memory communication system of a list
// multiprocessor. N = 2**STAGES processor interfaces reach N memory agents
// through a STAGES-stage banyan packet-switching network.
//
// Processors make three kinds of request of the shared list store: RSVP
// (fetch a cell, wait for its contents), STING (store into a cell, no answer)
// and NEW (obtain the address of a free cell). RSVPs and STINGs travel up
// the Outgoing plane to the memory named by req_dest; RSVP answers come back
// down the Incoming plane to whichever processor sent them, found from the
// path the request took. NEW requests are never sent: memories keep pushing
// free cells down the New plane into every empty New latch (the NEW-sink),
// so a processor usually finds a cell already waiting in its own port.
//
// A cell is named by (memory index, cell index): resp_mem and resp_cidx of a
// NEW answer, req_dest and req_cidx of a later STING or RSVP.
//
// Interface: one request/response channel per processor (see proc_port_if),
// its identity learnt at start-up, and its per-cycle status; per memory a
// supply enable and event flags (see memory_agent). Default size: 16
// processors and 16 memories, the size of the evaluated system.
//
// The overall structure (processors, banyan network, memories) follows the
// source model; the processors themselves are outside this design, and
// their request channels are the ports of this module. Timing: see
// proc_port_if; an unloaded RSVP takes 2*STAGES+2 cycles.
module list_multiprocessor
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  parameter int unsigned CELLS  = 256,
  localparam int unsigned N     = 1 << STAGES
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors
  input  logic              req_valid  [N],
  input  op_e               req_op     [N],
  input  logic [STAGES-1:0] req_dest   [N],
  input  logic [CELL_W-1:0] req_cidx   [N],
  input  logic [DATA_W-1:0] req_data   [N],
  output logic              req_ready  [N],
  output logic              resp_valid [N],
  output op_e               resp_op    [N],
  output logic [STAGES-1:0] resp_mem   [N],
  output logic [CELL_W-1:0] resp_cidx  [N],
  output logic [DATA_W-1:0] resp_data  [N],
  output logic              id_valid   [N],
  output logic [STAGES-1:0] id         [N],
  output pstat_e            status     [N],
  // memories
  input  logic              supply_en    [N],
  output logic              did_sting    [N],
  output logic              did_rsvp     [N],
  output logic              rsvp_blocked [N],
  output logic              did_new      [N],
  output logic              exhausted    [N]
);

  below_ctl_t  proc_ctl  [N];
  port_state_t proc_port [N];
  above_ctl_t  mem_ctl   [N];
  port_state_t mem_port  [N];

  banyan_network #(.STAGES(STAGES)) u_net (
    .clk      (clk),
    .rst_n    (rst_n),
    .proc_ctl (proc_ctl),
    .proc_port(proc_port),
    .mem_ctl  (mem_ctl),
    .mem_port (mem_port)
  );

  for (genvar k = 0; k < N; k++) begin : g_agent
    proc_port_if #(.STAGES(STAGES)) u_pif (
      .clk       (clk),
      .rst_n     (rst_n),
      .port      (proc_port[k]),
      .ctl       (proc_ctl[k]),
      .req_valid (req_valid[k]),
      .req_op    (req_op[k]),
      .req_dest  (req_dest[k]),
      .req_cidx  (req_cidx[k]),
      .req_data  (req_data[k]),
      .req_ready (req_ready[k]),
      .resp_valid(resp_valid[k]),
      .resp_op   (resp_op[k]),
      .resp_mem  (resp_mem[k]),
      .resp_cidx (resp_cidx[k]),
      .resp_data (resp_data[k]),
      .id_valid  (id_valid[k]),
      .id        (id[k]),
      .status    (status[k])
    );

    memory_agent #(.CELLS(CELLS)) u_mem (
      .clk         (clk),
      .rst_n       (rst_n),
      .port        (mem_port[k]),
      .supply_en   (supply_en[k]),
      .ctl         (mem_ctl[k]),
      .did_sting   (did_sting[k]),
      .did_rsvp    (did_rsvp[k]),
      .rsvp_blocked(rsvp_blocked[k]),
      .did_new     (did_new[k]),
      .exhausted   (exhausted[k])
    );
  end

endmodule
