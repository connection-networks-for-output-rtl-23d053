// wl_system: testbench harness for workload runs. One list_multiprocessor
// of 2**STAGES processors and memories, one stochastic processor model per
// processor, random memory readiness, and the sums of the processors'
// statistics. Utilisation is counted as in the evaluation: cycles in which a
// processor completes a transaction or is idle, over those plus the cycles
// it waits (RSVP answer, NEW cell) or is blocked (Outgoing latch full).
module wl_system
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        run,
  input  int unsigned trans [4][4],
  input  int unsigned locality,        // per mille
  input  int unsigned responsiveness,  // per mille: chance a memory may supply a cell
  output int unsigned tot_active,      // transactions + idle cycles
  output int unsigned tot_wait,
  output int unsigned tot_block,
  output int unsigned tot_new,
  output int unsigned tot_new_local,
  output int unsigned tot_new_second,  // from each processor's most frequent other memory
  output int unsigned tot_rsvp,
  output int unsigned tot_failures,
  output logic        all_ids
);

  localparam int unsigned N = 1 << STAGES;

  logic              req_valid [N];
  op_e               req_op    [N];
  logic [STAGES-1:0] req_dest  [N];
  logic [CELL_W-1:0] req_cidx  [N];
  logic [DATA_W-1:0] req_data  [N];
  logic              req_ready [N], resp_valid [N];
  op_e               resp_op   [N];
  logic [STAGES-1:0] resp_mem  [N];
  logic [CELL_W-1:0] resp_cidx [N];
  logic [DATA_W-1:0] resp_data [N];
  logic              id_valid  [N];
  logic [STAGES-1:0] id        [N];
  pstat_e            status    [N];
  logic supply_en [N], did_sting [N], did_rsvp [N], rsvp_blocked [N], did_new [N], exhausted [N];

  int unsigned a_act [N], a_wait [N], a_block [N], a_new [N], a_loc [N], a_sec [N], a_rsvp [N], a_fail [N];

  list_multiprocessor #(.STAGES(STAGES)) u_sys (.*);

  always @(posedge clk)
    for (int k = 0; k < N; k++) supply_en[k] <= ($urandom_range(999) < responsiveness);

  for (genvar k = 0; k < N; k++) begin : g_lpu
    lpu_model #(.STAGES(STAGES)) u_lpu (
      .clk(clk), .rst_n(rst_n), .run(run), .trans(trans), .locality(locality),
      .dest_mask('1), .checking(1'b0),
      .req_valid(req_valid[k]), .req_op(req_op[k]), .req_dest(req_dest[k]),
      .req_cidx(req_cidx[k]), .req_data(req_data[k]), .req_ready(req_ready[k]),
      .resp_valid(resp_valid[k]), .resp_op(resp_op[k]), .resp_mem(resp_mem[k]),
      .resp_cidx(resp_cidx[k]), .resp_data(resp_data[k]), .id_valid(id_valid[k]),
      .id(id[k]), .status(status[k])
    );
    assign a_act[k]   = u_lpu.n_new + u_lpu.n_sting + u_lpu.n_rsvp + u_lpu.n_idle;
    assign a_wait[k]  = u_lpu.n_wait;
    assign a_block[k] = u_lpu.n_block;
    assign a_new[k]   = u_lpu.n_new;
    assign a_loc[k]   = u_lpu.n_new_local;
    assign a_sec[k]   = u_lpu.n_new_second;
    assign a_rsvp[k]  = u_lpu.n_rsvp;
    assign a_fail[k]  = u_lpu.failures;
  end

  always_comb begin
    tot_active = 0; tot_wait = 0; tot_block = 0; tot_new = 0; tot_new_local = 0; tot_new_second = 0;
    tot_rsvp = 0; tot_failures = 0; all_ids = 1'b1;
    for (int k = 0; k < N; k++) begin
      tot_active    += a_act[k];
      tot_wait      += a_wait[k];
      tot_block     += a_block[k];
      tot_new       += a_new[k];
      tot_new_local += a_loc[k];
      tot_new_second += a_sec[k];
      tot_rsvp      += a_rsvp[k];
      tot_failures  += a_fail[k];
      all_ids &= id_valid[k];
    end
  end

endmodule
