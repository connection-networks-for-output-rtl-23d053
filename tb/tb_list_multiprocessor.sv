// tb_list_multiprocessor: end-to-end test of the whole system at its
// default size (16 processors, 16 memories, 4 stages, 256 cells per
// memory), driven by one stochastic processor model per processor.
//  A. Start-up: every processor must learn its own column as its id (new
//     cells flow straight across an empty network).
//  B. One processor alone doing RSVPs: every round trip must take exactly
//     2*STAGES+2 cycles.
//  C. All processors, mixed traffic with RSVP factor r = 0.7 (transition
//     matrix of the evaluation), 100% checked: STINGed cells read back
//     right, answers return to the sender with the right memory and cell.
//  D. All processors doing only NEWs until every memory has handed out all
//     its cells: no cell may be handed out twice, every memory must report
//     exhaustion, and nearly all cells must reach a processor.
// It counts how often each mechanism happened and fails if one never did:
// STING/RSVP blocked by a full Outgoing latch, RSVP held at a memory by a
// full Incoming latch, processor waiting for a NEW cell, cell received from
// a non-associated memory (diagonal NEW-sink transfer), memory exhaustion.
module tb_list_multiprocessor;
  import banyan_pkg::*;

  localparam int S = 4;
  localparam int N = 1 << S;
  localparam int CELLS = 256;

  logic clk = 0, rst_n = 0;
  logic              req_valid [N];
  op_e               req_op    [N];
  logic [S-1:0]      req_dest  [N];
  logic [CELL_W-1:0] req_cidx  [N];
  logic [DATA_W-1:0] req_data  [N];
  logic              req_ready [N], resp_valid [N];
  op_e               resp_op   [N];
  logic [S-1:0]      resp_mem  [N];
  logic [CELL_W-1:0] resp_cidx [N];
  logic [DATA_W-1:0] resp_data [N];
  logic              id_valid  [N];
  logic [S-1:0]      id        [N];
  pstat_e            status    [N];
  logic supply_en [N], did_sting [N], did_rsvp [N], rsvp_blocked [N], did_new [N], exhausted [N];

  list_multiprocessor dut (.*);

  always #5 clk = ~clk;

  // stimulus controls
  logic        run [N];
  logic        checking;
  int unsigned trans [4][4];
  int unsigned locality;
  logic [S-1:0] dest_mask;
  int unsigned lpu_rsvp [N], lpu_checks [N], lpu_failures [N];

  for (genvar k = 0; k < N; k++) begin : g_lpu
    lpu_model #(.STAGES(S)) u_lpu (
      .clk(clk), .rst_n(rst_n), .run(run[k]), .trans(trans), .locality(locality), .dest_mask(dest_mask),
      .checking(checking),
      .req_valid(req_valid[k]), .req_op(req_op[k]), .req_dest(req_dest[k]),
      .req_cidx(req_cidx[k]), .req_data(req_data[k]), .req_ready(req_ready[k]),
      .resp_valid(resp_valid[k]), .resp_op(resp_op[k]), .resp_mem(resp_mem[k]),
      .resp_cidx(resp_cidx[k]), .resp_data(resp_data[k]), .id_valid(id_valid[k]),
      .id(id[k]), .status(status[k])
    );
    assign lpu_rsvp[k]     = u_lpu.n_rsvp;
    assign lpu_checks[k]   = u_lpu.checks;
    assign lpu_failures[k] = u_lpu.failures;
  end

  int checks = 0, failures = 0;
  int ev_proc_blocked = 0, ev_mem_blocked = 0, ev_new_wait = 0, ev_new_remote = 0;
  int ev_exhausted = 0, ev_sting = 0, ev_rsvp = 0, ev_new = 0, cells_given = 0, cells_got = 0;
  bit seen [N][CELLS];
  int given [N];

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  task automatic set_matrix(int r);   // r in per mille; the mixed-message matrix
    trans[0] = '{0, 1000 - r, 0, r};
    trans[1] = '{0, 0, 1000, 0};
    trans[2] = '{0, (1000 - r) / 2, (1000 - r) / 2, r};
    trans[3] = '{0, (1000 - r) / 2, (1000 - r) / 2, r};
  endtask

  // event monitor
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < N; k++) begin
      if (status[k] == PS_BLOCKED) ev_proc_blocked++;
      if (status[k] == PS_WAITING && req_valid[k] && req_op[k] == OP_NEW) ev_new_wait++;
      if (rsvp_blocked[k]) ev_mem_blocked++;
      if (did_sting[k]) ev_sting++;
      if (did_rsvp[k]) ev_rsvp++;
      if (did_new[k]) begin cells_given++; given[k]++; end
      if (resp_valid[k] && resp_op[k] == OP_NEW) begin
        cells_got++;
        if (resp_mem[k] != id[k]) ev_new_remote++;
        checks++;
        if (seen[resp_mem[k]][resp_cidx[k]]) begin
          failures++; $display("cell %0d/%0d handed out twice", resp_mem[k], resp_cidx[k]);
        end
        seen[resp_mem[k]][resp_cidx[k]] = 1;
      end
    end
  end

  int unsigned tot;

  initial begin
    for (int k = 0; k < N; k++) begin run[k] = 0; supply_en[k] = 1; given[k] = 0; end
    for (int m = 0; m < N; m++) for (int c = 0; c < CELLS; c++) seen[m][c] = 0;
    checking = 1; locality = 0; dest_mask = '1;
    set_matrix(1000);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- A: start-up
    repeat (2 * S + 4) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      chk("id valid", id_valid[k], 1);
      chk("id is own column", int'(id[k]), k);
    end

    // ---- B: lone processor, RSVPs only
    run[0] = 1;
    repeat (400) @(negedge clk);
    run[0] = 0;
    repeat (4 * S) @(negedge clk);
    chk("B: rsvps done", int'(g_lpu[0].u_lpu.n_rsvp > 10), 1);
    chk("B: min round trip", int'(g_lpu[0].u_lpu.rsvp_lat_min), 2 * S + 2);
    chk("B: max round trip", int'(g_lpu[0].u_lpu.rsvp_lat_max), 2 * S + 2);

    // ---- C: mixed traffic, r = 0.7, everything checked
    set_matrix(700);
    locality = 500;
    for (int k = 0; k < N; k++) run[k] = 1;
    repeat (3000) @(negedge clk);
    for (int k = 0; k < N; k++) run[k] = 0;
    repeat (6 * S) @(negedge clk);
    tot = 0;
    for (int k = 0; k < N; k++) tot += lpu_rsvp[k];
    $display("C: %0d RSVPs, %0d STINGs absorbed, %0d cells taken", tot, ev_sting, cells_got);
    chk("C: traffic", int'(tot > 1000 && ev_sting > 300 && cells_got > 300), 1);

    // ---- C2: RSVPs only, all to memories 0 and 8 (one top-stage switch)
    set_matrix(1000);
    locality = 0;
    dest_mask = S'(1 << (S - 1));
    for (int k = 0; k < N; k++) run[k] = 1;
    repeat (1000) @(negedge clk);
    for (int k = 0; k < N; k++) run[k] = 0;
    repeat (6 * S) @(negedge clk);
    dest_mask = '1;

    // ---- D: NEWs only until the store is used up
    set_matrix(0);
    for (int k = 0; k < 4; k++) trans[k] = '{0, 1000, 0, 0};
    checking = 0;
    for (int k = 0; k < N; k++) run[k] = 1;
    repeat (3000) @(negedge clk);
    for (int k = 0; k < N; k++) if (given[k] != CELLS) $display("memory %0d handed out %0d cells", k, given[k]);
    for (int k = 0; k < N; k++) begin
      chk("D: memory exhausted", exhausted[k], 1);
      ev_exhausted += int'(exhausted[k]);
    end
    chk("D: all cells allocated", cells_given, N * CELLS);
    // cells not received are the N start-up cells and those still in New latches
    chk("D: cells received", int'(cells_got + N <= N * CELLS && cells_got + N >= N * CELLS - (S + 1) * N), 1);

    // ---- mechanisms
    $display("mechanisms: proc blocked %0d, memory RSVP held %0d, NEW waits %0d, non-local cells %0d, exhausted %0d",
             ev_proc_blocked, ev_mem_blocked, ev_new_wait, ev_new_remote, ev_exhausted);
    chk("seen: processor blocked", int'(ev_proc_blocked > 0), 1);
    chk("seen: RSVP held at memory", int'(ev_mem_blocked > 0), 1);
    chk("seen: NEW wait", int'(ev_new_wait > 0), 1);
    chk("seen: non-local NEW cell", int'(ev_new_remote > 0), 1);
    chk("seen: memory exhausted", int'(ev_exhausted > 0), 1);

    // the processor models' own checks
    for (int k = 0; k < N; k++) begin
      checks   += lpu_checks[k];
      failures += lpu_failures[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
