// lpu_model: behavioural stand-in for a list processing unit, used only by
// testbenches. Not synthesizable design content.
//
// It behaves as the stochastic processor of the evaluation: a Markov chain
// over the states IDLE, NEW, STING and RSVP with a 4x4 transition matrix
// given in parts per thousand (row = current state). Each state is one
// request to the processor interface, held until accepted; an RSVP then
// waits for its answer. With probability `locality` (per mille) a request
// goes to the processor's associated memory (its id), else to a random one
// (restricted by dest_mask, to create hot spots).
//
// With `checking` set it also checks the store: it remembers up to OWN_MAX
// cells it was given by NEW, STINGs only into those (as a process may only
// update cells it alone references), and compares RSVP answers from them
// with what it stored. Other RSVPs go to random cells and only their return
// memory index and cell index are checked. It counts completed transactions
// and idle, waiting and blocked cycles.
module lpu_model
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES  = 4,
  parameter int unsigned OWN_MAX = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  int unsigned       trans [4][4],
  input  int unsigned       locality,
  input  logic [STAGES-1:0] dest_mask,  // random destinations are ANDed with it
  input  logic              checking,
  output logic              req_valid,
  output op_e               req_op,
  output logic [STAGES-1:0] req_dest,
  output logic [CELL_W-1:0] req_cidx,
  output logic [DATA_W-1:0] req_data,
  input  logic              req_ready,
  input  logic              resp_valid,
  input  op_e               resp_op,
  input  logic [STAGES-1:0] resp_mem,
  input  logic [CELL_W-1:0] resp_cidx,
  input  logic [DATA_W-1:0] resp_data,
  input  logic              id_valid,
  input  logic [STAGES-1:0] id,
  input  pstat_e            status
);

  localparam int unsigned N = 1 << STAGES;
  typedef enum int {M_IDLE = 0, M_NEW = 1, M_STING = 2, M_RSVP = 3} mstate_e;

  // statistics and checking (read by the testbench)
  int unsigned n_new, n_sting, n_rsvp, n_idle, n_wait, n_block, n_cycles;
  int unsigned n_new_local, n_new_remote;
  int unsigned from_cnt [N];       // NEW cells received per sending memory
  int unsigned n_new_second;       // cells from the most frequent non-associated memory
  int unsigned checks, failures;
  int unsigned rsvp_lat_min, rsvp_lat_max;

  // cells owned by this processor
  logic [STAGES-1:0] own_mem  [OWN_MAX];
  logic [CELL_W-1:0] own_cidx [OWN_MAX];
  logic [DATA_W-1:0] own_val  [OWN_MAX];
  int unsigned       own_cnt, own_next;

  always_comb begin
    n_new_second = 0;
    for (int m = 0; m < N; m++)
      if (m != int'(id) && from_cnt[m] > n_new_second) n_new_second = from_cnt[m];
  end

  mstate_e           mstate;
  logic              busy;         // current request not yet accepted
  logic              fetching;     // RSVP accepted, answer pending
  logic              exp_check;    // answer data must match exp_val
  logic [DATA_W-1:0] exp_val;
  logic [STAGES-1:0] exp_mem;
  logic [CELL_W-1:0] exp_cidx;
  int unsigned       lat;

  function automatic mstate_e next_state(mstate_e s);
    int unsigned x = $urandom_range(999);
    int unsigned acc = 0;
    for (int k = 0; k < 4; k++) begin
      acc += trans[int'(s)][k];
      if (x < acc) return mstate_e'(k);
    end
    return s;
  endfunction

  function automatic logic [STAGES-1:0] pick_dest();
    if ($urandom_range(999) < locality) return id;
    return STAGES'($urandom_range(N - 1)) & dest_mask;
  endfunction

  // set up the request for state s
  task automatic start(mstate_e s_in);
    int unsigned k;
    mstate_e s = run ? s_in : M_IDLE;   // stopped: finish what is open, start nothing
    mstate    <= s;
    req_op    <= OP_NEW;
    req_dest  <= '0;
    req_cidx  <= '0;
    req_data  <= '0;
    exp_check <= 1'b0;
    busy      <= (s != M_IDLE);
    req_valid <= (s != M_IDLE);
    case (s)
      M_NEW: req_op <= OP_NEW;
      M_STING: begin
        req_op   <= OP_STING;
        req_data <= DATA_W'($urandom);
        if (checking && own_cnt > 0) begin
          k = $urandom_range(own_cnt - 1);
          req_dest <= own_mem[k];
          req_cidx <= own_cidx[k];
        end else if (checking) begin
          req_valid <= 1'b0;   // nothing of its own to store into: stay idle
          busy      <= 1'b0;
          mstate    <= M_IDLE;
        end else begin
          req_dest <= pick_dest();
          req_cidx <= CELL_W'($urandom);
        end
      end
      M_RSVP: begin
        req_op <= OP_RSVP;
        if (checking && own_cnt > 0 && $urandom_range(1) == 1) begin
          k = $urandom_range(own_cnt - 1);
          req_dest  <= own_mem[k];
          req_cidx  <= own_cidx[k];
          exp_check <= 1'b1;
          exp_val   <= own_val[k];
        end else begin
          req_dest <= pick_dest();
          req_cidx <= CELL_W'($urandom);
        end
      end
      default: ;
    endcase
  endtask

  // own_* are updated with blocking assignments so that a request chosen
  // in the same cycle sees the latest values.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid <= 1'b0; req_op <= OP_NEW; req_dest <= '0; req_cidx <= '0; req_data <= '0;
      mstate <= M_IDLE; busy <= 1'b0; fetching <= 1'b0; exp_check <= 1'b0;
      exp_val <= '0; exp_mem <= '0; exp_cidx <= '0; lat <= 0;
      n_new <= 0; n_sting <= 0; n_rsvp <= 0; n_idle <= 0; n_wait <= 0; n_block <= 0;
      n_cycles <= 0; n_new_local <= 0; n_new_remote <= 0; checks <= 0; failures <= 0;
      rsvp_lat_min <= '1; rsvp_lat_max <= 0;
      for (int m = 0; m < N; m++) from_cnt[m] <= 0; own_cnt = 0; own_next = 0;
    end else if (id_valid) begin
      if (run) begin
        n_cycles <= n_cycles + 1;
        case (status)
          PS_WAITING: n_wait  <= n_wait + 1;
          PS_BLOCKED: n_block <= n_block + 1;
          default: ;
        endcase
      end
      if (fetching) begin
        lat <= lat + 1;
        if (resp_valid) begin
          fetching <= 1'b0;
          n_rsvp   <= n_rsvp + 1;
          if (lat + 1 < rsvp_lat_min) rsvp_lat_min <= lat + 1;
          if (lat + 1 > rsvp_lat_max) rsvp_lat_max <= lat + 1;
          checks <= checks + 1;
          if (resp_op != OP_RSVP || resp_mem != exp_mem || resp_cidx != exp_cidx ||
              (exp_check && resp_data != exp_val)) begin
            failures <= failures + 1;
            $display("lpu %0d: bad RSVP answer mem %0d cell %0d data %h (want %0d %0d %h chk %0b)",
                     id, resp_mem, resp_cidx, resp_data, exp_mem, exp_cidx, exp_val, exp_check);
          end
          start(next_state(M_RSVP));
        end
      end else if (!busy) begin
        if (run) n_idle <= n_idle + 1;
        start(next_state(mstate));
      end else if (req_ready) begin
        req_valid <= 1'b0;
        busy      <= 1'b0;
        case (mstate)
          M_NEW: begin
            n_new <= n_new + 1;
            from_cnt[resp_mem] <= from_cnt[resp_mem] + 1;
            if (resp_mem == id) n_new_local <= n_new_local + 1;
            else                n_new_remote <= n_new_remote + 1;
            own_mem[own_next]  = resp_mem;
            own_cidx[own_next] = resp_cidx;
            own_val[own_next]  = '0;
            own_next = (own_next + 1) % OWN_MAX;
            if (own_cnt < OWN_MAX) own_cnt = own_cnt + 1;
            start(next_state(M_NEW));
          end
          M_STING: begin
            n_sting <= n_sting + 1;
            for (int k = 0; k < OWN_MAX; k++)
              if (k < own_cnt && own_mem[k] == req_dest && own_cidx[k] == req_cidx)
                own_val[k] = req_data;
            start(next_state(M_STING));
          end
          M_RSVP: begin
            fetching <= 1'b1;
            lat      <= 0;
            exp_mem  <= req_dest;
            exp_cidx <= req_cidx;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
