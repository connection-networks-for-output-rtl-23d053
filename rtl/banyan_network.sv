// banyan_network: STAGES-stage banyan connection network between
// N = 2**STAGES processors and N memories, built from N/2 identical 2x2
// switches per stage and STAGES+1 rows of N ports.
//
// Port row 0 belongs to the processors, row STAGES to the memories. The
// switch of stage s (1..STAGES) at column c, where bit s-1 of c is 0, joins
// the ports of row s-1 at columns c and c+2**(s-1) (its LL and LR) to the
// ports of row s at the same two columns (its UL and UR). Destination bit s-1
// therefore picks the column at stage s, so a packet addressed to memory m
// reaches column m from any processor; on the way back the switches retrace
// the same links. This is the wiring of the recursive construction of the
// source model and of its three-stage drawing.
//
// Interface: per processor, the state of its port (row 0) and the commands
// the processor drives into it; per memory, the state of its port (row
// STAGES) and the memory's commands. One hop per cycle on every plane.
module banyan_network
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES = 4,
  localparam int unsigned N     = 1 << STAGES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  below_ctl_t  proc_ctl  [N],
  output port_state_t proc_port [N],
  input  above_ctl_t  mem_ctl   [N],
  output port_state_t mem_port  [N]
);

  initial assert (STAGES >= 1 && STAGES <= ADDR_MAX)
    else $error("banyan_network: STAGES must be 1..ADDR_MAX");

  port_state_t st  [STAGES+1][N];
  below_ctl_t  bel [STAGES+1][N];
  above_ctl_t  abv [STAGES+1][N];

  for (genvar c = 0; c < N; c++) begin : g_ends
    assign bel[0][c]      = proc_ctl[c];
    assign proc_port[c]   = st[0][c];
    assign abv[STAGES][c] = mem_ctl[c];
    assign mem_port[c]    = st[STAGES][c];
  end

  for (genvar r = 0; r <= STAGES; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      banyan_port u_port (
        .clk  (clk),
        .rst_n(rst_n),
        .below(bel[r][c]),
        .above(abv[r][c]),
        .state(st[r][c])
      );
    end
  end

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    for (genvar c = 0; c < N; c++) begin : g_sw
      if (((c >> (s - 1)) & 1) == 0) begin : g_on
        localparam int unsigned CR = c + (1 << (s - 1));
        banyan_switch #(.STAGES(STAGES)) u_sw (
          .ll    (st[s-1][c]),
          .lr    (st[s-1][CR]),
          .ul    (st[s][c]),
          .ur    (st[s][CR]),
          .ll_ctl(abv[s-1][c]),
          .lr_ctl(abv[s-1][CR]),
          .ul_ctl(bel[s][c]),
          .ur_ctl(bel[s][CR])
        );
      end
    end
  end

endmodule
