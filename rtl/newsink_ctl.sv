// newsink_ctl: NEW-sink decision of one 2x2 switch (the NEW-sink control
// table of the source model).
//
// Each cycle the switch looks at the New latches of its two processor-side
// (lower) ports. An empty lower latch is refilled from the memory-side
// (upper) latch straight above it if that one holds a cell (bar). Failing
// that it takes the diagonal upper cell (cross), but only if that cell is not
// already going straight down into the other lower latch. Straight transfers
// thus keep new cells local; a drained region is refilled diagonally. The
// rule reproduces all 16 rows of the table.
//
// Purely combinational.
module newsink_ctl
  import banyan_pkg::*;
(
  input  logic ul_full,   // New latch of the upper-left port holds a cell
  input  logic ur_full,
  input  logic ll_full,   // New latch of the lower-left port is full
  input  logic lr_full,
  output xfr_e ll_sel,    // what enters the lower-left New latch
  output xfr_e lr_sel
);

  logic ll_bar, lr_bar;

  always_comb begin
    ll_bar = !ll_full && ul_full;
    lr_bar = !lr_full && ur_full;
    ll_sel = XFR_NONE;
    lr_sel = XFR_NONE;
    if (ll_bar)                              ll_sel = XFR_BAR;
    else if (!ll_full && ur_full && !lr_bar) ll_sel = XFR_CROSS;
    if (lr_bar)                              lr_sel = XFR_BAR;
    else if (!lr_full && ul_full && !ll_bar) lr_sel = XFR_CROSS;
  end

endmodule
