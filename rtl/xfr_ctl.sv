// xfr_ctl: transfer decision of one 2x2 switch on the outgoing or the
// incoming plane (the switch control table of the source model).
//
// Each input latch is empty or holds a packet that wants the left (dir=0) or
// the right (dir=1) output. An output latch that is empty takes the packet
// of the input straight below/above it (bar) if that packet wants it;
// otherwise it takes the packet of the diagonal input (cross) if that one
// wants it. An occupied output takes nothing ("output locked"). When both
// inputs want the same output the straight one wins ("switch preference")
// and the other waits. The preference is fixed, as in the source model; the
// rule reproduces all 36 rows of its table.
//
// Purely combinational. For the outgoing plane the inputs are the LL/LR
// Outgoing latches and the outputs UL/UR; for the incoming plane the inputs
// are UL/UR and the outputs LL/LR.
module xfr_ctl
  import banyan_pkg::*;
(
  input  logic l_in_v,     // left input latch full
  input  logic l_in_dir,   // its packet wants: 0 left output, 1 right output
  input  logic r_in_v,
  input  logic r_in_dir,
  input  logic l_out_full, // left output latch full
  input  logic r_out_full,
  output xfr_e l_sel,      // what enters the left output
  output xfr_e r_sel       // what enters the right output
);

  always_comb begin
    l_sel = XFR_NONE;
    r_sel = XFR_NONE;
    if (!l_out_full) begin
      if (l_in_v && !l_in_dir)      l_sel = XFR_BAR;
      else if (r_in_v && !r_in_dir) l_sel = XFR_CROSS;
    end
    if (!r_out_full) begin
      if (r_in_v && r_in_dir)       r_sel = XFR_BAR;
      else if (l_in_v && l_in_dir)  r_sel = XFR_CROSS;
    end
  end

endmodule
