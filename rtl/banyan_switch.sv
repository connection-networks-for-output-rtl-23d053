// banyan_switch: one 2x2 packet switch of the banyan network.
//
// The switch connects two lower (processor-side) ports LL and LR to two
// upper (memory-side) ports UL and UR and moves packets on three planes in
// every cycle, all decided from the port contents registered at the start of
// the cycle:
//   Outgoing (LL/LR -> UL/UR): the packet goes left if the least significant
//     bit of its address is 0, right if it is 1. On the way the address is
//     shifted right by one and a bit saying which input it came from (0 left,
//     1 right) is shifted in at the top (bit STAGES-1). After the last stage
//     the destination bits are gone and the address is the source processor.
//   Incoming (UL/UR -> LL/LR): the packet goes left if address bit STAGES-1
//     is 0, right if it is 1. The address is shifted left by one and a bit
//     saying which upper port it came from is shifted in at bit 0, so an
//     answer arrives carrying the index of the memory that sent it.
//   New (UL/UR -> LL/LR): the NEW-sink. Empty lower New latches are refilled
//     from the upper ones (newsink_ctl); the address is shifted left with the
//     upper-port bit entering at bit 0, so a cell arrives carrying the index
//     of the memory that allocated it.
// Straight transfers are preferred on every plane (xfr_ctl, newsink_ctl).
//
// Purely combinational: the ports hold all state. Address bits above
// STAGES-1 stay zero. The routing bits, the address rewriting and the fixed
// preference follow the source model; the packet layout is this design's.
module banyan_switch
  import banyan_pkg::*;
#(
  parameter int unsigned STAGES = 4
) (
  input  port_state_t ll,
  input  port_state_t lr,
  input  port_state_t ul,
  input  port_state_t ur,
  output above_ctl_t  ll_ctl,   // this switch is the agent above LL
  output above_ctl_t  lr_ctl,
  output below_ctl_t  ul_ctl,   // this switch is the agent below UL
  output below_ctl_t  ur_ctl
);

  localparam addr_t MASK = addr_t'((1 << STAGES) - 1);
  localparam addr_t TOP  = addr_t'(1 << (STAGES - 1));

  xfr_e o_l_sel, o_r_sel, i_l_sel, i_r_sel, n_l_sel, n_r_sel;

  // Outgoing plane: routed by the LSB.
  xfr_ctl u_out (
    .l_in_v    (ll.o_v), .l_in_dir (ll.o.addr[0]),
    .r_in_v    (lr.o_v), .r_in_dir (lr.o.addr[0]),
    .l_out_full(ul.o_v), .r_out_full(ur.o_v),
    .l_sel     (o_l_sel), .r_sel   (o_r_sel)
  );

  // Incoming plane: routed by bit STAGES-1.
  xfr_ctl u_in (
    .l_in_v    (ul.i_v), .l_in_dir (ul.i.addr[STAGES-1]),
    .r_in_v    (ur.i_v), .r_in_dir (ur.i.addr[STAGES-1]),
    .l_out_full(ll.i_v), .r_out_full(lr.i_v),
    .l_sel     (i_l_sel), .r_sel   (i_r_sel)
  );

  newsink_ctl u_new (
    .ul_full(ul.n_v), .ur_full(ur.n_v),
    .ll_full(ll.n_v), .lr_full(lr.n_v),
    .ll_sel (n_l_sel), .lr_sel (n_r_sel)
  );

  // Address rewriting.
  function automatic pkt_t up_hop(pkt_t p, logic from_right);
    pkt_t r = p;
    r.addr = ((p.addr & MASK) >> 1) | (from_right ? TOP : addr_t'(0));
    return r;
  endfunction

  function automatic pkt_t down_hop(pkt_t p, logic from_right);
    pkt_t r = p;
    r.addr = ((p.addr << 1) & MASK) | addr_t'(from_right);
    return r;
  endfunction

  always_comb begin
    ul_ctl = '0;
    ur_ctl = '0;
    ll_ctl = '0;
    lr_ctl = '0;

    // Outgoing: UL is straight above LL, UR straight above LR.
    unique case (o_l_sel)
      XFR_BAR:   begin ul_ctl.o_load = 1'b1; ul_ctl.o_din = up_hop(ll.o, 1'b0); ll_ctl.o_take = 1'b1; end
      XFR_CROSS: begin ul_ctl.o_load = 1'b1; ul_ctl.o_din = up_hop(lr.o, 1'b1); lr_ctl.o_take = 1'b1; end
      default: ;
    endcase
    unique case (o_r_sel)
      XFR_BAR:   begin ur_ctl.o_load = 1'b1; ur_ctl.o_din = up_hop(lr.o, 1'b1); lr_ctl.o_take = 1'b1; end
      XFR_CROSS: begin ur_ctl.o_load = 1'b1; ur_ctl.o_din = up_hop(ll.o, 1'b0); ll_ctl.o_take = 1'b1; end
      default: ;
    endcase

    // Incoming.
    unique case (i_l_sel)
      XFR_BAR:   begin ll_ctl.i_load = 1'b1; ll_ctl.i_din = down_hop(ul.i, 1'b0); ul_ctl.i_take = 1'b1; end
      XFR_CROSS: begin ll_ctl.i_load = 1'b1; ll_ctl.i_din = down_hop(ur.i, 1'b1); ur_ctl.i_take = 1'b1; end
      default: ;
    endcase
    unique case (i_r_sel)
      XFR_BAR:   begin lr_ctl.i_load = 1'b1; lr_ctl.i_din = down_hop(ur.i, 1'b1); ur_ctl.i_take = 1'b1; end
      XFR_CROSS: begin lr_ctl.i_load = 1'b1; lr_ctl.i_din = down_hop(ul.i, 1'b0); ul_ctl.i_take = 1'b1; end
      default: ;
    endcase

    // NEW-sink.
    unique case (n_l_sel)
      XFR_BAR:   begin ll_ctl.n_load = 1'b1; ll_ctl.n_din = down_hop(ul.n, 1'b0); ul_ctl.n_take = 1'b1; end
      XFR_CROSS: begin ll_ctl.n_load = 1'b1; ll_ctl.n_din = down_hop(ur.n, 1'b1); ur_ctl.n_take = 1'b1; end
      default: ;
    endcase
    unique case (n_r_sel)
      XFR_BAR:   begin lr_ctl.n_load = 1'b1; lr_ctl.n_din = down_hop(ur.n, 1'b1); ur_ctl.n_take = 1'b1; end
      XFR_CROSS: begin lr_ctl.n_load = 1'b1; lr_ctl.n_din = down_hop(ul.n, 1'b0); ul_ctl.n_take = 1'b1; end
      default: ;
    endcase
  end

endmodule
