// tb_banyan_switch: directed cases for one 3-stage-network switch: routing
// by address LSB (outgoing) and MSB (incoming), the address rewriting that
// records the path, straight-across preference, locked outputs, the NEW-sink
// refill, and payloads passing unchanged. Expected addresses are worked out
// by hand in the comments.
module tb_banyan_switch;
  import banyan_pkg::*;

  port_state_t ll, lr, ul, ur;
  above_ctl_t  ll_ctl, lr_ctl;
  below_ctl_t  ul_ctl, ur_ctl;
  int checks = 0, failures = 0;

  banyan_switch #(.STAGES(3)) dut (.*);

  function automatic pkt_t mk(int a, int tag);
    pkt_t p;
    p.rsvp = tag[0];
    p.addr = addr_t'(a);
    p.cidx = CELL_W'(tag);
    p.data = DATA_W'(tag * 7 + 3);
    return p;
  endfunction

  task automatic chk(string what, logic got, logic want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %0b want %0b", what, got, want); end
  endtask

  task automatic chkp(string what, pkt_t got, pkt_t want);
    checks++;
    if (got !== want) begin failures++; $display("%s: got %h want %h", what, got, want); end
  endtask

  task automatic clear();
    ll = '0; lr = '0; ul = '0; ur = '0;
  endtask

  initial begin
    // Outgoing, crossing both ways: LL wants 011 (LSB 1, right), LR wants
    // 010 (LSB 0, left). UR gets LL's packet with 011>>1 = 001 (came from
    // left: top bit 0); UL gets LR's with 010>>1 | 100 = 101.
    clear();
    ll.o_v = 1; ll.o = mk(3'b011, 11);
    lr.o_v = 1; lr.o = mk(3'b010, 12);
    #1;
    chk("A ul load", ul_ctl.o_load, 1); chkp("A ul pkt", ul_ctl.o_din, mk(3'b101, 12));
    chk("A ur load", ur_ctl.o_load, 1); chkp("A ur pkt", ur_ctl.o_din, mk(3'b001, 11));
    chk("A ll take", ll_ctl.o_take, 1); chk("A lr take", lr_ctl.o_take, 1);

    // Both want left: the straight one (LL) goes, LR waits.
    clear();
    ll.o_v = 1; ll.o = mk(3'b000, 21);
    lr.o_v = 1; lr.o = mk(3'b110, 22);
    #1;
    chk("B ul load", ul_ctl.o_load, 1); chkp("B ul pkt", ul_ctl.o_din, mk(3'b000, 21));
    chk("B ur load", ur_ctl.o_load, 0);
    chk("B ll take", ll_ctl.o_take, 1); chk("B lr take", lr_ctl.o_take, 0);

    // Output locked: UL full, so LL (wants left) waits; LR (wants right) goes
    // straight: 101>>1 | 100 = 110.
    clear();
    ul.o_v = 1; ul.o = mk(0, 1);
    ll.o_v = 1; ll.o = mk(3'b100, 31);
    lr.o_v = 1; lr.o = mk(3'b101, 32);
    #1;
    chk("C ul load", ul_ctl.o_load, 0); chk("C ll take", ll_ctl.o_take, 0);
    chk("C ur load", ur_ctl.o_load, 1); chkp("C ur pkt", ur_ctl.o_din, mk(3'b110, 32));

    // Incoming: UL holds 110 (MSB 1, right), UR holds 011 (MSB 0, left).
    // LL gets UR's packet with (011<<1)&111 | 1 = 111; LR gets UL's with 100.
    clear();
    ul.i_v = 1; ul.i = mk(3'b110, 41);
    ur.i_v = 1; ur.i = mk(3'b011, 42);
    #1;
    chk("D ll load", ll_ctl.i_load, 1); chkp("D ll pkt", ll_ctl.i_din, mk(3'b111, 42));
    chk("D lr load", lr_ctl.i_load, 1); chkp("D lr pkt", lr_ctl.i_din, mk(3'b100, 41));
    chk("D ul take", ul_ctl.i_take, 1); chk("D ur take", ur_ctl.i_take, 1);
    chk("D no out", ul_ctl.o_load | ur_ctl.o_load, 0);

    // Incoming, both want right: straight (UR) wins.
    clear();
    ul.i_v = 1; ul.i = mk(3'b100, 51);
    ur.i_v = 1; ur.i = mk(3'b101, 52);
    #1;
    chk("E lr load", lr_ctl.i_load, 1); chkp("E lr pkt", lr_ctl.i_din, mk(3'b011, 52));
    chk("E ll load", ll_ctl.i_load, 0); chk("E ul take", ul_ctl.i_take, 0);

    // NEW-sink, both lower latches empty: straight down; addresses gain the
    // upper-port bit: 000 -> 000, 001 -> 011.
    clear();
    ul.n_v = 1; ul.n = mk(3'b000, 61);
    ur.n_v = 1; ur.n = mk(3'b001, 62);
    #1;
    chk("F ll load", ll_ctl.n_load, 1); chkp("F ll pkt", ll_ctl.n_din, mk(3'b000, 61));
    chk("F lr load", lr_ctl.n_load, 1); chkp("F lr pkt", lr_ctl.n_din, mk(3'b011, 62));
    chk("F takes", ul_ctl.n_take & ur_ctl.n_take, 1);

    // NEW-sink, LR full and UL empty: LL is refilled diagonally from UR.
    clear();
    ur.n_v = 1; ur.n = mk(3'b010, 71);
    lr.n_v = 1; lr.n = mk(0, 2);
    #1;
    chk("G ll load", ll_ctl.n_load, 1); chkp("G ll pkt", ll_ctl.n_din, mk(3'b101, 71));
    chk("G lr load", lr_ctl.n_load, 0); chk("G ur take", ur_ctl.n_take, 1);

    // NEW-sink, only UR full, both lower empty: it goes straight to LR.
    clear();
    ur.n_v = 1; ur.n = mk(3'b000, 81);
    #1;
    chk("H lr load", lr_ctl.n_load, 1); chk("H ll load", ll_ctl.n_load, 0);
    chkp("H lr pkt", lr_ctl.n_din, mk(3'b001, 81));

    // Nothing full, nothing moves.
    clear();
    #1;
    chk("I idle", ul_ctl.o_load | ur_ctl.o_load | ll_ctl.i_load | lr_ctl.i_load |
                  ll_ctl.n_load | lr_ctl.n_load, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
