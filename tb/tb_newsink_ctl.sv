// tb_newsink_ctl: exhaustive check of the NEW-sink decision against its
// 16-row control table. Row r encodes the New latch occupancy as
// ((UL*2+UR)*2+LL)*2+LR; expected actions per row: '.' none, '=' bar,
// 'x' cross.
module tb_newsink_ctl;
  import banyan_pkg::*;

  localparam string LEXP = ".....x..==..==..";
  localparam string REXP = "....=.=...x.=.=.";

  logic ul_full, ur_full, ll_full, lr_full;
  xfr_e ll_sel, lr_sel;
  int checks = 0, failures = 0;

  newsink_ctl dut (.*);

  function automatic xfr_e code(byte c);
    return (c == "=") ? XFR_BAR : (c == "x") ? XFR_CROSS : XFR_NONE;
  endfunction

  initial begin
    for (int row = 0; row < 16; row++) begin
      {ul_full, ur_full, ll_full, lr_full} = 4'(row);
      #1;
      checks += 2;
      if (ll_sel != code(LEXP[row])) begin failures++; $display("row %0d: LL %s", row, ll_sel.name()); end
      if (lr_sel != code(REXP[row])) begin failures++; $display("row %0d: LR %s", row, lr_sel.name()); end
    end
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
