// tb_xfr_ctl: exhaustive check of the switch transfer decision against the
// 36-row switch control table. Row r encodes (L-out, R-out, L-in, R-in) as
// ((Lout*2+Rout)*3+Lin)*3+Rin with input codes 0 empty, 1 go left, 2 go
// right; the expected actions of each row are written as one character
// each: '.' none, '=' bar, 'x' cross.
module tb_xfr_ctl;
  import banyan_pkg::*;

  localparam string LEXP = ".x.===.x..x.===.x...................";
  localparam string REXP = "..=..=xx=...........=..=xx=.........";

  logic l_in_v, l_in_dir, r_in_v, r_in_dir, l_out_full, r_out_full;
  xfr_e l_sel, r_sel;
  int checks = 0, failures = 0;

  xfr_ctl dut (.*);

  function automatic xfr_e code(byte c);
    return (c == "=") ? XFR_BAR : (c == "x") ? XFR_CROSS : XFR_NONE;
  endfunction

  initial begin
    for (int row = 0; row < 36; row++) begin
      automatic int lo = row / 18, ro = (row / 9) % 2, li = (row / 3) % 3, ri = row % 3;
      l_out_full = 1'(lo); r_out_full = 1'(ro);
      l_in_v = (li != 0); l_in_dir = (li == 2);
      r_in_v = (ri != 0); r_in_dir = (ri == 2);
      #1;
      checks += 2;
      if (l_sel != code(LEXP[row])) begin failures++; $display("row %0d: L %s", row, l_sel.name()); end
      if (r_sel != code(REXP[row])) begin failures++; $display("row %0d: R %s", row, r_sel.name()); end
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
