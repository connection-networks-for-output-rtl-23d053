// tb_banyan_port: random legal load/take traffic on all three latches of a
// port, checked every cycle against a reference model of three one-entry
// latches.
module tb_banyan_port;
  import banyan_pkg::*;

  logic clk = 0, rst_n = 0;
  below_ctl_t below;
  above_ctl_t above;
  port_state_t state;
  int checks = 0, failures = 0;
  logic rv [3];
  pkt_t rq [3];

  banyan_port dut (.*);

  always #5 clk = ~clk;

  function automatic pkt_t rnd_pkt();
    pkt_t p;
    p = pkt_t'({$urandom, $urandom, $urandom});
    return p;
  endfunction

  initial begin
    below = '0; above = '0;
    for (int k = 0; k < 3; k++) begin rv[k] = 0; rq[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      // compare with the model
      checks++;
      if (state.o_v !== rv[0] || state.i_v !== rv[1] || state.n_v !== rv[2] ||
          (rv[0] && state.o !== rq[0]) || (rv[1] && state.i !== rq[1]) || (rv[2] && state.n !== rq[2])) begin
        failures++;
        $display("cycle %0d: port state differs", cyc);
      end
      // drive legal commands
      below = '0; above = '0;
      if (!rv[0] && $urandom_range(1)) begin below.o_load = 1; below.o_din = rnd_pkt(); end
      if ( rv[0] && $urandom_range(1)) above.o_take = 1;
      if (!rv[1] && $urandom_range(1)) begin above.i_load = 1; above.i_din = rnd_pkt(); end
      if ( rv[1] && $urandom_range(1)) below.i_take = 1;
      if (!rv[2] && $urandom_range(1)) begin above.n_load = 1; above.n_din = rnd_pkt(); end
      if ( rv[2] && $urandom_range(1)) below.n_take = 1;
      @(posedge clk);
      #1;
      if (below.o_load) begin rv[0] = 1; rq[0] = below.o_din; end else if (above.o_take) rv[0] = 0;
      if (above.i_load) begin rv[1] = 1; rq[1] = above.i_din; end else if (below.i_take) rv[1] = 0;
      if (above.n_load) begin rv[2] = 1; rq[2] = above.n_din; end else if (below.n_take) rv[2] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
