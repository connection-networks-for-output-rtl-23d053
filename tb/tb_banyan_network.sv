// tb_banyan_network: the three-stage, eight-processor network (the size of
// the drawn example). The testbench plays all processors and memories.
//  1. Every processor sends one packet to every memory, one at a time: it
//     must reach memory m after STAGES+1 cycles carrying the sender's index
//     as its address; sent back on the Incoming plane it must reach the
//     sender after STAGES+1 cycles carrying m.
//  2. Processors 010 and 110 both send to memory 011 (the drawn example):
//     both arrive; the one that crosses over waits until the memory has
//     emptied its port, two cycles after the first.
//  3. All processors send at once, to random memories, many rounds: every
//     packet arrives once, at the right memory, with the right source.
//  4. NEW-sink: every memory puts one cell in its New latch; with all
//     latches empty each cell flows straight down, so processor k gets the
//     cell of memory k. Then memory 5 alone supplies: once processor 5 holds
//     a cell the next one is routed diagonally to processor 4.
module tb_banyan_network;
  import banyan_pkg::*;

  localparam int S = 3;
  localparam int N = 1 << S;

  logic clk = 0, rst_n = 0;
  below_ctl_t  proc_ctl  [N];
  port_state_t proc_port [N];
  above_ctl_t  mem_ctl   [N];
  port_state_t mem_port  [N];
  int checks = 0, failures = 0;

  banyan_network #(.STAGES(S)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  function automatic pkt_t mk(int a, int tag, bit rsvp);
    pkt_t p;
    p.rsvp = rsvp; p.addr = addr_t'(a); p.cidx = CELL_W'(tag); p.data = DATA_W'(tag ^ 16'h5a5a);
    return p;
  endfunction

  task automatic idle_all();
    for (int k = 0; k < N; k++) begin proc_ctl[k] = '0; mem_ctl[k] = '0; end
  endtask

  int sent [N][N];   // test 3: packets sent p -> m minus packets received
  int got_cnt;

  initial begin
    idle_all();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // ---- 1: every pair, both planes
    for (int p = 0; p < N; p++) begin
      for (int m = 0; m < N; m++) begin
        int t;
        @(negedge clk);
        proc_ctl[p].o_load = !proc_port[p].o_v; proc_ctl[p].o_din = mk(m, p * N + m, 1);
        @(negedge clk);
        proc_ctl[p] = '0;
        t = 1;
        while (!mem_port[m].o_v && t < 50) begin @(negedge clk); t++; end
        chk("up latency", t, S + 1);
        chk("up source", int'(mem_port[m].o.addr), p);
        chk("up payload", int'(mem_port[m].o.cidx), (p * N + m) % 256);
        mem_ctl[m].o_take = mem_port[m].o_v && !mem_port[m].i_v; mem_ctl[m].i_load = mem_port[m].o_v && !mem_port[m].i_v; mem_ctl[m].i_din = mem_port[m].o;
        @(negedge clk);
        mem_ctl[m] = '0;
        t = 1;
        while (!proc_port[p].i_v && t < 50) begin @(negedge clk); t++; end
        chk("down latency", t, S + 1);
        chk("down memory", int'(proc_port[p].i.addr), m);
        chk("down payload", int'(proc_port[p].i.data), int'(mk(0, p * N + m, 1).data));
        proc_ctl[p].i_take = proc_port[p].i_v;
        @(negedge clk);
        proc_ctl[p] = '0;
      end
    end

    // ---- 2: 010 and 110 both to 011
    begin
      int t1, t2, t;
      @(negedge clk);
      proc_ctl[2].o_load = !proc_port[2].o_v; proc_ctl[2].o_din = mk(3, 100, 0);
      proc_ctl[6].o_load = !proc_port[6].o_v; proc_ctl[6].o_din = mk(3, 101, 0);
      @(negedge clk);
      proc_ctl[2] = '0; proc_ctl[6] = '0;
      t1 = -1; t2 = -1;
      for (t = 1; t < 30; t++) begin
        if (mem_port[3].o_v) begin
          if (mem_port[3].o.addr == 2) t1 = t; else if (mem_port[3].o.addr == 6) t2 = t;
          mem_ctl[3].o_take = 1;  // o_v is set here
        end
        @(negedge clk);
        mem_ctl[3] = '0;
      end
      chk("fig example straight", t1, S + 1);
      chk("fig example crossed", t2, S + 3);
    end

    // ---- 3: random all-to-all rounds
    for (int p = 0; p < N; p++) for (int m = 0; m < N; m++) sent[p][m] = 0;
    got_cnt = 0;
    for (int cyc = 0; cyc < 600; cyc++) begin
      @(negedge clk);
      idle_all();
      for (int k = 0; k < N; k++) begin
        if (cyc < 500 && !proc_port[k].o_v && $urandom_range(1)) begin
          automatic int m = $urandom_range(N - 1);
          proc_ctl[k].o_load = 1; proc_ctl[k].o_din = mk(m, k, 0);
          sent[k][m]++;
        end
        if (mem_port[k].o_v && $urandom_range(3) != 0) begin
          automatic int src = int'(mem_port[k].o.addr);
          mem_ctl[k].o_take = 1;
          got_cnt++;
          checks++;
          if (src >= N || int'(mem_port[k].o.cidx) != src || sent[src][k] <= 0) begin
            failures++; $display("random: bad arrival at %0d from %0d", k, src);
          end else sent[src][k]--;
        end
      end
    end
    @(negedge clk);
    idle_all();
    begin
      int left = 0;
      for (int p = 0; p < N; p++) for (int m = 0; m < N; m++) left += sent[p][m];
      chk("random: all delivered", left, 0);
      chk("random: traffic seen", int'(got_cnt > 100), 1);
    end

    // ---- 4: NEW-sink
    @(negedge clk);
    for (int m = 0; m < N; m++) begin mem_ctl[m].n_load = !mem_port[m].n_v; mem_ctl[m].n_din = mk(0, m, 0); end
    @(negedge clk);
    idle_all();
    repeat (S + 2) @(negedge clk);
    for (int k = 0; k < N; k++) begin
      chk("new straight valid", proc_port[k].n_v, 1);
      chk("new straight source", int'(proc_port[k].n.addr), k);
      chk("new straight cell", int'(proc_port[k].n.cidx), k);
    end
    for (int k = 0; k < N; k++) proc_ctl[k].n_take = (k != 5) && proc_port[k].n_v;
    @(negedge clk);
    idle_all();
    mem_ctl[5].n_load = !mem_port[5].n_v; mem_ctl[5].n_din = mk(0, 55, 0);
    @(negedge clk);
    idle_all();
    repeat (S + 2) @(negedge clk);
    chk("new diagonal valid", proc_port[4].n_v, 1);
    chk("new diagonal source", int'(proc_port[4].n.addr), 5);
    chk("new diagonal cell", int'(proc_port[4].n.cidx), 55);

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
