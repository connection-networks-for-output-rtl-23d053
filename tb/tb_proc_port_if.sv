// tb_proc_port_if: the testbench plays both the processor and its port.
// Checks the start-up step (the first New cell is consumed and its memory
// index becomes the id, no request is accepted before), NEW taken from the
// New latch or waited for, STING issued or blocked by a full Outgoing latch,
// RSVP issued and its answer awaited with no other request accepted.
module tb_proc_port_if;
  import banyan_pkg::*;

  localparam int S = 4;

  logic clk = 0, rst_n = 0;
  port_state_t port;
  below_ctl_t ctl;
  logic req_valid, req_ready, resp_valid, id_valid;
  op_e req_op, resp_op;
  logic [S-1:0] req_dest, resp_mem, id;
  logic [CELL_W-1:0] req_cidx, resp_cidx;
  logic [DATA_W-1:0] req_data, resp_data;
  pstat_e status;
  int checks = 0, failures = 0;

  proc_port_if #(.STAGES(S)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  function automatic pkt_t mk(int a, int c, int d, bit r);
    pkt_t p;
    p.rsvp = r; p.addr = addr_t'(a); p.cidx = CELL_W'(c); p.data = DATA_W'(d);
    return p;
  endfunction

  initial begin
    port = '0; req_valid = 0; req_op = OP_NEW; req_dest = '0; req_cidx = '0; req_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // start-up: a request is not accepted before the id is known
    req_valid = 1; req_op = OP_STING; req_dest = 3;
    @(negedge clk);
    chk("no accept before id", req_ready, 0);
    chk("no issue before id", ctl.o_load, 0);
    port.n_v = 1; port.n = mk(9, 17, 0, 0);
    #1;
    chk("start-up take", ctl.n_take, 1);
    chk("start-up no accept", req_ready, 0);
    @(negedge clk);
    port.n_v = 0;
    chk("id valid", id_valid, 1);
    chk("id", int'(id), 9);

    // STING issued
    req_valid = 1; req_op = OP_STING; req_dest = 4'd12; req_cidx = 8'd33; req_data = 16'hbeef;
    #1;
    chk("sting accepted", req_ready, 1);
    chk("sting load", ctl.o_load, 1);
    chk("sting pkt", int'(ctl.o_din === mk(12, 33, 16'hbeef, 0)), 1);
    chk("sting status", int'(status), int'(PS_ACTIVE));
    @(negedge clk);
    // STING blocked by a full Outgoing latch
    port.o_v = 1; port.o = mk(12, 33, 16'hbeef, 0);
    #1;
    chk("blocked", req_ready, 0);
    chk("blocked no load", ctl.o_load, 0);
    chk("blocked status", int'(status), int'(PS_BLOCKED));
    @(negedge clk);
    port.o_v = 0;
    #1;
    chk("unblocked", req_ready, 1);
    @(negedge clk);

    // NEW: wait for a cell, then take it
    req_op = OP_NEW;
    #1;
    chk("new waits", req_ready, 0);
    chk("new wait status", int'(status), int'(PS_WAITING));
    @(negedge clk);
    port.n_v = 1; port.n = mk(6, 201, 0, 0);
    #1;
    chk("new accepted", req_ready, 1);
    chk("new take", ctl.n_take, 1);
    chk("new resp", resp_valid, 1);
    chk("new mem", int'(resp_mem), 6);
    chk("new cell", int'(resp_cidx), 201);
    @(negedge clk);
    port.n_v = 0;

    // RSVP: issue, then wait for the answer
    req_op = OP_RSVP; req_dest = 4'd2; req_cidx = 8'd7; req_data = '0;
    #1;
    chk("rsvp accepted", req_ready, 1);
    chk("rsvp pkt", int'(ctl.o_din === mk(2, 7, 0, 1)), 1);
    @(negedge clk);
    req_op = OP_STING;
    for (int k = 0; k < 5; k++) begin
      #1;
      chk("fetch: nothing accepted", req_ready | ctl.o_load, 0);
      chk("fetch status", int'(status), int'(PS_WAITING));
      @(negedge clk);
    end
    port.i_v = 1; port.i = mk(2, 7, 16'h1234, 1);
    #1;
    chk("answer taken", ctl.i_take, 1);
    chk("answer valid", resp_valid, 1);
    chk("answer op", int'(resp_op), int'(OP_RSVP));
    chk("answer data", int'(resp_data), 16'h1234);
    chk("answer mem", int'(resp_mem), 2);
    chk("no accept with answer", req_ready, 0);
    @(negedge clk);
    port.i_v = 0;
    #1;
    chk("ready again", req_ready, 1);
    @(negedge clk);
    req_valid = 0;
    #1;
    chk("idle status", int'(status), int'(PS_IDLE));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
