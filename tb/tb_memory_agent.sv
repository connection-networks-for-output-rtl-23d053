// tb_memory_agent: the testbench plays the memory's port (all three
// latches) and checks, with a small store of CELLS=8:
//  - with nothing to do and supply enabled, new cells 0,1,2,... are put in
//    the New latch, one each time it is empty; none while supply_en is low;
//  - a STING writes the cell and is absorbed, with no New supply that cycle;
//  - an RSVP is answered from the store with its return address kept;
//  - an RSVP waits while the Incoming latch is full;
//  - after CELLS allocations the memory reports exhaustion and stops.
module tb_memory_agent;
  import banyan_pkg::*;

  localparam int CELLS = 8;

  logic clk = 0, rst_n = 0;
  port_state_t port;
  logic supply_en;
  above_ctl_t ctl;
  logic did_sting, did_rsvp, rsvp_blocked, did_new, exhausted;
  int checks = 0, failures = 0;
  logic [DATA_W-1:0] ref_store [CELLS];
  int next_cell;

  memory_agent #(.CELLS(CELLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(string what, int got, int want);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  // Apply the memory's commands to the modelled port at the clock edge.
  always @(posedge clk) if (rst_n) begin
    if (ctl.o_take) port.o_v <= 0;
    if (ctl.i_load) begin port.i_v <= 1; port.i <= ctl.i_din; end
    if (ctl.n_load) begin port.n_v <= 1; port.n <= ctl.n_din; end
  end

  initial begin
    port = '0; supply_en = 0;
    for (int k = 0; k < CELLS; k++) ref_store[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("no supply when disabled", port.n_v, 0);
    supply_en = 1;
    @(negedge clk);
    chk("first cell supplied", port.n_v, 1);
    chk("first cell index", int'(port.n.cidx), 0);
    chk("first cell address", int'(port.n.addr), 0);
    next_cell = 1;

    for (int it = 0; it < 200; it++) begin
      @(negedge clk);
      // a processor took the new cell
      if (port.n_v && $urandom_range(2) == 0) port.n_v = 0;
      if (port.i_v && $urandom_range(1) == 0) port.i_v = 0;
      if (!port.o_v && $urandom_range(1) == 0) begin
        automatic int c = $urandom_range(CELLS - 1);
        port.o_v = 1;
        port.o.rsvp = $urandom_range(1);
        port.o.addr = addr_t'($urandom_range(15));
        port.o.cidx = CELL_W'(c);
        port.o.data = DATA_W'($urandom);
      end
      #1;
      // what must happen this cycle
      if (port.o_v && !port.o.rsvp) begin
        chk("sting absorbed", {ctl.o_take, did_sting, ctl.n_load}, 3'b110);
        ref_store[port.o.cidx] = port.o.data;
      end else if (port.o_v && !port.i_v) begin
        chk("rsvp answered", {ctl.o_take, ctl.i_load, did_rsvp}, 3'b111);
        chk("rsvp data", int'(ctl.i_din.data), int'(ref_store[port.o.cidx]));
        chk("rsvp addr", int'(ctl.i_din.addr), int'(port.o.addr));
        chk("rsvp cell", int'(ctl.i_din.cidx), int'(port.o.cidx));
      end else if (port.o_v) begin
        chk("rsvp blocked", {ctl.o_take, ctl.i_load, rsvp_blocked, ctl.n_load}, 4'b0010);
      end else if (!port.n_v && next_cell < CELLS) begin
        chk("new supplied", {ctl.n_load, did_new}, 2'b11);
        chk("new cell index", int'(ctl.n_din.cidx), next_cell);
        next_cell++;
      end else begin
        chk("nothing to do", {ctl.o_take, ctl.i_load, ctl.n_load}, 3'b000);
      end
    end
    @(negedge clk);
    chk("exhausted", exhausted, int'(next_cell == CELLS));
    chk("all cells handed out", next_cell, CELLS);
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
