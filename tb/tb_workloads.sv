// tb_workloads: runs the traffic mixes of the evaluation on systems of 2,
// 4, 8, 16 and 32 processors and prints utilisation tables:
//   - RSVPs only (every processor waits for each answer);
//   - STINGs only, at localities 100, 90, 75, 50 and 25 percent;
//   - mixed messages with RSVP factor r = 0.5, 0.7, 0.9;
//   - NEWs only on 16 processors, for processor activity 0.2/0.6/1.0 and
//     memory responsiveness 0.2/0.5/1.0, with NEW-sink locality and the
//     share of non-local cells that came from each processor's most
//     frequent other memory.
// Each point: reset, start-up, then 400 cycles of traffic. Checked:
//   - RSVPs only: utilisation within 25% below the no-interference value
//     1/(2*STAGES+2) and not above it;
//   - STINGs at 100% locality: utilisation 50% (+-3 points); on 4, 8 and
//     16 processors 50% locality does worse than 25%, the congestion the
//     fixed straight-across preference causes;
//   - mixed: utilisation falls as r grows;
//   - NEWs at full activity and full responsiveness: 50% (+-3 points),
//     and utilisation grows with responsiveness at full activity.
module tb_workloads;
  import banyan_pkg::*;

  localparam int NS = 5;

  logic clk = 0, rst_n = 0;
  logic run [NS];
  int unsigned trans [4][4];
  int unsigned locality, responsiveness;
  int unsigned t_act [NS], t_wait [NS], t_block [NS], t_new [NS], t_loc [NS], t_sec [NS], t_rsvp [NS], t_fail [NS];
  logic ids [NS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_sys
    wl_system #(.STAGES(g + 1)) u_sys (
      .clk(clk), .rst_n(rst_n), .run(run[g]), .trans(trans), .locality(locality),
      .responsiveness(responsiveness),
      .tot_active(t_act[g]), .tot_wait(t_wait[g]), .tot_block(t_block[g]),
      .tot_new(t_new[g]), .tot_new_local(t_loc[g]), .tot_new_second(t_sec[g]), .tot_rsvp(t_rsvp[g]),
      .tot_failures(t_fail[g]), .all_ids(ids[g])
    );
  end

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic matrix(int i, int n, int s, int r);   // same row for every state
    for (int k = 0; k < 4; k++) trans[k] = '{i, n, s, r};
  endtask

  task automatic mixed(int r);
    trans[0] = '{0, 1000 - r, 0, r};
    trans[1] = '{0, 0, 1000, 0};
    trans[2] = '{0, (1000 - r) / 2, (1000 - r) / 2, r};
    trans[3] = '{0, (1000 - r) / 2, (1000 - r) / 2, r};
  endtask

  // one measurement on system g; returns utilisation in percent
  real sec;   // share of non-local cells that came from the top secondary memory

  task automatic point(int g, output real util, output real loc);
    @(negedge clk); rst_n = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (!ids[g]) @(negedge clk);
    run[g] = 1;
    repeat (400) @(negedge clk);
    run[g] = 0;
    repeat (30) @(negedge clk);
    util = 100.0 * real'(t_act[g]) / real'(t_act[g] + t_wait[g] + t_block[g]);
    loc  = (t_new[g] == 0) ? 0.0 : 100.0 * real'(t_loc[g]) / real'(t_new[g]);
    sec  = (t_new[g] == t_loc[g]) ? 100.0 : 100.0 * real'(t_sec[g]) / real'(t_new[g] - t_loc[g]);
    chk("processor models saw no bad answers", t_fail[g] == 0);
  endtask

  real u, l, ideal, prev, um [3];
  int lo [5] = '{1000, 900, 750, 500, 250};
  int rr [3] = '{500, 700, 900};
  int pa [3] = '{200, 600, 1000};
  int mr [3] = '{200, 500, 1000};

  initial begin
    for (int g = 0; g < NS; g++) run[g] = 0;
    locality = 0; responsiveness = 1000;
    matrix(0, 0, 0, 1000);
    repeat (2) @(negedge clk);

    $display("RSVPs only: processors, utilisation %%, no-interference value %%");
    for (int g = 0; g < NS; g++) begin
      matrix(0, 0, 0, 1000); locality = 0;
      point(g, u, l);
      ideal = 100.0 / real'(2 * (g + 1) + 2);
      $display("  %3d  %6.2f  %6.2f", 1 << (g + 1), u, ideal);
      chk("RSVP utilisation near 1/(2S+2)", u <= ideal + 0.5 && u >= 0.75 * ideal);
    end

    $display("STINGs only: processors, utilisation %% at locality 100/90/75/50/25 %%");
    for (int g = 0; g < NS; g++) begin
      real us [5];
      matrix(0, 0, 1000, 0);
      for (int j = 0; j < 5; j++) begin
        locality = lo[j];
        point(g, us[j], l);
      end
      $display("  %3d  %6.2f %6.2f %6.2f %6.2f %6.2f", 1 << (g + 1), us[0], us[1], us[2], us[3], us[4]);
      chk("STING utilisation 50% at full locality", us[0] > 47.0 && us[0] < 53.0);
      if (g >= 1 && g <= 3)
        chk("STING: 50% locality worse than 25% (fixed preference)", us[3] < us[4]);
    end

    $display("Mixed messages: processors, utilisation %% at r = .5/.7/.9, gross utilisation at r = .7");
    for (int g = 0; g < NS; g++) begin
      locality = 0;
      for (int j = 0; j < 3; j++) begin
        mixed(rr[j]);
        point(g, um[j], l);
      end
      $display("  %3d  %6.2f %6.2f %6.2f   %6.2f", 1 << (g + 1), um[0], um[1], um[2],
               real'(1 << (g + 1)) * um[1] / 100.0);
      chk("mixed utilisation falls with r", um[0] > um[1] && um[1] > um[2]);
    end

    $display("NEWs only, 16 processors: activity, responsiveness, utilisation %%, locality %%, non-local cells from the main secondary memory %%");
    for (int a = 0; a < 3; a++) begin
      prev = 0.0;
      for (int m = 0; m < 3; m++) begin
        matrix(1000 - pa[a], pa[a], 0, 0);
        responsiveness = mr[m];
        locality = 0;
        point(3, u, l);
        $display("  %4.2f  %4.2f  %6.2f  %6.2f  %6.2f", real'(pa[a]) / 1000.0, real'(mr[m]) / 1000.0, u, l, sec);
        if (pa[a] == 1000) begin
          chk("NEW utilisation grows with responsiveness", u > prev);
          if (mr[m] == 1000) chk("NEW every cycle: 50% utilisation", u > 47.0 && u < 53.0);
        end
        prev = u;
      end
    end
    responsiveness = 1000;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
