// Shared body of the multiplier testbenches: reset, wait for every harness to
// finish, require (when the including module sets REQ_MECH) that back-to-back
// issue, idle gaps, waiting offers and overlapping products all occurred in
// every configuration, then raise report_ready; the including testbench
// prints the result line. A watchdog ends the wait with a failure if a
// harness never finishes.
int tot_checks, tot_fail;
bit all_done;
bit report_ready = 0;

initial begin
  repeat (3) @(posedge clk);
  rst_n = 1;
end

initial begin
  for (int cnt = 0; cnt < 20000; cnt++) begin
    @(posedge clk);
    all_done = 1;
    for (int i = 0; i < NCFG; i++) all_done &= done[i];
    if (all_done) break;
  end
  tot_checks = 0; tot_fail = all_done ? 0 : 1;
  if (!all_done) $display("watchdog: not every product arrived");
  for (int i = 0; i < NCFG; i++) begin
    tot_checks += checks[i] + (REQ_MECH ? 4 : 0);
    tot_fail   += failures[i];
    $display("config %0d: %0d checks, %0d failures, back-to-back %0d, gaps %0d, waits %0d, overlaps %0d",
             i, checks[i], failures[i], b2b[i], gap[i], wt[i], ovl[i]);
    if (REQ_MECH) begin
      if (b2b[i] == 0) tot_fail++;
      if (gap[i] == 0) tot_fail++;
      if (wt[i] == 0)  tot_fail++;
      if (ovl[i] == 0) tot_fail++;
    end
  end
  report_ready = 1;
end
