// tb_gappco_controller: self-checking test of the GAPPCO I controller.
//
// Builds configuration bitstreams in the testbench (unit counts and random
// DotVectors records, each field MSB first), sends them one bit per cycle
// with random gaps in cfg_valid, and checks the stored records, the active
// flags, conf_end and conf_error (a stream asking for more units than N).
// It then checks the run sequence cycle by cycle: with an intermediate result
// configured, issue pulses at cycles 1 and 5 after the process command
// (intermediate then final phase) and process_end at cycle 9; without one, a
// single final issue at cycle 1 and process_end at cycle 5. It also checks
// that process is ignored before any configuration and while busy.
module tb_gappco_controller;
  import gappco_pkg::*;

  localparam int unsigned N = 8;   // the controller's default unit count

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      configure = 1'b0, cfg_valid = 1'b0, cfg_bit = 1'b0, process = 1'b0;
  logic      conf_end, conf_error, process_end, busy;
  dv_cfg_t   dv_cfg    [N];
  logic      dv_active [N];
  logic      dv_issue;
  res_type_e dv_phase;

  bit        stream [$];
  dv_cfg_t   exp_cfg [$];
  int        checks = 0, failures = 0;
  int        n_int_runs = 0, n_fin_runs = 0, n_overflow = 0;

  gappco_controller dut (.*);


  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void push_field(input longint unsigned v, input int w);
    for (int b = w - 1; b >= 0; b--) stream.push_back(v[b]);
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  // counts[g] DotVectors records for GAPP unit g; with_int forces at least one
  // intermediate result, otherwise every result type is final.
  task automatic configure_with(input int counts[$], input bit with_int);
    stream.delete();
    exp_cfg.delete();
    push_field(counts.size(), COUNT_W);
    foreach (counts[g]) begin
      push_field(counts[g], COUNT_W);
      for (int d = 0; d < counts[g]; d++) begin
        dv_cfg_t c;
        c = dv_cfg_t'({$urandom, $urandom});
        c.res1.rtype = RES_FINAL;
        c.res2.rtype = RES_FINAL;
        if (with_int && g == 0 && d == 0) c.res1.rtype = RES_INTERMEDIATE;
        exp_cfg.push_back(c);
        push_field(longint'(c), DV_CFG_W);
      end
    end
    @(negedge clk);
    configure = 1'b1;
    @(negedge clk);
    configure = 1'b0;
    check(!conf_end && busy, "conf_end low and busy during configuration");
    while (stream.size() > 0) begin
      cfg_valid = ($urandom_range(0, 3) != 0);
      cfg_bit   = cfg_valid ? stream.pop_front() : 1'($urandom);
      @(negedge clk);
      if (stream.size() > 0) begin
        // process must be ignored while configuring
        process = ($urandom_range(0, 15) == 0);
      end
    end
    cfg_valid = 1'b0;
    process   = 1'b0;
    @(negedge clk);
    check(conf_end && !busy, "conf_end after the last bit");
    check(conf_error == (exp_cfg.size() > N), "conf_error");
    if (conf_error) n_overflow++;
    for (int u = 0; u < int'(N); u++) begin
      check(dv_active[u] == (u < exp_cfg.size()), $sformatf("dv_active[%0d]", u));
      if (u < exp_cfg.size())
        check(dv_cfg[u] == exp_cfg[u], $sformatf("dv_cfg[%0d] %h want %h", u, dv_cfg[u], exp_cfg[u]));
    end
  endtask

  task automatic run_and_check(input bit with_int);
    int issue_at [$];
    res_type_e phase_at [$];
    int end_at = -1;
    @(negedge clk);
    process = 1'b1;
    @(negedge clk);
    process = 1'b0;
    for (int k = 1; k <= 12; k++) begin
      if (dv_issue) begin issue_at.push_back(k); phase_at.push_back(dv_phase); end
      if (process_end && end_at < 0) end_at = k;
      if (end_at < 0) check(busy, $sformatf("busy at cycle %0d", k));
      // a second process command while busy is ignored
      process = (k == 2);
      @(negedge clk);
    end
    process = 1'b0;
    if (with_int) begin
      n_int_runs++;
      check(issue_at.size() == 2 && issue_at[0] == 1 && issue_at[1] == 2 + DV_LAT,
            $sformatf("issue cycles %p", issue_at));
      check(phase_at.size() == 2 && phase_at[0] == RES_INTERMEDIATE && phase_at[1] == RES_FINAL, "phases");
      check(end_at == 2 * (DV_LAT + 1) + 1, $sformatf("process_end at %0d", end_at));
    end else begin
      n_fin_runs++;
      check(issue_at.size() == 1 && issue_at[0] == 1, $sformatf("issue cycles %p", issue_at));
      check(phase_at.size() == 1 && phase_at[0] == RES_FINAL, "phase");
      check(end_at == DV_LAT + 2, $sformatf("process_end at %0d", end_at));
    end
    check(!busy && process_end, "idle with process_end held");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Not configured yet: process is ignored.
    @(negedge clk); process = 1'b1;
    @(negedge clk); process = 1'b0;
    repeat (3) @(negedge clk);
    check(!busy && !process_end && !dv_issue, "process ignored before configuration");

    configure_with('{3}, 1'b1);        // the reflector shape: 1 GAPP unit, 3 units
    run_and_check(1'b1);
    configure_with('{2, 0, 3}, 1'b0);  // 3 GAPP units, one of them empty
    run_and_check(1'b0);
    configure_with('{5, 6}, 1'b1);     // 11 units > N: overflow
    run_and_check(1'b1);
    configure_with('{}, 1'b0);         // zero GAPP units
    run_and_check(1'b0);
    for (int i = 0; i < 6; i++) begin
      int counts [$];
      int ng = $urandom_range(1, 3);
      for (int g = 0; g < ng; g++) counts.push_back($urandom_range(0, 3));
      configure_with(counts, i[0]);
      run_and_check(i[0] && counts[0] > 0);
    end
    check(n_int_runs > 0 && n_fin_runs > 0 && n_overflow > 0, "coverage of both run kinds and overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
