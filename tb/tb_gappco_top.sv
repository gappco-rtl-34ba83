// tb_gappco_top: end-to-end test of GAPPCO I at its default size (N = 8).
//
// The testbench plays the host. It builds configuration bitstreams field by
// field in the documented order (unit counts, then per DotVectors unit EN1,
// EN2, four times addr1/sign1/addr2/sign2, RESULT1 addr/type, RESULT2
// addr/type), writes inputs and constants through the host port, starts a
// run, waits for process_end and reads the results back.
//
// Workload: reflection of a point or sphere a = (a1, a2, a3, a4) in a plane
// m = (m1, m2, m3, m4). Registers 0-7 hold a1..m4, 8 holds 1.0, 9 holds 0.5;
// unit 1 computes Dotproduct = a1*m1 + a2*m2 + a3*m3 - m4 into register 10
// (intermediate), units 2 and 3 each compute two 2-width dot products
// a_Refl[i] = 0.5*a_i - Dotproduct*m_i into registers 11-14 (final).
//
// Configurations exercised:
//   A  the reflector alone (1 GAPP unit, 3 DotVectors units)
//   B  two reflectors as two GAPP units on different registers, run together
//   C  final results only (the intermediate pass is skipped)
//   D  more units than N (conf_error)
// Checks: results against decimal values for the worked example and against
// the fixed-point reference for random inputs, process_end latency (9 cycles
// with an intermediate pass, 5 without), host writes dropped while busy.
// Every mechanism is counted and one that never happened is a failure.
module tb_gappco_top;
  import gappco_pkg::*;
  import tb_gappco_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  host_we = 1'b0;
  addr_t host_addr = '0;
  data_t host_wdata = '0;
  data_t host_rdata;
  logic  configure = 1'b0, cfg_valid = 1'b0, cfg_bit = 1'b0;
  logic  conf_end, conf_error;
  logic  process = 1'b0;
  logic  process_end, busy;

  gappco_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_conf = 0, n_w4 = 0, n_w2 = 0, n_int_pass = 0, n_fin_pass = 0;
  int n_skip_int = 0, n_multi_gu = 0, n_blocked = 0, n_conf_err = 0, n_sat = 0;

  bit stream [$];

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count DotVectors activity from the outside of each unit's write ports.
  always @(posedge clk) begin
    if (dut.u_ctrl.dv_issue) begin
      if (dut.u_ctrl.dv_phase == RES_INTERMEDIATE) n_int_pass++;
      else n_fin_pass++;
    end
  end

  // Count result writes by mode: 4-width (EN1 = 0) and 2-width (EN1 = 1).
  for (genvar u = 0; u < dut.N; u++) begin : g_mon
    always @(posedge clk) begin
      if (dut.g_dv[u].u_dv.wr[0].we) begin
        if (dut.dv_cfg[u].en1) n_w2++;
        else n_w4++;
      end
    end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endfunction

  function automatic void push_field(input int unsigned v, input int w);
    for (int b = w - 1; b >= 0; b--) stream.push_back(v[b]);
  endfunction

  // One DotVectors record in field order. ops: 8 register numbers in the
  // order MULT1 op1, MULT1 op2, ..., MULT4 op2; neg: their sign bits.
  function automatic void push_dv(input bit en, input int ops[8], input bit neg[8],
                                  input int r1, input bit t1, input int r2, input bit t2);
    push_field(en, 1);
    push_field(en, 1);
    for (int k = 0; k < 8; k++) begin
      push_field(ops[k], ADDR_W);
      push_field(neg[k], 1);
    end
    push_field(r1, ADDR_W); push_field(t1, 1);
    push_field(r2, ADDR_W); push_field(t2, 1);
  endfunction

  // The three reflector records (the worked example uses b = 0, d = 10, o = 11):
  // inputs a1..a4 at b..b+3, m1..m4 at b+4..b+7, constants 1.0 at 8 and 0.5 at 9.
  function automatic void push_reflector(input int b, input int d, input int o);
    push_dv(1'b0, '{b+7, 8, b+2, b+6, b+1, b+5, b+0, b+4},
            '{1, 0, 0, 0, 0, 0, 0, 0}, d, 1'b1, 0, 1'b0);
    push_dv(1'b1, '{9, b+0, d, b+4, 9, b+1, d, b+5},
            '{0, 0, 1, 0, 0, 0, 1, 0}, o, 1'b0, o+1, 1'b0);
    push_dv(1'b1, '{9, b+2, d, b+6, 9, b+3, d, b+7},
            '{0, 0, 1, 0, 0, 0, 1, 0}, o+2, 1'b0, o+3, 1'b0);
  endfunction

  task automatic send_config();
    @(negedge clk);
    configure = 1'b1;
    @(negedge clk);
    configure = 1'b0;
    while (stream.size() > 0) begin
      cfg_valid = 1'b1;
      cfg_bit   = stream.pop_front();
      @(negedge clk);
    end
    cfg_valid = 1'b0;
    @(negedge clk);
    check(conf_end, "conf_end after configuration");
    n_conf++;
    stream.delete();
  endtask

  task automatic host_write(input int a, input int v);
    @(negedge clk);
    host_we = 1'b1; host_addr = addr_t'(a); host_wdata = v;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int a, output int v);
    @(negedge clk);
    host_addr = addr_t'(a);
    #1 v = host_rdata;
  endtask

  // Start a run and wait for process_end; returns the cycle count. Tries a
  // host write to register 31 while busy, which must be dropped.
  task automatic run(output int cycles);
    int old_v, new_v;
    host_read(31, old_v);
    @(negedge clk);
    process = 1'b1;
    @(negedge clk);
    process = 1'b0;
    cycles = 1;
    host_we = 1'b1; host_addr = 31; host_wdata = old_v ^ 32'h5a5a5a5a;
    while (!process_end) begin
      if (busy) n_blocked++;
      @(negedge clk);
      host_we = 1'b0;
      cycles++;
    end
    host_read(31, new_v);
    check(new_v == old_v, "host write dropped while busy");
  endtask

  // Fixed-point reference of the reflection.
  function automatic void ref_reflect(input int a[4], input int m[4], output int dp, output int r[4]);
    int one, half;
    one  = to_fx(1.0);
    half = to_fx(0.5);
    dp = ref_add(ref_add(ref_mul(m[3], 1, one, 0), ref_mul(a[2], 0, m[2], 0)),
                 ref_add(ref_mul(a[1], 0, m[1], 0), ref_mul(a[0], 0, m[0], 0)));
    for (int i = 0; i < 4; i++)
      r[i] = ref_add(ref_mul(half, 0, a[i], 0), ref_mul(dp, 1, m[i], 0));
  endfunction

  task automatic load_inputs(input int b, input int a[4], input int m[4]);
    for (int i = 0; i < 4; i++) host_write(b + i, a[i]);
    for (int i = 0; i < 4; i++) host_write(b + 4 + i, m[i]);
  endtask

  task automatic check_reflection(input int d, input int o, input int a[4], input int m[4], input string tag);
    int dp, r[4], v;
    ref_reflect(a, m, dp, r);
    host_read(d, v);
    check(v == dp, $sformatf("%s Dotproduct %0d want %0d", tag, v, dp));
    if (v == 32'sh7fffffff || v == 32'sh80000000) n_sat++;
    for (int i = 0; i < 4; i++) begin
      host_read(o + i, v);
      check(v == r[i], $sformatf("%s a_Refl[%0d] %0d want %0d", tag, i + 1, v, r[i]));
      if (v == 32'sh7fffffff || v == 32'sh80000000) n_sat++;
    end
  endtask

  function automatic void random_sphere(input int scale, output int a[4], output int m[4]);
    for (int i = 0; i < 4; i++) begin
      a[i] = int'($urandom) >>> scale;
      m[i] = int'($urandom) >>> scale;
    end
  endfunction

  initial begin
    int a[4], m[4], a2[4], m2[4], cyc, v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- A: the reflector ------------------------------------------------
    push_field(1, COUNT_W);
    push_field(3, COUNT_W);
    push_reflector(0, 10, 11);
    check(stream.size() == 2 * COUNT_W + 3 * DV_CFG_W, "bitstream length");
    send_config();
    check(!conf_error, "no conf_error for 3 units");
    host_write(8, to_fx(1.0));
    host_write(9, to_fx(0.5));
    // Worked example: a = (1, 1, 1, 1.3), m = (1, 0, 0, 0).
    a = '{to_fx(1.0), to_fx(1.0), to_fx(1.0), to_fx(1.3)};
    m = '{to_fx(1.0), 0, 0, 0};
    load_inputs(0, a, m);
    run(cyc);
    check(cyc == 2 * (DV_LAT + 1) + 1, $sformatf("run with intermediate pass took %0d cycles", cyc));
    host_read(10, v); check(v == to_fx(1.0),   $sformatf("Dotproduct = %f", to_real(v)));
    host_read(11, v); check(v == to_fx(-0.5),  $sformatf("a_Refl[1] = %f", to_real(v)));
    host_read(12, v); check(v == to_fx(0.5),   $sformatf("a_Refl[2] = %f", to_real(v)));
    host_read(13, v); check(v == to_fx(0.5),   $sformatf("a_Refl[3] = %f", to_real(v)));
    host_read(14, v); check(v > to_fx(0.65) - 3 && v < to_fx(0.65) + 3, $sformatf("a_Refl[4] = %f", to_real(v)));
    check_reflection(10, 11, a, m, "example");
    for (int t = 0; t < 20; t++) begin
      random_sphere((t < 3) ? 1 : 10, a, m);
      load_inputs(0, a, m);
      run(cyc);
      check_reflection(10, 11, a, m, $sformatf("A%0d", t));
    end

    // ---- B: two GAPP units ----------------------------------------------
    push_field(2, COUNT_W);
    push_field(3, COUNT_W);
    push_reflector(0, 10, 11);
    push_field(3, COUNT_W);
    push_reflector(15, 23, 24);
    send_config();
    for (int t = 0; t < 10; t++) begin
      random_sphere(10, a, m);
      random_sphere(10, a2, m2);
      load_inputs(0, a, m);
      load_inputs(15, a2, m2);
      run(cyc);
      check(cyc == 2 * (DV_LAT + 1) + 1, "two-unit run latency");
      check_reflection(10, 11, a, m, $sformatf("B1.%0d", t));
      check_reflection(23, 24, a2, m2, $sformatf("B2.%0d", t));
      n_multi_gu++;
    end

    // ---- C: final results only -------------------------------------------
    // a_Refl from a host-supplied Dotproduct in register 10: units 2 and 3 only.
    push_field(1, COUNT_W);
    push_field(2, COUNT_W);
    push_dv(1'b1, '{9, 0, 10, 4, 9, 1, 10, 5}, '{0, 0, 1, 0, 0, 0, 1, 0}, 11, 1'b0, 12, 1'b0);
    push_dv(1'b1, '{9, 2, 10, 6, 9, 3, 10, 7}, '{0, 0, 1, 0, 0, 0, 1, 0}, 13, 1'b0, 14, 1'b0);
    send_config();
    for (int t = 0; t < 5; t++) begin
      int dp, r[4];
      random_sphere(10, a, m);
      load_inputs(0, a, m);
      ref_reflect(a, m, dp, r);
      host_write(10, dp);
      run(cyc);
      check(cyc == DV_LAT + 2, $sformatf("final-only run took %0d cycles", cyc));
      n_skip_int++;
      check_reflection(10, 11, a, m, $sformatf("C%0d", t));
    end

    // ---- D: more units than the coprocessor has ---------------------------
    push_field(3, COUNT_W);
    push_field(3, COUNT_W); push_reflector(0, 10, 11);
    push_field(3, COUNT_W); push_reflector(15, 23, 24);
    // units 7 and 8 write registers 28-30; unit 9 does not exist
    push_field(3, COUNT_W); push_reflector(0, 28, 29);
    send_config();
    check(conf_error == (9 > dut.N), "conf_error for 9 units");
    if (conf_error) n_conf_err++;
    // The first N units still work.
    random_sphere(10, a, m);
    load_inputs(0, a, m);
    run(cyc);
    check_reflection(10, 11, a, m, "D");

    $display("mechanisms: configurations %0d, 4-width %0d, 2-width %0d, intermediate passes %0d, final passes %0d,",
             n_conf, n_w4, n_w2, n_int_pass, n_fin_pass);
    $display("            intermediate pass skipped %0d, two GAPP units %0d, blocked host cycles %0d, conf_error %0d, saturated %0d",
             n_skip_int, n_multi_gu, n_blocked, n_conf_err, n_sat);
    check(n_conf > 0 && n_w4 > 0 && n_w2 > 0 && n_int_pass > 0 && n_fin_pass > 0, "coverage: configuration and modes");
    check(n_skip_int > 0 && n_multi_gu > 0 && n_blocked > 0 && n_conf_err > 0 && n_sat > 0, "coverage: skip, GAPP units, blocking, overflow, saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
