// tb_gappco_dotvectors: self-checking test of one DotVectors unit.
//
// The testbench holds a 32-entry register array and serves the unit's eight
// read ports from it. Every cycle it may issue a computation with fresh
// register contents; the configuration record (modes, addresses, signs,
// result addresses and types) is re-randomised whenever the pipeline is
// empty. For each cycle the expected write-back is computed from the
// reference arithmetic and compared exactly DV_LAT (3) cycles later, which
// checks the latency, back-to-back issue, the 4-width and 2-width modes, the
// phase filter on result types and the inactive case. The configuration record of
// the first reflector unit (the 4-width dot product) is run first.
module tb_gappco_dotvectors;
  import gappco_pkg::*;
  import tb_gappco_ref_pkg::*;

  typedef struct {
    bit go;
    bit we0; int a0; int d0;
    bit we1; int a1; int d1;
  } exp_t;

  logic      clk = 1'b0, rst_n = 1'b0;
  dv_cfg_t   cfg = '0;
  logic      active = 1'b0, issue = 1'b0;
  res_type_e phase = RES_FINAL;
  addr_t     rd_addr [N_OPS];
  data_t     rd_data [N_OPS];
  rf_wr_t    wr      [2];
  logic      busy;
  int        regs    [M_REGS];
  exp_t      pipe    [$];
  int        checks = 0, failures = 0;
  int        n_w4 = 0, n_w2 = 0, n_filtered = 0, n_back2back = 0;

  gappco_dotvectors dut (.*);

  always #5 clk = ~clk;

  always_comb for (int k = 0; k < N_OPS; k++) rd_data[k] = regs[rd_addr[k]];

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t expect_now();
    exp_t e;
    int p [N_MULT];
    int s1, s2, s3;
    for (int k = 0; k < N_MULT; k++)
      p[k] = ref_mul(regs[cfg.mult[k].op1.addr], cfg.mult[k].op1.sign,
                     regs[cfg.mult[k].op2.addr], cfg.mult[k].op2.sign);
    s1 = ref_add(p[0], p[1]);
    s2 = ref_add(p[2], p[3]);
    s3 = ref_add(cfg.en1 ? 0 : s1, cfg.en2 ? 0 : s2);
    e.go  = issue && active;
    e.we0 = e.go && (cfg.res1.rtype == phase);
    e.a0  = int'(cfg.res1.addr);
    e.d0  = cfg.en1 ? s1 : s3;
    e.we1 = e.go && cfg.en2 && (cfg.res2.rtype == phase);
    e.a1  = int'(cfg.res2.addr);
    e.d1  = s2;
    return e;
  endfunction

  function automatic dv_cfg_t random_cfg();
    dv_cfg_t c;
    c = dv_cfg_t'({$urandom, $urandom});
    if ($urandom_range(0, 3) != 0) c.en2 = c.en1;   // mostly the two documented modes
    return c;
  endfunction

  task automatic check_cycle();
    exp_t e;
    bit   exp_busy;
    if (pipe.size() < DV_LAT) return;
    exp_busy = pipe[0].go || pipe[1].go || pipe[2].go;
    checks++;
    if (busy !== exp_busy) begin failures++; $display("FAIL busy %0b want %0b", busy, exp_busy); end
    e = pipe.pop_front();
    checks++;
    if (wr[0].we !== e.we0 || (e.we0 && (wr[0].addr !== addr_t'(e.a0) || wr[0].data !== e.d0))) begin
      failures++;
      $display("FAIL wr0 we=%0b a=%0d d=%0d, want we=%0b a=%0d d=%0d", wr[0].we, wr[0].addr, wr[0].data, e.we0, e.a0, e.d0);
    end
    checks++;
    if (wr[1].we !== e.we1 || (e.we1 && (wr[1].addr !== addr_t'(e.a1) || wr[1].data !== e.d1))) begin
      failures++;
      $display("FAIL wr1 we=%0b a=%0d d=%0d, want we=%0b a=%0d d=%0d", wr[1].we, wr[1].addr, wr[1].data, e.we1, e.a1, e.d1);
    end
    if (e.go && !cfg.en1 && e.we0) n_w4++;
    if (e.go && cfg.en1 && cfg.en2 && e.we0 && e.we1) n_w2++;
    if (e.go && !e.we0) n_filtered++;
  endtask

  initial begin
    int idle = DV_LAT;
    logic prev_go = 1'b0;
    for (int r = 0; r < M_REGS; r++) regs[r] = int'($urandom) >>> 10;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Reflector unit 1: -(m4)*1.0 + a3*m3 + a2*m2 + a1*m1 -> reg 10.
    cfg = '0;
    cfg.mult[0] = '{op1: '{7, 1'b1}, op2: '{8, 1'b0}};
    cfg.mult[1] = '{op1: '{2, 1'b0}, op2: '{6, 1'b0}};
    cfg.mult[2] = '{op1: '{1, 1'b0}, op2: '{5, 1'b0}};
    cfg.mult[3] = '{op1: '{0, 1'b0}, op2: '{4, 1'b0}};
    cfg.res1    = '{10, RES_INTERMEDIATE};
    regs[0] = to_fx(1.0); regs[1] = to_fx(1.0); regs[2] = to_fx(1.0); regs[3] = to_fx(1.3);
    regs[4] = to_fx(1.0); regs[5] = to_fx(2.0); regs[6] = to_fx(0.5); regs[7] = to_fx(0.25);
    regs[8] = to_fx(1.0);
    active = 1'b1;
    @(negedge clk);
    issue = 1'b1; phase = RES_INTERMEDIATE;
    @(negedge clk);
    issue = 1'b0;
    repeat (DV_LAT - 1) @(negedge clk);
    // 1*1 + 1*2 + 1*0.5 - 0.25*1 = 3.25
    checks++;
    if (!wr[0].we || wr[0].addr !== 10 || wr[0].data !== to_fx(3.25) || wr[1].we) begin
      failures++;
      $display("FAIL reflector dot product: we=%0b a=%0d d=%f", wr[0].we, wr[0].addr, to_real(wr[0].data));
    end
    @(negedge clk);

    for (int c = 0; c < 3000; c++) begin
      check_cycle();
      if (idle >= DV_LAT && $urandom_range(0, 5) == 0) begin
        cfg    = random_cfg();
        active = ($urandom_range(0, 7) != 0);
      end
      for (int r = 0; r < M_REGS; r++)
        regs[r] = (c % 16 == 0) ? int'($urandom) : int'($urandom) >>> 10;
      issue = ($urandom_range(0, 2) != 0);
      phase = res_type_e'($urandom_range(0, 1));
      pipe.push_back(expect_now());
      if (issue && prev_go && active) n_back2back++;
      prev_go = issue && active;
      idle = issue ? 0 : idle + 1;
      @(negedge clk);
    end
    checks++;
    if (n_w4 == 0 || n_w2 == 0 || n_filtered == 0 || n_back2back == 0) begin
      failures++;
      $display("FAIL coverage: 4-width %0d, 2-width %0d, filtered %0d, back-to-back %0d", n_w4, n_w2, n_filtered, n_back2back);
    end
    $display("coverage: 4-width %0d, 2-width %0d, filtered %0d, back-to-back %0d", n_w4, n_w2, n_filtered, n_back2back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
