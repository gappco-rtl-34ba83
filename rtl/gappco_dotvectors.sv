// gappco_dotvectors: one basic 4-width DotVectors unit of GAPPCO I.
//
// The unit computes a sum of four products of register-file operands:
//
//   MULTx1 --\                        /-- result 1 (2-width mode)
//             ADDx1 -- DEMUXx1 ------+
//   MULTx2 --/                        \
//                                      ADDx3 -- result 1 (4-width mode)
//   MULTx3 --\                        /
//             ADDx2 -- DEMUXx2 ------+
//   MULTx4 --/                        \-- result 2 (2-width mode)
//
// With EN1 = EN2 = 0 it is one 4-width dot product whose result is ADDx3's
// output; with EN1 = EN2 = 1 it is two independent 2-width dot products whose
// results leave through the demultiplexers. The eight operand addresses and
// sign bits, the enables, and the result addresses and types all come from
// the unit's configuration record (dv_cfg_t). This structure and the record
// are the design's; the pipelining and the phase filter below are this
// implementation's.
//
// Interface: rd_addr/rd_data are eight combinational register-file read
// ports (operand 2k is multiplier k's first input, 2k+1 its second); wr[0]
// writes RESULTx1, wr[1] writes RESULTx2. The controller drives issue for one
// cycle and phase with the result type this pass may write: a result is only
// written when its configured type equals phase, so intermediate and final
// results can be produced in separate passes.
//
// Timing: operands are read in the issue cycle. Multipliers, first-level
// adders and ADDx3 are one register stage each; the 2-width results are
// delayed one stage to match, so every write happens in the DV_LAT-th (3rd)
// cycle after issue. A new issue may follow every cycle.
module gappco_dotvectors
  import gappco_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  dv_cfg_t   cfg,
  input  logic      active,
  input  logic      issue,
  input  res_type_e phase,
  output addr_t     rd_addr [N_OPS],
  input  data_t     rd_data [N_OPS],
  output rf_wr_t    wr      [2],
  output logic      busy
);

  logic      go;
  logic      mult_v [N_MULT];
  data_t     prod   [N_MULT];
  logic      add1_v, add2_v, add3_v;
  data_t     sum1, sum2, sum3;
  data_t     chain1, chain2, res1_d, res2_d;
  data_t     res1_q, res2_q;
  res_type_e phase_q [DV_LAT];

  assign go = issue && active;

  // Operand addresses straight from the configuration record.
  always_comb begin
    for (int k = 0; k < N_MULT; k++) begin
      rd_addr[2*k]   = cfg.mult[k].op1.addr;
      rd_addr[2*k+1] = cfg.mult[k].op2.addr;
    end
  end

  // Stage 1: sign change and multiply.
  for (genvar k = 0; k < N_MULT; k++) begin : g_mult
    gappco_mult u_mult (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (go),
      .op1      (rd_data[2*k]),
      .sign1    (cfg.mult[k].op1.sign),
      .op2      (rd_data[2*k+1]),
      .sign2    (cfg.mult[k].op2.sign),
      .out_valid(mult_v[k]),
      .prod     (prod[k])
    );
  end

  // Stage 2: first-level adders.
  gappco_add u_add1 (
    .clk(clk), .rst_n(rst_n), .in_valid(mult_v[0]),
    .a(prod[0]), .b(prod[1]), .out_valid(add1_v), .sum(sum1)
  );
  gappco_add u_add2 (
    .clk(clk), .rst_n(rst_n), .in_valid(mult_v[2]),
    .a(prod[2]), .b(prod[3]), .out_valid(add2_v), .sum(sum2)
  );

  gappco_demux u_demux1 (.en(cfg.en1), .din(sum1), .to_add(chain1), .to_result(res1_d));
  gappco_demux u_demux2 (.en(cfg.en2), .din(sum2), .to_add(chain2), .to_result(res2_d));

  // Stage 3: second-level adder, and the 2-width results delayed to match.
  gappco_add u_add3 (
    .clk(clk), .rst_n(rst_n), .in_valid(add1_v),
    .a(chain1), .b(chain2), .out_valid(add3_v), .sum(sum3)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res1_q <= '0;
      res2_q <= '0;
      for (int s = 0; s < DV_LAT; s++) phase_q[s] <= RES_FINAL;
    end else begin
      if (add1_v) begin
        res1_q <= res1_d;
        res2_q <= res2_d;
      end
      phase_q[0] <= phase;
      for (int s = 1; s < DV_LAT; s++) phase_q[s] <= phase_q[s-1];
    end
  end

  // Write-back.
  always_comb begin
    wr[0].we   = add3_v && (cfg.res1.rtype == phase_q[DV_LAT-1]);
    wr[0].addr = cfg.res1.addr;
    wr[0].data = cfg.en1 ? res1_q : sum3;
    wr[1].we   = add3_v && cfg.en2 && (cfg.res2.rtype == phase_q[DV_LAT-1]);
    wr[1].addr = cfg.res2.addr;
    wr[1].data = res2_q;
  end

  assign busy = mult_v[0] || add1_v || add3_v;

  // Both first-level adders always run in step.
  a_adders_in_step: assert property (@(posedge clk) disable iff (!rst_n) add1_v == add2_v);

endmodule
