// gappco_mult: one multiplier unit (MULTxy) of a DotVectors unit.
//
// Each operand carries a sign bit from the configuration; when it is 1 the
// operand is negated before it reaches the multiplier, as the design requires
// for the negated GAPP references such as inputsVector[-7]. The two operands
// are then multiplied as signed fixed-point numbers with FRAC_W fraction bits:
// the 2*DATA_W-bit product is shifted right by FRAC_W (rounding toward minus
// infinity) and saturated to DATA_W bits. Negating the most negative value
// saturates as well. Rounding and saturation are this implementation's choice.
//
// Timing: one register stage. Operands and in_valid sampled at a rising edge
// appear on prod/out_valid right after it (latency 1, one result per cycle).
module gappco_mult
  import gappco_pkg::*;
#(
  parameter int unsigned FRAC_W_P = FRAC_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t op1,
  input  logic  sign1,
  input  data_t op2,
  input  logic  sign2,
  output logic  out_valid,
  output data_t prod
);

  localparam logic signed [2*DATA_W-1:0] WIDE_ZERO = '0;

  data_t                     a, b;
  logic signed [2*DATA_W-1:0] full;
  data_t                     prod_d;

  // Sign changing stage: negation of a two's-complement value, saturated.
  function automatic data_t negate(input data_t v);
    return sat_data(WIDE_ZERO - (2*DATA_W)'(v));
  endfunction

  always_comb begin
    a      = sign1 ? negate(op1) : op1;
    b      = sign2 ? negate(op2) : op2;
    full   = (2*DATA_W)'(a) * (2*DATA_W)'(b);
    prod_d = sat_data(full >>> FRAC_W_P);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      prod      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) prod <= prod_d;
    end
  end

endmodule
