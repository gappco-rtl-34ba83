// gappco_add: one adder unit (ADDxy) of a DotVectors unit.
//
// Adds two signed DATA_W-bit fixed-point values and saturates the sum to the
// DATA_W range instead of wrapping around (saturation is this
// implementation's choice; the addition itself is the design's).
//
// Timing: one register stage. Addends and in_valid sampled at a rising edge
// appear on sum/out_valid right after it (latency 1, one sum per cycle).
module gappco_add
  import gappco_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t a,
  input  data_t b,
  output logic  out_valid,
  output data_t sum
);

  data_t sum_d;

  always_comb sum_d = sat_data((2*DATA_W)'(a) + (2*DATA_W)'(b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sum <= sum_d;
    end
  end

endmodule
