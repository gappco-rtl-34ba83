// tb_gappco_mult: self-checking test of the multiplier unit.
//
// Drives random operand pairs with random sign bits, one per cycle with
// random gaps, and compares every product one cycle later against the
// reference model. Includes known decimal products, sign changes and
// saturating cases (large operands and negation of the most negative value).
module tb_gappco_mult;
  import gappco_pkg::*;
  import tb_gappco_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0, sign1 = 1'b0, sign2 = 1'b0;
  data_t op1 = '0, op2 = '0;
  logic  out_valid;
  data_t prod;
  int    checks = 0, failures = 0, n_sat = 0;

  gappco_mult dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int a, input bit sa, input int b, input bit sb);
    int exp;
    exp = ref_mul(a, sa, b, sb);
    @(negedge clk);
    op1 = a; sign1 = sa; op2 = b; sign2 = sb; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    checks++;
    if (!out_valid || prod !== exp) begin
      failures++;
      $display("FAIL %0d%s * %0d%s: got v=%0b %0d, want %0d", a, sa ? "(neg)" : "", b, sb ? "(neg)" : "", out_valid, prod, exp);
    end
    if (exp == 32'sh7fffffff || exp == 32'sh80000000) n_sat++;
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid held"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // Known decimal values: 1.5 * -2.25 = -3.375, -(0.5) * 1.0 = -0.5.
    drive(to_fx(1.5), 0, to_fx(-2.25), 0);
    checks++; if (prod !== to_fx(-3.375)) begin failures++; $display("FAIL 1.5*-2.25"); end
    drive(to_fx(0.5), 1, to_fx(1.0), 0);
    checks++; if (prod !== to_fx(-0.5)) begin failures++; $display("FAIL -(0.5)*1.0"); end
    drive(to_fx(-3.0), 1, to_fx(-2.0), 1);
    checks++; if (prod !== to_fx(6.0)) begin failures++; $display("FAIL -(-3)*-(-2)"); end
    // Saturation.
    drive(32'sh7fff0000, 0, 32'sh00020000, 0);
    drive(32'sh80000000, 1, 32'sh00010000, 0);
    drive(32'sh40000000, 0, 32'sh40000000, 1);
    // Random.
    for (int i = 0; i < 400; i++) begin
      int a, b;
      a = $urandom; b = $urandom;
      if (i % 2 == 0) begin a = a >>> 12; b = b >>> 12; end
      drive(a, $urandom_range(0, 1), b, $urandom_range(0, 1));
    end
    checks++;
    if (n_sat < 3) begin failures++; $display("FAIL saturation seen only %0d times", n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
