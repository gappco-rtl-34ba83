// tb_gappco_add: self-checking test of the adder unit.
//
// Drives back-to-back random addends (one per cycle) and checks each sum and
// its valid flag one cycle later against the saturating reference, including
// positive and negative overflow.
module tb_gappco_add;
  import gappco_pkg::*;
  import tb_gappco_ref_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid = 1'b0;
  data_t a = '0, b = '0;
  logic  out_valid;
  data_t sum;
  int    checks = 0, failures = 0, n_sat = 0;
  int    exp_q [$];
  logic  vld_q [$];

  gappco_add dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int va, vb, e;
    logic v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      // Check the result of the previous cycle's inputs.
      if (vld_q.size() > 0) begin
        e = exp_q.pop_front();
        v = vld_q.pop_front();
        checks++;
        if (out_valid !== v || (v && sum !== e)) begin
          failures++;
          $display("FAIL cycle %0d: valid %0b sum %0d, want %0b %0d", i, out_valid, sum, v, e);
        end
      end
      case (i % 4)
        0: begin va = 32'sh7ff00000 + ($urandom & 32'hfffff); vb = 32'sh00200000; end
        1: begin va = 32'sh80100000 - ($urandom & 32'hfffff); vb = -32'sh00200000; end
        default: begin va = $urandom; vb = $urandom; end
      endcase
      v = ($urandom_range(0, 3) != 0);
      a = va; b = vb; in_valid = v;
      e = ref_add(va, vb);
      if (v && (e == 32'sh7fffffff || e == 32'sh80000000)) n_sat++;
      exp_q.push_back(e);
      vld_q.push_back(v);
    end
    checks++;
    if (n_sat < 10) begin failures++; $display("FAIL saturation seen %0d times", n_sat); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
