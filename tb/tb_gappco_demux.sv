// tb_gappco_demux: self-checking test of the result demultiplexer.
//
// For random inputs and both enable values, checks that the value goes to
// the second-level adder side when en = 0 and to the result side when
// en = 1, with the other side zero.
module tb_gappco_demux;
  import gappco_pkg::*;

  logic  en = 1'b0;
  data_t din = '0;
  data_t to_add, to_result;
  int    checks = 0, failures = 0;

  gappco_demux dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      en  = i[0];
      din = (i < 2) ? 32'sh12345678 : $urandom;
      #1;
      checks++;
      if (en ? (to_result !== din || to_add !== '0) : (to_add !== din || to_result !== '0)) begin
        failures++;
        $display("FAIL en=%0b din=%h add=%h res=%h", en, din, to_add, to_result);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
