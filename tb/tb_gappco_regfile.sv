// tb_gappco_regfile: self-checking test of the register file.
//
// Keeps a shadow copy of the M registers. Each cycle it performs a random
// host write and random writes on the unit write ports (distinct addresses
// among the ports; the host may collide with a port, in which case the port
// wins), and checks the host read port and every unit read port against the
// shadow copy. Also checks that reset clears all registers.
module tb_gappco_regfile;
  import gappco_pkg::*;

  localparam int unsigned NRD = 64;
  localparam int unsigned NWR = 16;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   host_we = 1'b0;
  addr_t  host_addr = '0;
  data_t  host_wdata = '0;
  data_t  host_rdata;
  addr_t  rd_addr [NRD];
  data_t  rd_data [NRD];
  rf_wr_t wr      [NWR];
  int     shadow  [M_REGS];
  int     checks = 0, failures = 0, n_collide = 0;

  gappco_regfile dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int p = 0; p < int'(NRD); p++) rd_addr[p] = addr_t'($urandom);
    host_addr = addr_t'($urandom);
    #1;
    checks++;
    if (host_rdata !== shadow[host_addr]) begin
      failures++; $display("FAIL host read r%0d = %h want %h", host_addr, host_rdata, shadow[host_addr]);
    end
    for (int p = 0; p < int'(NRD); p++) begin
      checks++;
      if (rd_data[p] !== shadow[rd_addr[p]]) begin
        failures++; $display("FAIL port %0d read r%0d = %h want %h", p, rd_addr[p], rd_data[p], shadow[rd_addr[p]]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < int'(NWR); p++) wr[p] = '0;
    for (int p = 0; p < int'(NRD); p++) rd_addr[p] = '0;
    for (int r = 0; r < int'(M_REGS); r++) shadow[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_reads();
    for (int c = 0; c < 2000; c++) begin
      bit used [M_REGS];
      @(negedge clk);
      for (int r = 0; r < int'(M_REGS); r++) used[r] = 1'b0;
      host_we    = $urandom_range(0, 1);
      host_addr  = addr_t'($urandom);
      host_wdata = $urandom;
      if (host_we) shadow[host_addr] = host_wdata;
      for (int p = 0; p < int'(NWR); p++) begin
        wr[p].addr = addr_t'($urandom);
        wr[p].data = $urandom;
        wr[p].we   = ($urandom_range(0, 3) == 0) && !used[wr[p].addr];
        if (wr[p].we) begin
          used[wr[p].addr] = 1'b1;
          if (host_we && host_addr == wr[p].addr) n_collide++;
          shadow[wr[p].addr] = wr[p].data;
        end
      end
      @(negedge clk);
      host_we = 1'b0;
      for (int p = 0; p < int'(NWR); p++) wr[p].we = 1'b0;
      check_reads();
    end
    // Reset clears everything.
    rst_n = 1'b0;
    #1;
    rst_n = 1'b1;
    for (int r = 0; r < int'(M_REGS); r++) shadow[r] = 0;
    check_reads();
    checks++;
    if (n_collide == 0) begin failures++; $display("FAIL no host/port collision exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
