// gappco_regfile: the GAPPCO I register file of M 32-bit registers.
//
// It holds the input values and constants written by the host, and the
// intermediate and final results written back by the DotVectors units; the
// host reads the results from it. The register count and width are the
// design's; the port structure is this implementation's choice: one host
// port, NRD combinational read ports (8 per DotVectors unit) and NWR write
// ports (2 per DotVectors unit).
//
// Timing: reads are combinational. Writes take effect at the rising clock
// edge. When several ports write the same register in one cycle, the
// highest-numbered write port wins over lower ones and over the host; a
// well-formed configuration never does this, and an assertion reports it.
// Reset clears every register.
module gappco_regfile
  import gappco_pkg::*;
#(
  parameter int unsigned M   = M_REGS,
  parameter int unsigned NRD = 64,
  parameter int unsigned NWR = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   host_we,
  input  addr_t  host_addr,
  input  data_t  host_wdata,
  output data_t  host_rdata,
  input  addr_t  rd_addr [NRD],
  output data_t  rd_data [NRD],
  input  rf_wr_t wr      [NWR]
);

  data_t regs [M];

  // Register addresses beyond M read as zero.
  function automatic data_t read_reg(input addr_t a);
    return (int'(a) < int'(M)) ? regs[a] : '0;
  endfunction

  always_comb begin
    host_rdata = read_reg(host_addr);
    for (int p = 0; p < int'(NRD); p++) rd_data[p] = read_reg(rd_addr[p]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(M); r++) regs[r] <= '0;
    end else begin
      if (host_we && int'(host_addr) < int'(M)) regs[host_addr] <= host_wdata;
      for (int p = 0; p < int'(NWR); p++)
        if (wr[p].we && int'(wr[p].addr) < int'(M)) regs[wr[p].addr] <= wr[p].data;
    end
  end

  // No two write ports may target the same register in the same cycle.
  function automatic logic write_conflict();
    for (int p = 0; p < int'(NWR); p++)
      for (int q = p + 1; q < int'(NWR); q++)
        if (wr[p].we && wr[q].we && wr[p].addr == wr[q].addr) return 1'b1;
    return 1'b0;
  endfunction

  a_no_write_conflict: assert property (@(posedge clk) disable iff (!rst_n) !write_conflict());

endmodule
