// gappco_top: GAPPCO I, a configurable Geometric Algebra coprocessor.
//
// A Geometric Algebra algorithm, once symbolically optimised, reduces to a
// set of dot products between short vectors of scalar inputs, constants and
// earlier results. GAPPCO I computes them with N identical DotVectors units
// that all read and write one register file; which registers each unit
// multiplies, with which signs, whether it forms one 4-term or two 2-term
// dot products, and where its results go are set by a configuration
// bitstream, not by rebuilding the hardware.
//
// Host interface (all synchronous to clk):
//   host_we/host_addr/host_wdata/host_rdata  register-file port: the host
//       writes inputs and constants and reads results. Reads are
//       combinational; writes are dropped while busy is high.
//   configure, cfg_valid, cfg_bit -> conf_end, conf_error
//       configuration bitstream, see gappco_controller.
//   process -> process_end, busy
//       one run: intermediate pass, then final pass.
//
// Structure (controller, register file of M 32-bit registers, DotVectors 1..N,
// and the process/configure handshakes) follows the design; N = 8 and the
// gating of host writes by busy are this implementation's choices.
module gappco_top
  import gappco_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  host_we,
  input  addr_t host_addr,
  input  data_t host_wdata,
  output data_t host_rdata,
  input  logic  configure,
  input  logic  cfg_valid,
  input  logic  cfg_bit,
  output logic  conf_end,
  output logic  conf_error,
  input  logic  process,
  output logic  process_end,
  output logic  busy
);

  dv_cfg_t   dv_cfg    [N];
  logic      dv_active [N];
  logic      dv_issue;
  res_type_e dv_phase;
  logic      dv_busy   [N];
  addr_t     rd_addr   [N*N_OPS];
  data_t     rd_data   [N*N_OPS];
  rf_wr_t    wr        [N*2];

  gappco_controller #(.N(N)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .configure  (configure),
    .cfg_valid  (cfg_valid),
    .cfg_bit    (cfg_bit),
    .conf_end   (conf_end),
    .conf_error (conf_error),
    .process    (process),
    .process_end(process_end),
    .busy       (busy),
    .dv_cfg     (dv_cfg),
    .dv_active  (dv_active),
    .dv_issue   (dv_issue),
    .dv_phase   (dv_phase)
  );

  gappco_regfile #(.M(M_REGS), .NRD(N*N_OPS), .NWR(N*2)) u_rf (
    .clk       (clk),
    .rst_n     (rst_n),
    .host_we   (host_we && !busy),
    .host_addr (host_addr),
    .host_wdata(host_wdata),
    .host_rdata(host_rdata),
    .rd_addr   (rd_addr),
    .rd_data   (rd_data),
    .wr        (wr)
  );

  for (genvar u = 0; u < N; u++) begin : g_dv
    addr_t  u_rd_addr [N_OPS];
    data_t  u_rd_data [N_OPS];
    rf_wr_t u_wr      [2];

    gappco_dotvectors u_dv (
      .clk    (clk),
      .rst_n  (rst_n),
      .cfg    (dv_cfg[u]),
      .active (dv_active[u]),
      .issue  (dv_issue),
      .phase  (dv_phase),
      .rd_addr(u_rd_addr),
      .rd_data(u_rd_data),
      .wr     (u_wr),
      .busy   (dv_busy[u])
    );

    for (genvar k = 0; k < N_OPS; k++) begin : g_port
      assign rd_addr[u*N_OPS+k] = u_rd_addr[k];
      assign u_rd_data[k]       = rd_data[u*N_OPS+k];
    end
    assign wr[2*u]   = u_wr[0];
    assign wr[2*u+1] = u_wr[1];

    // A unit only computes while the controller is running.
    a_dv_busy_in_run: assert property (@(posedge clk) disable iff (!rst_n) dv_busy[u] |-> busy);
  end

endmodule
