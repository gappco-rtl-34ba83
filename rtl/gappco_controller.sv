// gappco_controller: configuration and run control of GAPPCO I.
//
// Configuration phase. A one-cycle 'configure' pulse clears the previous
// configuration and starts the bitstream parser; conf_end drops. The host
// then sends the configuration bitstream one bit per cycle (cfg_bit while
// cfg_valid is 1), every field most significant bit first:
//
//   number of GAPP units r                          COUNT_W bits
//   for each GAPP unit:  number of DotVectors units COUNT_W bits
//                        one dv_cfg_t record each   DV_CFG_W (62) bits
//
// The field layout is the design's; the bit-serial transport is this
// implementation's. The records of all GAPP units are assigned to consecutive
// physical DotVectors units in bitstream order, so a GAPP unit is simply a
// group of neighbouring units joined through the register file. Records
// beyond the N available units are dropped and conf_error is raised. When the
// last record has arrived conf_end rises and stays high until the next
// configure.
//
// Processing phase. A 'process' pulse, accepted only while idle and
// configured, starts a run; process_end drops and busy rises. With a single
// result-type bit, results are either intermediate (read by other units) or
// final. The controller therefore issues all active units once with
// dv_phase = intermediate, waits DV_LAT cycles for the write-back, then
// issues them again with dv_phase = final; a unit only writes results whose
// type matches the phase. The intermediate pass is skipped when no active
// unit produces an intermediate result. After the final write-back
// process_end rises and stays high until the next process.
//
// Timing: dv_issue is high for one cycle, DV_LAT+1 cycles apart between the
// passes. Counting the rising edge that samples process as edge 1,
// process_end is high after edge 2*(DV_LAT+1)+1 = 9, or after edge
// DV_LAT+2 = 5 when there is no intermediate pass. Commands arriving while
// busy are ignored.
module gappco_controller
  import gappco_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // configuration
  input  logic      configure,
  input  logic      cfg_valid,
  input  logic      cfg_bit,
  output logic      conf_end,
  output logic      conf_error,
  // processing
  input  logic      process,
  output logic      process_end,
  output logic      busy,
  // to the DotVectors units
  output dv_cfg_t   dv_cfg    [N],
  output logic      dv_active [N],
  output logic      dv_issue,
  output res_type_e dv_phase
);

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_GU_COUNT,
    ST_DV_COUNT,
    ST_DV_RECORD,
    ST_RUN
  } state_e;

  localparam int unsigned PTR_W = 2 * COUNT_W + 1;

  state_e                 state;
  logic [DV_CFG_W-2:0]    shreg;
  logic [DV_CFG_W-1:0]    shreg_next;
  logic [$clog2(DV_CFG_W+1)-1:0] nbits;
  logic [COUNT_W-1:0]     gu_left, dv_left;
  logic [PTR_W-1:0]       dv_ptr;
  logic [$clog2(DV_LAT+1)-1:0] cnt;
  logic                   has_intermediate;

  assign shreg_next = {shreg, cfg_bit};
  assign busy       = (state != ST_IDLE);

  always_comb begin
    has_intermediate = 1'b0;
    for (int u = 0; u < int'(N); u++)
      if (dv_active[u] && ((dv_cfg[u].res1.rtype == RES_INTERMEDIATE) ||
                           (dv_cfg[u].en2 && dv_cfg[u].res2.rtype == RES_INTERMEDIATE)))
        has_intermediate = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      shreg       <= '0;
      nbits       <= '0;
      gu_left     <= '0;
      dv_left     <= '0;
      dv_ptr      <= '0;
      cnt         <= '0;
      conf_end    <= 1'b0;
      conf_error  <= 1'b0;
      process_end <= 1'b0;
      dv_issue    <= 1'b0;
      dv_phase    <= RES_FINAL;
      for (int u = 0; u < int'(N); u++) begin
        dv_cfg[u]    <= '0;
        dv_active[u] <= 1'b0;
      end
    end else begin
      dv_issue <= 1'b0;
      unique case (state)
        ST_IDLE: begin
          if (configure) begin
            state      <= ST_GU_COUNT;
            conf_end   <= 1'b0;
            conf_error <= 1'b0;
            nbits      <= '0;
            dv_ptr     <= '0;
            for (int u = 0; u < int'(N); u++) dv_active[u] <= 1'b0;
          end else if (process && conf_end) begin
            state       <= ST_RUN;
            process_end <= 1'b0;
            dv_issue    <= 1'b1;
            dv_phase    <= has_intermediate ? RES_INTERMEDIATE : RES_FINAL;
            cnt         <= '0;
          end
        end

        ST_GU_COUNT: if (cfg_valid) begin
          shreg <= shreg_next[DV_CFG_W-2:0];
          if (int'(nbits) == COUNT_W - 1) begin
            nbits   <= '0;
            gu_left <= shreg_next[COUNT_W-1:0];
            if (shreg_next[COUNT_W-1:0] == '0) begin
              state    <= ST_IDLE;
              conf_end <= 1'b1;
            end else begin
              state <= ST_DV_COUNT;
            end
          end else begin
            nbits <= nbits + 1'b1;
          end
        end

        ST_DV_COUNT: if (cfg_valid) begin
          shreg <= shreg_next[DV_CFG_W-2:0];
          if (int'(nbits) == COUNT_W - 1) begin
            nbits   <= '0;
            dv_left <= shreg_next[COUNT_W-1:0];
            if (shreg_next[COUNT_W-1:0] != '0) begin
              state <= ST_DV_RECORD;
            end else if (gu_left == 1) begin
              state    <= ST_IDLE;
              conf_end <= 1'b1;
            end else begin
              gu_left <= gu_left - 1'b1;
            end
          end else begin
            nbits <= nbits + 1'b1;
          end
        end

        ST_DV_RECORD: if (cfg_valid) begin
          shreg <= shreg_next[DV_CFG_W-2:0];
          if (int'(nbits) == DV_CFG_W - 1) begin
            nbits <= '0;
            for (int u = 0; u < int'(N); u++)
              if (int'(dv_ptr) == u) begin
                dv_cfg[u]    <= dv_cfg_t'(shreg_next);
                dv_active[u] <= 1'b1;
              end
            if (int'(dv_ptr) >= int'(N)) conf_error <= 1'b1;
            dv_ptr <= dv_ptr + 1'b1;
            if (dv_left != 1) begin
              dv_left <= dv_left - 1'b1;
            end else if (gu_left == 1) begin
              state    <= ST_IDLE;
              conf_end <= 1'b1;
            end else begin
              gu_left <= gu_left - 1'b1;
              state   <= ST_DV_COUNT;
            end
          end else begin
            nbits <= nbits + 1'b1;
          end
        end

        ST_RUN: begin
          cnt <= cnt + 1'b1;
          if (int'(cnt) == DV_LAT) begin
            // The write-back of the current pass happens at this edge.
            if (dv_phase == RES_INTERMEDIATE) begin
              dv_phase <= RES_FINAL;
              dv_issue <= 1'b1;
              cnt      <= '0;
            end else begin
              state       <= ST_IDLE;
              process_end <= 1'b1;
            end
          end
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // dv_issue is a single-cycle pulse.
  a_issue_pulse: assert property (@(posedge clk) disable iff (!rst_n) dv_issue |=> !dv_issue);

endmodule
