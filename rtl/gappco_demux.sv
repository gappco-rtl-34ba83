// gappco_demux: demultiplexer (DEMUXxy) behind a first-level adder.
//
// The enable bit from the configuration chooses where the adder output goes:
//   en = 0: on to the second-level adder (4-width dot product), result side 0
//   en = 1: out of the unit as a result (2-width dot product), adder side 0
// Driving the unused output to zero (so the second-level adder simply adds
// nothing from this side) is this implementation's choice.
//
// Purely combinational; no clock.
module gappco_demux
  import gappco_pkg::*;
(
  input  logic  en,
  input  data_t din,
  output data_t to_add,
  output data_t to_result
);

  always_comb begin
    to_add    = '0;
    to_result = '0;
    if (en) to_result = din;
    else    to_add    = din;
  end

endmodule
