// asc_maxmin - array-wide maximum/minimum search over the responders.
//
// Every Parallel PE presents a value and its responder bit; the unit returns
// the largest (find_min=0) or smallest (find_min=1) value held by a responder,
// and each PE then flags itself a responder if its value equals it. With no
// responders the result is 0 for a maximum search and all ones for a minimum
// search. The published text states the function (flag the PEs holding the
// maximum or minimum of a field); the combinational linear reduction is this
// design's choice. It is evaluated within the ID stage.
module asc_maxmin
  import asc_pkg::*;
#(
  parameter int unsigned NUM_PE = 4
) (
  input  logic              find_min,
  input  data_t             value     [NUM_PE],
  input  logic [NUM_PE-1:0] responder,
  output data_t             extreme
);
  always_comb begin
    extreme = find_min ? '1 : '0;
    for (int i = 0; i < NUM_PE; i++) begin
      if (responder[i]) begin
        if (find_min ? (value[i] < extreme) : (value[i] > extreme))
          extreme = value[i];
      end
    end
  end
endmodule
