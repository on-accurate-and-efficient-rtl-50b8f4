// partition_selector: picks one perceptron out of the lines read in parallel
// from NPART partitioned weight tables.
//
// Every partition's table is read with the same branch-address index; the
// selector then forwards the line of the partition named by `sel`, which the
// predictor takes from global-history bits that are not used as perceptron
// inputs. Combinational multiplexer.
module partition_selector
  import perceptron_pkg::*;
#(
  parameter int unsigned NPART = 16,
  parameter int unsigned NW    = 9,
  localparam int unsigned SEL_W = (NPART > 1) ? $clog2(NPART) : 1
) (
  input  logic [NPART-1:0][NW-1:0][WEIGHT_W-1:0] lines,
  input  logic [SEL_W-1:0]                       sel,
  output logic [NW-1:0][WEIGHT_W-1:0]            w
);
  always_comb begin
    w = '0;
    for (int unsigned p = 0; p < NPART; p++)
      if (SEL_W'(p) == sel) w = lines[p];
  end
endmodule
