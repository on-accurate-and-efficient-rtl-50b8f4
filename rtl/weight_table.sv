// weight_table: the Weight Table (WT), an array of perceptrons.
//
// LINES lines, each holding NW signed weights (weight 0 is the bias). Two
// combinational read ports serve the prediction (port A) and the
// read-modify-write of training (port B); one write port stores trained
// weights at the clock edge. A write and a read of the same line in the same
// cycle return the old contents (read before write).
//
// The weight storage is a plain array without reset so that it maps to a
// memory; a per-line valid bit, cleared by reset, makes a line that was never
// written read as all-zero weights. Initialising every perceptron to zero is
// this library's choice.
module weight_table
  import perceptron_pkg::*;
#(
  parameter int unsigned LINES = 128,
  parameter int unsigned NW    = 24,
  localparam int unsigned IDX_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [IDX_W-1:0]              rd_a_idx,
  output logic [NW-1:0][WEIGHT_W-1:0]   rd_a_w,
  input  logic [IDX_W-1:0]              rd_b_idx,
  output logic [NW-1:0][WEIGHT_W-1:0]   rd_b_w,
  input  logic                          we,
  input  logic [IDX_W-1:0]              wr_idx,
  input  logic [NW-1:0][WEIGHT_W-1:0]   wr_w
);
  logic [NW-1:0][WEIGHT_W-1:0] mem [LINES];
  logic [LINES-1:0]            valid;

  assign rd_a_w = valid[rd_a_idx] ? mem[rd_a_idx] : '0;
  assign rd_b_w = valid[rd_b_idx] ? mem[rd_b_idx] : '0;

  always_ff @(posedge clk) begin
    if (we) mem[wr_idx] <= wr_w;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  valid <= '0;
    else if (we) valid[wr_idx] <= 1'b1;
  end
endmodule
