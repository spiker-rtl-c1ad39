// weight_addr: maps the index of the spike being processed to the physical
// location of its weights in the block RAMs.
//
// The weights of one input (one per neuron) are spread over a row of
// block RAMs that are read in parallel. An input index larger than a block
// RAM's depth cannot live in a single primitive, so the logical table of
// BASE + N_IN words is cut into rows of BRAM_DEPTH words: the translated
// index selects the row (`row`, also given one-hot in `row_en`) and the
// word inside every block RAM of that row (`addr`). BASE lets several layers
// share the same memory by giving each its own region. `valid_out` is
// `valid` qualified with a range check. Purely combinational.
//
// The published design states that such a translation circuit exists
// between the layer's spike index and the parallel BRAMs; the row/word
// split and the base offset are this design's own.
module weight_addr #(
  parameter int N_IN       = 784,
  parameter int BRAM_DEPTH = 512,
  parameter int BASE       = 0,
  localparam int AW_IN = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int ROWS  = (BASE + N_IN + BRAM_DEPTH - 1) / BRAM_DEPTH,
  localparam int RW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int LW    = (BRAM_DEPTH > 1) ? $clog2(BRAM_DEPTH) : 1
) (
  input  logic [AW_IN-1:0] idx,
  input  logic             valid,
  output logic [RW-1:0]    row,
  output logic [ROWS-1:0]  row_en,
  output logic [LW-1:0]    addr,
  output logic             valid_out
);

  localparam int LIN_W = $clog2(BASE + N_IN + 1);

  logic [LIN_W-1:0] lin;

  always_comb begin
    lin       = LIN_W'(BASE) + LIN_W'(idx);
    row       = RW'(lin / LIN_W'(BRAM_DEPTH));
    addr      = LW'(lin % LIN_W'(BRAM_DEPTH));
    valid_out = valid && (idx < AW_IN'(N_IN));
    row_en    = '0;
    if (valid_out) row_en[row] = 1'b1;
  end

endmodule
