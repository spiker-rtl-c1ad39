// weight_mem: excitatory weight memory of one layer, built from block RAMs
// read in parallel.
//
// The N_NEURONS weights of input i (5 bits each) form one logical word. It
// is split over COLS block RAMs of WPW weights each (14 weights = 70 of the
// 72 bits of a 512x72 Artix-7 block RAM), and the N_IN logical words over
// ROWS rows of BRAM_DEPTH words, located by weight_addr. A read of index
// `rd_idx` with `rd_en` returns all N_NEURONS weights on `weights` one clock
// later (weights[n] belongs to neuron n); `weights` holds its value until the
// next read. Column c holds neurons c*WPW .. c*WPW+WPW-1; the unused slots of
// the last column are never read.
//
// The host fills the memory through the same single port: `we` writes
// `wr_data` (neurons wr_col*WPW .. +WPW-1, neuron wr_col*WPW in the lowest
// bits) into the word of input `wr_idx`. A write has priority over a read.
//
// The published design gives the function (all weights of one spike read in
// parallel from BRAM, 5-bit weights); the word packing, the port and the
// latency are this design's own.
module weight_mem
  import spiker_pkg::*;
#(
  parameter int N_IN       = 784,
  parameter int N_NEURONS  = 400,
  parameter int WPW        = 14,
  parameter int BRAM_DEPTH = 512,
  localparam int AW_IN = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int COLS  = (N_NEURONS + WPW - 1) / WPW,
  localparam int CLW   = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int ROWS  = (N_IN + BRAM_DEPTH - 1) / BRAM_DEPTH,
  localparam int RW    = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int LW    = (BRAM_DEPTH > 1) ? $clog2(BRAM_DEPTH) : 1,
  localparam int DW    = WPW * W_W
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW_IN-1:0] rd_idx,
  input  logic             we,
  input  logic [AW_IN-1:0] wr_idx,
  input  logic [CLW-1:0]   wr_col,
  input  logic [DW-1:0]    wr_data,
  output weight_t          weights [N_NEURONS]
);

  logic [AW_IN-1:0] idx;
  logic [RW-1:0]    row, row_q;
  logic [ROWS-1:0]  row_en;
  logic [LW-1:0]    addr;
  logic             access, access_ok;
  logic [DW-1:0]    rdata [ROWS][COLS];

  always_comb begin
    idx    = we ? wr_idx : rd_idx;
    access = we || rd_en;
  end

  weight_addr #(.N_IN(N_IN), .BRAM_DEPTH(BRAM_DEPTH)) u_addr (
    .idx      (idx),
    .valid    (access),
    .row      (row),
    .row_en   (row_en),
    .addr     (addr),
    .valid_out(access_ok)
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      logic [DW-1:0] ram [BRAM_DEPTH];
      always_ff @(posedge clk) begin
        if (row_en[r]) begin
          if (we && (wr_col == CLW'(c))) ram[addr] <= wr_data;
          else if (!we)                  rdata[r][c] <= ram[addr];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en && !we && access_ok) row_q <= row;
  end

  always_comb begin
    for (int n = 0; n < N_NEURONS; n++)
      weights[n] = rdata[row_q][n / WPW][(n % WPW) * W_W +: W_W];
  end

endmodule
