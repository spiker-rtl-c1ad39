// tb_weight_mem: self-checking testbench of the parallel weight memory.
// A reduced memory (20 inputs, 30 neurons, 4 weights per RAM word, 8-word
// RAMs: 3 rows of 8 columns) is filled with random weights through the write
// port; then every index is read in random order and all 30 weights are
// compared with a model one clock after the read, as the layer expects.
module tb_weight_mem;
  import spiker_pkg::*;
  localparam int NI = 20, NN = 30, WPW = 4, DEPTH = 8;
  localparam int COLS = (NN + WPW - 1) / WPW;

  logic                clk = 0, rd_en = 0, we = 0;
  logic [4:0]          rd_idx = '0, wr_idx = '0;
  logic [2:0]          wr_col = '0;
  logic [WPW*W_W-1:0]  wr_data = '0;
  weight_t             weights [NN];
  weight_t             model [NI][COLS*WPW];
  int checks = 0, failures = 0;

  weight_mem #(.N_IN(NI), .N_NEURONS(NN), .WPW(WPW), .BRAM_DEPTH(DEPTH)) dut (
    .clk, .rd_en, .rd_idx, .we, .wr_idx, .wr_col, .wr_data, .weights);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int i);
    @(negedge clk);
    rd_en = 1; rd_idx = 5'(i);
    @(negedge clk);
    rd_en = 0;
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (weights[n] != model[i][n]) begin
        failures++;
        if (failures < 10) $display("FAIL idx=%0d n=%0d got=%0d exp=%0d", i, n, weights[n], model[i][n]);
      end
    end
  endtask

  initial begin
    // fill
    for (int i = 0; i < NI; i++)
      for (int c = 0; c < COLS; c++) begin
        @(negedge clk);
        we = 1; wr_idx = 5'(i); wr_col = 3'(c);
        for (int k = 0; k < WPW; k++) begin
          model[i][c*WPW+k] = weight_t'($urandom());
          wr_data[k*W_W +: W_W] = model[i][c*WPW+k];
        end
      end
    @(negedge clk);
    we = 0;
    // read back: ascending, then random order, then holding between reads
    for (int i = 0; i < NI; i++) read_check(i);
    for (int r = 0; r < 60; r++) read_check($urandom_range(0, NI - 1));
    // overwrite one word and read it again
    @(negedge clk);
    we = 1; wr_idx = 5'd17; wr_col = 3'd7;
    for (int k = 0; k < WPW; k++) begin
      model[17][28+k] = weight_t'(k + 9);
      wr_data[k*W_W +: W_W] = model[17][28+k];
    end
    @(negedge clk);
    we = 0;
    read_check(17);
    read_check(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
