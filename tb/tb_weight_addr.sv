// tb_weight_addr: exhaustive check of the index-to-BRAM translation for two
// configurations: the default 784 inputs over 512-word block RAMs, and a
// region starting at a non-zero base with a depth that is not a power of 2.
module tb_weight_addr;
  int checks = 0, failures = 0;

  logic [9:0] idx_a;
  logic       valid_a;
  logic [0:0] row_a;
  logic [1:0] en_a;
  logic [8:0] addr_a;
  logic       vo_a;
  weight_addr #(.N_IN(784), .BRAM_DEPTH(512), .BASE(0)) dut_a (
    .idx(idx_a), .valid(valid_a), .row(row_a), .row_en(en_a), .addr(addr_a), .valid_out(vo_a));

  // 100 inputs from base 250 over 120-word RAMs: rows 2..2 span 0..2 (3 rows)
  logic [6:0] idx_b;
  logic       valid_b;
  logic [1:0] row_b;
  logic [2:0] en_b;
  logic [6:0] addr_b;
  logic       vo_b;
  weight_addr #(.N_IN(100), .BRAM_DEPTH(120), .BASE(250)) dut_b (
    .idx(idx_b), .valid(valid_b), .row(row_b), .row_en(en_b), .addr(addr_b), .valid_out(vo_b));

  task automatic check(bit ok, string what, int i);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s idx=%0d", what, i);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      idx_a = 10'(i); valid_a = 1'b1;
      #1;
      if (i < 784) begin
        check(vo_a, "a valid", i);
        check(row_a == 1'(i / 512), "a row", i);
        check(addr_a == 9'(i % 512), "a addr", i);
        check(en_a == 2'(1 << (i / 512)), "a row_en", i);
      end else begin
        check(!vo_a && en_a == 0, "a out of range", i);
      end
      valid_a = 1'b0;
      #1;
      check(en_a == 0 && !vo_a, "a idle", i);
    end
    for (int i = 0; i < 128; i++) begin
      idx_b = 7'(i); valid_b = 1'b1;
      #1;
      if (i < 100) begin
        check(vo_b, "b valid", i);
        check(row_b == 2'((250 + i) / 120), "b row", i);
        check(addr_b == 7'((250 + i) % 120), "b addr", i);
        check(en_b == 3'(1 << ((250 + i) / 120)), "b row_en", i);
      end else begin
        check(!vo_b, "b out of range", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
