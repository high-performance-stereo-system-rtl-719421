// tb_sad_unit: applies random 5x5 left windows, right columns and border
// masks to the SAD unit (8 disparities) and checks every SAD against a sum
// of absolute differences computed here, including the forced maximum for
// disparities at or above the active range.
module tb_sad_unit;
  import stereo_pkg::*;
  localparam int WIN = 5, D = 8, NCOL = D + WIN - 1;
  comp_t lwin [WIN][WIN];
  comp_t rwin [WIN][NCOL];
  logic  row_ok [WIN];
  logic  lcol_ok [WIN];
  logic  rcol_ok [NCOL];
  logic [7:0] drange;
  cost_t sad [D];
  sad_unit #(.WIN(WIN), .D(D)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int v = 0; v < WIN; v++) begin
        row_ok[v] = (t % 3 == 0) ? 1'b1 : 1'($urandom_range(0, 4) != 0);
        for (int j = 0; j < WIN; j++) begin
          lwin[v][j] = comp_t'($urandom);
          lcol_ok[j] = (t % 3 == 0) ? 1'b1 : 1'($urandom_range(0, 4) != 0);
        end
        for (int j = 0; j < NCOL; j++) begin
          rwin[v][j] = comp_t'($urandom);
          rcol_ok[j] = (t % 3 == 0) ? 1'b1 : 1'($urandom_range(0, 4) != 0);
        end
      end
      drange = 8'($urandom_range(2, D));
      #1;
      for (int d = 0; d < D; d++) begin
        int e;
        e = 0;
        for (int v = 0; v < WIN; v++)
          for (int j = 0; j < WIN; j++)
            if (row_ok[v] && lcol_ok[j] && rcol_ok[j+d])
              e += (lwin[v][j] > rwin[v][j+d]) ? lwin[v][j] - rwin[v][j+d]
                                                : rwin[v][j+d] - lwin[v][j];
        if (d >= drange) e = 8191;
        checks++;
        if (int'(sad[d]) != e) begin
          failures++;
          if (failures < 5) $display("t=%0d d=%0d got %0d expected %0d", t, d, sad[d], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
