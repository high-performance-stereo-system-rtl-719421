// tb_mode_freq: random 5x5 neighbourhoods drawn from small value sets (so
// values repeat) and checks the mode frequency against a count done here,
// and that the returned mode value occurs that often.
module tb_mode_freq;
  logic [12:0] vals [25];
  logic [12:0] mode_val;
  logic [4:0]  mode_frq;
  mode_freq #(.N(25), .WIDTH(13)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int k, best, cntv;
      k = $urandom_range(1, 25);
      for (int i = 0; i < 25; i++) vals[i] = 13'($urandom_range(0, k - 1) * 97);
      #1;
      best = 0;
      for (int i = 0; i < 25; i++) begin
        int c;
        c = 0;
        for (int j = 0; j < 25; j++) if (vals[i] == vals[j]) c++;
        if (c > best) best = c;
      end
      cntv = 0;
      for (int j = 0; j < 25; j++) if (vals[j] == mode_val) cntv++;
      checks += 2;
      if (int'(mode_frq) != best) failures++;
      if (cntv != best) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
