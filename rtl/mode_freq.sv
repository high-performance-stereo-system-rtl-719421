// mode_freq: mode of a neighbourhood and its frequency. One neighbour
// comparator per position counts how many of the N values equal its own
// value (itself included); a priority encoder picks the position with the
// largest count, the highest-numbered one on a tie, and a multiplexer
// returns that value (mode_val) and its count (mode_frq, the mod_val of the
// third refinement rule). Combinational.
module mode_freq #(
  parameter int unsigned N     = 25,
  parameter int unsigned WIDTH = 13,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [WIDTH-1:0] vals [N],
  output logic [WIDTH-1:0] mode_val,
  output logic [CW-1:0]    mode_frq
);

  logic [CW-1:0] cnt [N];

  // neighbour comparators
  always_comb begin
    for (int i = 0; i < N; i++) begin
      cnt[i] = '0;
      for (int j = 0; j < N; j++)
        cnt[i] = cnt[i] + CW'(vals[i] == vals[j]);
    end
  end

  // priority encoder and multiplexer
  always_comb begin
    mode_frq = '0;
    mode_val = vals[0];
    for (int i = 0; i < N; i++)
      if (cnt[i] >= mode_frq) begin
        mode_frq = cnt[i];
        mode_val = vals[i];
      end
  end

endmodule
