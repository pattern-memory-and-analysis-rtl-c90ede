// tb_winner_tracker -- self-checking test of winner-take-all and decode.
// Streams 60 results per round (4 objects x 15 zones), 4 lanes at a time
// (15 pulses, lane l carrying neuron 15*l + row), with random values, gaps
// between pulses and forced ties (the lower neuron number must win), and
// checks the registered winner, its value, the object (index / 15) and
// zone (index mod 15) against a model;
// `clear` between rounds must make the next round independent.
module tb_winner_tracker;
  localparam int OBJ = 4, ZN = 15, NEU = OBJ * ZN, AW = 25, L = 4, R = NEU / L;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, in_valid = 1'b0;
  logic [3:0] in_row = '0;
  logic [L-1:0][AW-1:0] in_val = '0;
  logic have_win;
  logic [5:0] win_idx;
  logic signed [AW-1:0] win_val;
  logic [1:0] win_object;
  logic [3:0] win_zone;
  int checks = 0, failures = 0;

  winner_tracker #(.OBJECTS(OBJ), .ZONES(ZN), .LANES(L), .ACC_WIDTH(AW)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_row, .in_val,
    .have_win, .win_idx, .win_val, .win_object, .win_zone
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 200; round++) begin
      int best_i, best_v, vals [NEU];
      for (int n = 0; n < NEU; n++) vals[n] = $urandom_range(0, 200000) - 100000;
      if (round % 3 == 1) vals[$urandom_range(30, 59)] = vals[$urandom_range(0, 29)] + 0; // tie candidate
      if (round % 5 == 2) begin                      // exact tie on the maximum
        automatic int a = $urandom_range(0, 29), b = $urandom_range(30, 59);
        vals[a] = 5000000; vals[b] = 5000000;
      end
      best_i = 0; best_v = vals[0];
      for (int n = 1; n < NEU; n++) if (vals[n] > best_v) begin best_v = vals[n]; best_i = n; end
      @(negedge clk); clear = 1'b1;
      @(negedge clk); clear = 1'b0;
      checks++;
      if (have_win) begin failures++; $display("FAIL have_win after clear"); end
      for (int r = 0; r < R; r++) begin
        in_valid = 1'b1; in_row = 4'(r);
        for (int l = 0; l < L; l++) in_val[l] = AW'(vals[l * R + r]);
        @(negedge clk);
        in_valid = 1'b0;
        in_row = 4'($urandom);
        for (int l = 0; l < L; l++) in_val[l] = AW'(32'h7ffffff);  // ignored: not valid
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      checks++;
      if (!have_win || int'(win_idx) != best_i || int'(win_val) != best_v ||
          int'(win_object) != best_i / ZN || int'(win_zone) != best_i % ZN) begin
        failures++;
        $display("FAIL round %0d: idx %0d val %0d obj %0d zone %0d exp %0d %0d %0d %0d",
                 round, win_idx, win_val, win_object, win_zone, best_i, best_v, best_i / ZN, best_i % ZN);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
