// tb_echo_workload -- the recogniser on the two workloads it is meant for.
//
// 1. Full network (default parameters: 60 neurons, 256 samples). No recorded
//    sonar data is available here, so the testbench builds a synthetic
//    problem with the structure of trained weights: object k (1..4 poles)
//    seen in zone z returns a block of echo samples that starts at
//    16 + 14*z and is 4*(k+1) samples long (more poles, wider echo; farther,
//    later echo). Neuron (k, z) gets weight +0.5 (500 after the x1000
//    scaling) on its block's samples, -0.3 on the 8 samples on each side and
//    0 elsewhere, and bias -0.1 per block sample. Every one of the 60
//    object/zone echoes is sent as a 0/1 input vector, in random order, and
//    must be recognised as its own neuron, object and zone; all 60 outputs
//    are also compared with an integer model. Then 40 noisy echoes (random
//    bits flipped) are checked against the model only. A second copy of the
//    top with 4 lanes (15 neurons per lane) shares the same wires and must
//    give identical results, 15*256+2 clocks after start instead of 258.
// 2. Two-neuron network (1 object x 2 zones, 1 lane): two weight rows and
//    a known input vector, the small-scale check of the same computation.
//    Both outputs are read back and compared with hand-derivable values.
module tb_echo_workload;
  import echo_nn_pkg::*;
  localparam int NEU = N_NEURONS, SMP = N_SAMPLES, ZN = ZONES_PER_OBJECT;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- full size
  logic [1:0]  a_target = 2'd3;
  logic [15:0] a_index = '0, a_mag = '0;
  logic        a_sign = 1'b0, a_strobe = 1'b0, a_start = 1'b0;
  logic [5:0]  a_sel = '0;
  logic signed [24:0] a_answer, a_win_value;
  logic        a_busy, a_done, a_sat, a_dropped;
  logic [5:0]  a_winner;
  logic [1:0]  a_object;
  logic [3:0]  a_zone;
  logic [15:0] a_writes;

  echo_nn_top dut_full (
    .clk, .rst_n, .wi_target(a_target), .wi_index(a_index), .wi_mag(a_mag), .wi_sign(a_sign),
    .wi_strobe(a_strobe), .wi_start(a_start), .wi_read_sel(a_sel), .wo_answer(a_answer),
    .wo_busy(a_busy), .wo_done(a_done), .wo_winner(a_winner), .wo_object(a_object),
    .wo_zone(a_zone), .wo_win_value(a_win_value), .wo_writes(a_writes), .wo_sat(a_sat),
    .wo_dropped(a_dropped)
  );

  // same problem, 4 lanes: shares every wire-in with dut_full
  logic signed [24:0] c_answer, c_win_value;
  logic        c_busy, c_done, c_sat, c_dropped;
  logic [5:0]  c_winner;
  logic [1:0]  c_object;
  logic [3:0]  c_zone;
  logic [15:0] c_writes;

  echo_nn_top #(.LANES(4)) dut_four (
    .clk, .rst_n, .wi_target(a_target), .wi_index(a_index), .wi_mag(a_mag), .wi_sign(a_sign),
    .wi_strobe(a_strobe), .wi_start(a_start), .wi_read_sel(a_sel), .wo_answer(c_answer),
    .wo_busy(c_busy), .wo_done(c_done), .wo_winner(c_winner), .wo_object(c_object),
    .wo_zone(c_zone), .wo_win_value(c_win_value), .wo_writes(c_writes), .wo_sat(c_sat),
    .wo_dropped(c_dropped)
  );

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int wm [NEU * SMP];
  int bm [NEU];
  int xm [SMP];

  task automatic a_send(input int tgt, input int idx, input int value);
    @(negedge clk);
    a_target = 2'(tgt);
    a_index  = 16'(idx);
    a_mag    = 16'((value < 0) ? -value : value);
    a_sign   = (value < 0);
    a_strobe = ~a_strobe;
  endtask

  function automatic int blk_start(input int z);
    return 16 + 14 * z;
  endfunction

  function automatic int blk_len(input int k);
    return 4 * (k + 1);
  endfunction

  // loads xm, classifies, checks everything against the model; returns the winner
  task automatic a_classify(output int winner);
    int expv [NEU];
    int best, t0, ta, tc;
    ta = -1;
    tc = -1;
    for (int j = 0; j < SMP; j++) a_send(2, j, xm[j]);
    for (int n = 0; n < NEU; n++) begin
      expv[n] = bm[n];
      for (int j = 0; j < SMP; j++) if (xm[j] != 0) expv[n] += wm[n * SMP + j];
    end
    best = 0;
    for (int n = 1; n < NEU; n++) if (expv[n] > expv[best]) best = n;
    @(negedge clk); @(negedge clk);
    a_start = 1'b1;
    @(posedge clk); #1;
    t0 = cyc;
    @(negedge clk);
    a_start = 1'b0;
    while (!(a_done && c_done)) begin
      @(posedge clk); #1;
      if (a_done && ta < 0) ta = cyc - t0;
      if (c_done && tc < 0) tc = cyc - t0;
    end
    @(negedge clk);
    check(ta == SMP + 2, $sformatf("60-lane latency %0d exp %0d", ta, SMP + 2));
    check(tc == (NEU / 4) * SMP + 2, $sformatf("4-lane latency %0d exp %0d", tc, (NEU / 4) * SMP + 2));
    check(int'(a_winner) == best, $sformatf("winner %0d exp %0d", a_winner, best));
    check(int'(a_win_value) == expv[best], "winner value");
    check(int'(a_object) == best / ZN && int'(a_zone) == best % ZN, "object/zone decode");
    check(c_winner == a_winner && c_win_value == a_win_value && c_object == a_object &&
          c_zone == a_zone, "4-lane winner");
    for (int n = 0; n < NEU; n++) begin
      a_sel = 6'(n);
      @(negedge clk);
      check(int'(a_answer) == expv[n], $sformatf("neuron %0d answer %0d exp %0d", n, a_answer, expv[n]));
      check(int'(c_answer) == expv[n], $sformatf("4-lane neuron %0d answer %0d exp %0d", n, c_answer, expv[n]));
    end
    winner = int'(a_winner);
  endtask

  // ----------------------------------------------------------------- 2 neurons
  logic [1:0]  b_target = 2'd3;
  logic [15:0] b_index = '0, b_mag = '0;
  logic        b_sign = 1'b0, b_strobe = 1'b0, b_start = 1'b0;
  logic [0:0]  b_sel = '0;
  logic signed [24:0] b_answer, b_win_value;
  logic        b_busy, b_done, b_sat, b_dropped;
  logic [0:0]  b_winner, b_object, b_zone;
  logic [15:0] b_writes;

  echo_nn_top #(.OBJECTS(1), .ZONES(2), .LANES(1)) dut_two (
    .clk, .rst_n, .wi_target(b_target), .wi_index(b_index), .wi_mag(b_mag), .wi_sign(b_sign),
    .wi_strobe(b_strobe), .wi_start(b_start), .wi_read_sel(b_sel), .wo_answer(b_answer),
    .wo_busy(b_busy), .wo_done(b_done), .wo_winner(b_winner), .wo_object(b_object),
    .wo_zone(b_zone), .wo_win_value(b_win_value), .wo_writes(b_writes), .wo_sat(b_sat),
    .wo_dropped(b_dropped)
  );

  task automatic b_send(input int tgt, input int idx, input int value);
    @(negedge clk);
    b_target = 2'(tgt);
    b_index  = 16'(idx);
    b_mag    = 16'((value < 0) ? -value : value);
    b_sign   = (value < 0);
    b_strobe = ~b_strobe;
  endtask

  initial begin
    int order [NEU];
    automatic int recognised = 0, noisy = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- workload 2: two rows, known input vector
    // row 0: weight j -> (j % 7) - 3, row 1: weight j -> 250 - 2*j (j < 256)
    // input: 1 on even samples; biases +1000 and -1000
    begin
      automatic int e0 = 1000, e1 = -1000;
      for (int j = 0; j < SMP; j++) begin
        b_send(0, j, (j % 7) - 3);
        b_send(0, SMP + j, 250 - 2 * j);
        b_send(2, j, (j % 2 == 0) ? 1 : 0);
        if (j % 2 == 0) begin
          e0 += (j % 7) - 3;
          e1 += 250 - 2 * j;
        end
      end
      b_send(1, 0, 1000);
      b_send(1, 1, -1000);
      @(negedge clk); @(negedge clk);
      b_start = 1'b1;
      @(negedge clk);
      b_start = 1'b0;
      while (!b_done) @(negedge clk);
      b_sel = 1'b0;
      @(negedge clk);
      check(int'(b_answer) == e0, $sformatf("two-row neuron 0: %0d exp %0d", b_answer, e0));
      b_sel = 1'b1;
      @(negedge clk);
      check(int'(b_answer) == e1, $sformatf("two-row neuron 1: %0d exp %0d", b_answer, e1));
      check(int'(b_winner) == ((e1 > e0) ? 1 : 0), "two-row winner");
    end

    // ---- workload 1: full network, synthetic object/zone echoes
    for (int n = 0; n < NEU; n++) begin
      automatic int k = n / ZN, z = n % ZN;
      automatic int s = blk_start(z), len = blk_len(k);
      for (int j = 0; j < SMP; j++) begin
        automatic int w = 0;
        if (j >= s && j < s + len) w = 500;
        else if ((j >= s - 8 && j < s) || (j >= s + len && j < s + len + 8)) w = -300;
        wm[n * SMP + j] = w;
        a_send(0, n * SMP + j, w);
      end
      bm[n] = -100 * len;
      a_send(1, n, bm[n]);
    end
    for (int n = 0; n < NEU; n++) order[n] = n;
    order.shuffle();
    foreach (order[i]) begin
      automatic int n = order[i], win;
      automatic int k = n / ZN, z = n % ZN;
      for (int j = 0; j < SMP; j++) xm[j] = (j >= blk_start(z) && j < blk_start(z) + blk_len(k)) ? 1 : 0;
      a_classify(win);
      check(win == n, $sformatf("echo of object %0d zone %0d recognised as neuron %0d", k, z, win));
      if (win == n) recognised++;
    end
    repeat (40) begin
      automatic int n = $urandom_range(0, NEU - 1), win;
      automatic int k = n / ZN, z = n % ZN;
      for (int j = 0; j < SMP; j++) xm[j] = (j >= blk_start(z) && j < blk_start(z) + blk_len(k)) ? 1 : 0;
      repeat (6) begin
        automatic int f = $urandom_range(0, SMP - 1);
        xm[f] = 1 - xm[f];
      end
      a_classify(win);
      if (win == n) noisy++;
    end
    check(!a_sat && !a_dropped && !c_sat && !c_dropped, "no clipped or dropped transfers");
    check(a_writes == c_writes, "both copies accepted every transfer");
    $display("clean echoes recognised: %0d of %0d; noisy echoes recognised: %0d of 40",
             recognised, NEU, noisy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
